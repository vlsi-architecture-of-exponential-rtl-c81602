// Self-checking test of const_mult in both uses: signed 24-bit input times
// 1/ln2 (18 bits) and unsigned 16-bit input times ln2 (19 bits), compared
// with 64-bit integer products.
module tb_const_mult;
  import exp_pkg::*;
  logic [23:0] a1;
  logic [41:0] p1;
  logic [15:0] a2;
  logic [34:0] p2;
  int checks = 0, failures = 0;

  const_mult #(.AW(24), .CW(18), .C(INV_LN2), .A_SIGNED(1'b1)) dut1 (.a(a1), .p(p1));
  const_mult #(.AW(16), .CW(19), .C(LN2), .A_SIGNED(1'b0)) dut2 (.a(a2), .p(p2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e1, e2;
    for (int n = 0; n < 300; n++) begin
      a1 = (n == 0) ? 24'h800000 : (n == 1) ? 24'h7fffff : 24'($urandom);
      a2 = (n == 0) ? 16'hffff : 16'($urandom);
      #1;
      e1 = longint'($signed(a1)) * 94548;
      e2 = longint'(a2) * 363409;
      checks += 2;
      if (p1 !== 42'(e1)) begin
        failures++;
        $display("FAIL mult1 a=%h p=%h exp=%h", a1, p1, 42'(e1));
      end
      if (p2 !== 35'(e2)) begin
        failures++;
        $display("FAIL mult2 a=%h p=%h exp=%h", a2, p2, 35'(e2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
