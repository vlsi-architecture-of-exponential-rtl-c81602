// Self-checking test of pow2_shifter: left shifts with and without
// saturation, right shifts down to underflow, compared with real-valued
// 2^(+/-I) * e truncated to 8.16.
module tb_pow2_shifter;
  logic [15:0] e;
  logic [7:0]  shamt;
  logic        neg;
  logic [23:0] out;
  logic        saturated;
  int checks = 0, failures = 0;
  int n_sat = 0, n_zero = 0;

  pow2_shifter #(.FW(16), .SW(8), .OW(24), .OFRAC(16)) dut (.e, .shamt, .neg, .out, .saturated);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    v, p2;
    longint expv;
    for (int n = 0; n < 2000; n++) begin
      int unsigned r_e, r_s;
      r_e   = $urandom % 32'hc000;
      r_s   = $urandom;
      e     = 16'h4000 + 16'(r_e);                   // [0.5, 2)
      shamt = (n % 3 == 0) ? 8'(r_s) : 8'(r_s % 24);
      neg   = 1'($urandom);
      #1;
      p2 = 1.0;
      repeat (int'(shamt)) p2 = p2 * 2.0;
      v = neg ? real'(e) / 32768.0 / p2 : real'(e) / 32768.0 * p2;
      if (v >= 256.0) expv = 24'hffffff;
      else            expv = longint'($floor(v * 65536.0));
      if (expv == 24'hffffff && v >= 256.0) n_sat++;
      if (expv == 0) n_zero++;
      checks++;
      if (out !== 24'(expv) || saturated !== (!neg && v >= 256.0)) begin
        failures++;
        $display("FAIL e=%h I=%0d neg=%0b out=%h exp=%h sat=%0b", e, shamt, neg, out, 24'(expv), saturated);
      end
    end
    checks++;
    if (n_sat == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage sat=%0d zero=%0d", n_sat, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
