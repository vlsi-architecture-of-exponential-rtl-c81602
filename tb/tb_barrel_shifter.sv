// Self-checking test of barrel_shifter: every shift amount 0..31 on random
// data, compared with the >> operator.
module tb_barrel_shifter;
  localparam int W = 25, SW = 5;
  logic [W-1:0]  din, dout;
  logic [SW-1:0] shamt;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(W), .SW(SW)) dut (.din, .shamt, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int s = 0; s < 32; s++) begin
        din   = (n == 0) ? '1 : W'($urandom);
        shamt = SW'(s);
        #1;
        checks++;
        if (dout !== (din >> s)) begin
          failures++;
          $display("FAIL din=%h s=%0d dout=%h", din, s, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
