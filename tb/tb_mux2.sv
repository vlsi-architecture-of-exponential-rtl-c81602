// Self-checking test of mux2: random operands, both select values.
module tb_mux2;
  localparam int W = 25;
  logic         sel;
  logic [W-1:0] in0, in1, out;
  int checks = 0, failures = 0;

  mux2 #(.W(W)) dut (.sel, .in0, .in1, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      in0 = W'($urandom); in1 = W'($urandom); sel = n[0];
      #1;
      checks++;
      if (out !== (n[0] ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0b in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
