// Self-checking test of twos_complement: y must equal 0 - a modulo 2^42.
module tb_twos_complement;
  localparam int W = 42;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  twos_complement #(.W(W)) dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      a = (n == 0) ? '0 : (n == 1) ? W'(1) : {$urandom, $urandom};
      #1;
      checks++;
      if (y !== W'(64'(0) - 64'(a)) || (y + a) !== '0) begin
        failures++;
        $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
