// Self-checking test of ln_rom: both tables, every address, compared with
// ln(1 +/- 2^-i) * 2^23 computed here; the read must appear one clock
// after the address.
module tb_ln_rom;
  localparam int W = 25, FRAC = 23, DEPTH = 25, AW = 5;
  logic clk = 0;
  logic [AW-1:0] addr;
  logic [W-1:0]  d_pos, d_neg;
  int checks = 0, failures = 0;

  ln_rom #(.W(W), .FRAC(FRAC), .DEPTH(DEPTH), .AW(AW), .NEG(1'b0)) rom1 (.clk, .addr, .data(d_pos));
  ln_rom #(.W(W), .FRAC(FRAC), .DEPTH(DEPTH), .AW(AW), .NEG(1'b1)) rom2 (.clk, .addr, .data(d_neg));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real as_real(logic [W-1:0] v);
    return real'($signed(v)) / (2.0 ** FRAC);
  endfunction

  initial begin
    real ep, en_;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = AW'(i);
      #1;
      // nothing is read before the clock edge: data still shows address i-1
      if (i > 0) begin
        checks++;
        if (as_real(d_pos) - $ln(1.0 + 2.0 ** (-(i - 1))) > 1.0e-6 ||
            as_real(d_pos) - $ln(1.0 + 2.0 ** (-(i - 1))) < -1.0e-6) begin
          failures++;
          $display("FAIL latency i=%0d", i);
        end
      end
      @(posedge clk);
      #1;
      ep  = $ln(1.0 + 2.0 ** (-i));
      en_ = (i == 0) ? 0.0 : $ln(1.0 - 2.0 ** (-i));
      checks += 2;
      if (as_real(d_pos) - ep > 0.6 / (2.0 ** FRAC) || ep - as_real(d_pos) > 0.6 / (2.0 ** FRAC)) begin
        failures++;
        $display("FAIL rom1 i=%0d got=%f exp=%f", i, as_real(d_pos), ep);
      end
      if (as_real(d_neg) - en_ > 0.6 / (2.0 ** FRAC) || en_ - as_real(d_neg) > 0.6 / (2.0 ** FRAC)) begin
        failures++;
        $display("FAIL rom2 i=%0d got=%f exp=%f", i, as_real(d_neg), en_);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
