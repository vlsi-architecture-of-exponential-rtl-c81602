// Self-checking test of iter_counter: clear, count with random enables,
// compared with a model count; clear has priority over enable; count_nx
// announces the next value.
module tb_iter_counter;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] count, count_nx;
  int model = 0;
  int checks = 0, failures = 0;

  iter_counter #(.W(W)) dut (.clk, .rst_n, .clr, .en, .count, .count_nx);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (count !== '0) begin failures++; $display("FAIL reset count=%0d", count); end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      clr = ($urandom % 16) == 0;
      en  = 1'($urandom);
      #1;
      checks++;
      if (count_nx !== (clr ? '0 : en ? W'(model + 1) : W'(model))) begin
        failures++;
        $display("FAIL n=%0d count_nx=%0d", n, count_nx);
      end
      @(posedge clk);
      if (clr)     model = 0;
      else if (en) model = (model + 1) % (1 << W);
      #1;
      checks++;
      if (count !== W'(model)) begin
        failures++;
        $display("FAIL n=%0d count=%0d model=%0d", n, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
