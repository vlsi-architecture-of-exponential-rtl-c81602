// Self-checking test of data_reg: reset to zero, preset has priority over
// load enable, the value holds when neither is set.
module tb_data_reg;
  localparam int W = 25;
  localparam logic [W-1:0] PRE = 25'h0800000;
  logic clk = 0, rst_n = 0, preset = 0, en = 0;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  data_reg #(.W(W), .PRESET(PRE)) dut (.clk, .rst_n, .preset, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      preset = ($urandom % 8) == 0;
      en     = 1'($urandom);
      d      = W'($urandom);
      @(posedge clk);
      if (preset)  model = PRE;
      else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d q=%h model=%h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
