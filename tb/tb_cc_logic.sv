// Self-checking test of cc_logic: a trial value is accepted exactly when
// its magnitude is below that of x (x and trial drawn so that the step
// points towards zero, as in the core); the register loads the flag on en
// and returns to 0 on clr.
module tb_cc_logic;
  localparam int W = 25;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, dir = 0;
  logic [W-1:0] x, trial;
  logic cc_out, cc, model, want;
  int checks = 0, failures = 0;

  cc_logic #(.W(W)) dut (.clk, .rst_n, .clr, .en, .dir, .x, .trial, .cc_out, .cc);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    trial = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      clr   = ($urandom % 8) == 0;
      en    = 1'($urandom);
      begin
        longint xv, step, tv, ax, at;
        xv   = longint'($urandom % 32'h0800000) - ((n % 2) ? 32'h0800000 : 0);
        if (n % 16 == 0) xv = 0;
        step = longint'($urandom % 32'h0c00000);
        if (n % 7 == 0) step = 2 * (xv < 0 ? -xv : xv);   // lands on -x: equal magnitude
        dir  = (xv < 0);
        tv   = dir ? xv + step : xv - step;
        x     = W'(xv);
        trial = W'(tv);
        ax = xv < 0 ? -xv : xv;
        at = tv < 0 ? -tv : tv;
        want = (at < ax);
      end
      #1;
      checks++;
      if (cc_out !== want) begin
        failures++;
        $display("FAIL flag dir=%0b x=%h trial=%h cc_out=%0b", dir, x, trial, cc_out);
      end
      @(posedge clk);
      if (clr)     model = 1'b0;
      else if (en) model = want;
      #1;
      checks++;
      if (cc !== model) begin
        failures++;
        $display("FAIL reg n=%0d cc=%0b model=%0b", n, cc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
