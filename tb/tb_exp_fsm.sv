// Self-checking test of exp_fsm. The test bench plays the counter and the
// condition-code register and checks the control word of every cycle of an
// operation against the step list: load, init, NITER x (check, iterate),
// final check, done. It covers both directions, accepted and refused steps,
// the forced refusal of iteration 0 for a negative X, and the
// start-to-done latency of 2*NITER + 2 clock edges.
module tb_exp_fsm;
  localparam int N = 25, CW = 5;
  logic clk = 0, rst_n = 0, start = 0, x_sign = 0;
  logic [CW-1:0] count;
  logic cc;
  logic en_xext, sel_cntrl, en_xint, preset_y, en_y, reset_count, en_count;
  logic reset_cc_reg, en_cc_reg, cc_cntrl, mux_cntrl, add_sub_cntrl1, add_sub_cntrl2;
  logic busy, done;
  logic trial;   // flag the test bench offers as cc_out
  int checks = 0, failures = 0;
  int n_accept = 0, n_refuse = 0;

  exp_fsm #(.NITER(N), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  // counter and Cc_reg models driven by the controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      cc    <= 1'b0;
    end else begin
      if (reset_count)   count <= '0;
      else if (en_count) count <= count + 1'b1;
      if (reset_cc_reg)   cc <= 1'b0;
      else if (en_cc_reg) cc <= trial;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got=%0b want=%0b at %0t", what, got, want, $time);
    end
  endtask

  task automatic run_op(logic neg);
    int   lat;
    logic acc;
    @(negedge clk);
    expect_bit("idle busy", busy, 1'b0);
    start  = 1'b1;
    x_sign = 1'b0;
    #1;
    expect_bit("load en_xext", en_xext, 1'b1);
    expect_bit("load reset_count", reset_count, 1'b1);
    @(posedge clk);
    lat = 0;
    #1;
    start  = 1'b0;
    @(negedge clk);
    // step 2
    expect_bit("init en_xint", en_xint, 1'b1);
    expect_bit("init sel", sel_cntrl, 1'b0);
    expect_bit("init preset_y", preset_y, 1'b1);
    expect_bit("init busy", busy, 1'b1);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      lat++;
      // step 4 with trial evaluation
      trial  = 1'($urandom);
      x_sign = (i == 0) ? neg : 1'($urandom);   // sign of X_int_reg
      #1;
      expect_bit("check count", count == CW'(i), 1'b1);
      expect_bit("check en_xint", en_xint, 1'b0);
      expect_bit("check en_y", en_y, 1'b0);
      expect_bit("check dir", cc_cntrl, x_sign);
      expect_bit("check mux", mux_cntrl, x_sign);
      if (x_sign && i == 0) begin
        expect_bit("check refuse i0", reset_cc_reg, 1'b1);
        acc = 1'b0;
      end else begin
        expect_bit("check en_cc", en_cc_reg, 1'b1);
        acc = trial;
      end
      @(negedge clk);
      lat++;
      // step 3
      if (acc) n_accept++; else n_refuse++;
      expect_bit("iter en_count", en_count, 1'b1);
      expect_bit("iter sel", sel_cntrl, 1'b1);
      expect_bit("iter en_xint", en_xint, acc);
      expect_bit("iter en_y", en_y, acc);
      expect_bit("iter mux", mux_cntrl, x_sign);
      expect_bit("iter addsub1", add_sub_cntrl1, x_sign);
      expect_bit("iter addsub2", add_sub_cntrl2, 1'b1);
      expect_bit("iter done", done, 1'b0);
    end
    @(negedge clk);
    lat++;
    expect_bit("final check", en_cc_reg | en_xint | done, 1'b0);
    @(negedge clk);
    lat++;
    expect_bit("done", done, 1'b1);
    checks++;
    if (lat != 2 * N + 2) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    @(negedge clk);
    expect_bit("after done", done, 1'b0);
    expect_bit("after busy", busy, 1'b0);
  endtask

  initial begin
    trial = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_op(1'b0);
    run_op(1'b1);
    run_op(1'b1);
    run_op(1'b0);
    checks++;
    if (n_accept == 0 || n_refuse == 0) begin
      failures++;
      $display("FAIL coverage accept=%0d refuse=%0d", n_accept, n_refuse);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
