// End-to-end test of the extended-range exponential unit at its default
// sizes. Inputs cover the whole 8.16 range -128 .. 128 with extra weight
// on -12 .. 6, where results are neither saturated nor zero, plus special
// points. Each result is compared with exp(x) computed in real arithmetic
// and cut to 8.16; results above 255.99998 must saturate to all ones. The
// test also checks the fixed latency, that start_exp is ignored while the
// unit is busy, and counts how often each mechanism of the design was
// used: left shift (x > 0), two's complement and right shift (x < 0),
// negative operands of the core, refused core iterations, saturation and
// underflow to zero. A mechanism that never occurs counts as a failure.
module tb_exp_extended;
  localparam int  N       = 25;
  localparam int  LATENCY = 2 * N + 6;
  localparam int  NRAND   = 1500;

  logic        clk = 0, rst_n = 0, start_exp = 0;
  logic [23:0] x, exp_extended_out;
  logic        busy, done;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_core_neg = 0, n_refused = 0;
  int n_sat = 0, n_zero = 0, n_ignored = 0;
  real max_rel = 0.0;

  exp_extended dut (.clk, .rst_n, .start_exp, .x, .busy, .done, .exp_extended_out);

  always #5 clk = ~clk;

  // refused iterations of the core: a step evaluated but not written
  always @(posedge clk)
    if (rst_n && dut.u_exp.u_fsm.en_count && !dut.u_exp.u_fsm.en_xint) n_refused++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [23:0] xq, bit poke_start);
    real xr, want, got, tol, rel;
    int  lat;
    longint wq;
    xr = real'($signed(xq)) / 65536.0;
    @(negedge clk);
    x = xq;
    start_exp = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start_exp = 1'b0;
    x = 24'($urandom);
    while (!done) begin
      if (poke_start && lat == 10) begin
        start_exp = 1'b1;          // must be ignored: the unit is busy
        n_ignored++;
      end else begin
        start_exp = 1'b0;
      end
      @(negedge clk);
      lat++;
    end
    start_exp = 1'b0;
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL latency %0d for x=%f", lat, xr);
    end
    if (xr > 0.0) n_pos++;
    if (xr < 0.0) n_neg++;
    if (xr < 0.0 && $signed(dut.exp_inp_q) < 0) n_core_neg++;
    want = $exp(xr);
    got  = real'(exp_extended_out) / 65536.0;
    checks++;
    if (want >= 256.0) begin
      // within rounding of the saturation point either answer is right
      if (exp_extended_out == 24'hffffff) n_sat++;
      else if (want < 256.0 * 1.001) ;
      else begin
        failures++;
        $display("FAIL x=%f expected saturation, got %f", xr, got);
      end
    end else begin
      wq  = longint'($floor(want * 65536.0));
      tol = want * 65536.0 * (1.0e-4 + 1.0e-5 * (xr < 0.0 ? -xr : xr)) + 2.0;
      if (wq == 0 && exp_extended_out == 0) n_zero++;
      if (real'(exp_extended_out) > real'(wq) + tol || real'(exp_extended_out) < real'(wq) - tol) begin
        failures++;
        $display("FAIL x=%f got=%f want=%f", xr, got, want);
      end
      if (want > 0.5) begin
        rel = (got - want) / want;
        if (rel < 0.0) rel = -rel;
        if (rel > max_rel) max_rel = rel;
      end
    end
  endtask

  function automatic logic [23:0] q(real v);
    return 24'(longint'($floor(v * 65536.0)));
  endfunction

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // special points
    run(q(0.0), 1'b0);
    run(q(1.0), 1'b1);
    run(q(-1.0), 1'b0);
    run(q(0.693147), 1'b0);
    run(q(-2.0 * 0.693147), 1'b0);
    run(q(5.5), 1'b0);
    run(q(5.6), 1'b0);
    run(q(-10.0), 1'b0);
    run(q(-20.0), 1'b0);
    run(24'h800000, 1'b0);      // -128
    run(24'h7fffff, 1'b1);      // 127.99998
    run(24'hffffff, 1'b0);      // -2^-16
    for (int n = 0; n < NRAND; n++) begin
      if (n % 4 == 0) run(24'($urandom), n % 50 == 0);
      else            run(q(-12.0 + 18.0 * real'($urandom % 1000000) / 1000000.0), 1'b0);
    end
    $display("uses: pos=%0d neg=%0d core_neg=%0d refused=%0d sat=%0d zero=%0d ignored_start=%0d",
             n_pos, n_neg, n_core_neg, n_refused, n_sat, n_zero, n_ignored);
    $display("max relative error (results > 0.5): %e", max_rel);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_core_neg == 0 || n_refused == 0 ||
        n_sat == 0 || n_zero == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
