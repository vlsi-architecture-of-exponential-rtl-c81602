// Self-checking test of exp_core: random inputs over the usable range
// -1.24 <= x0 < 1.38 plus the end points and zero, compared with exp()
// computed in real arithmetic. Also checks the start-to-done latency of
// 2*NITER + 2 clock edges and that results stay in place until the next start.
module tb_exp_core;
  localparam int W = 25, FRAC = 23, N = 25;
  localparam real TOL = 16.0 / (2.0 ** FRAC);
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] x0, y;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;
  real max_err = 0.0;

  exp_core dut (.clk, .rst_n, .start, .x0, .busy, .done, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real xv);
    logic [W-1:0] xq;
    real xr, want, got, err;
    int  lat;
    xq = W'(longint'($floor(xv * (2.0 ** FRAC))));
    xr = real'($signed(xq)) / (2.0 ** FRAC);
    @(negedge clk);
    x0 = xq;
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    x0 = W'($urandom);   // input is only sampled on start
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    want = $exp(xr);
    got  = real'(y) / (2.0 ** FRAC);
    err  = got - want;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
    if (xr < 0.0) n_neg++; else n_pos++;
    checks += 2;
    if (err > TOL) begin
      failures++;
      $display("FAIL x0=%f y=%f exp=%f err=%e", xr, got, want, err);
    end
    if (lat != 2 * N + 2) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (real'(y) / (2.0 ** FRAC) != got) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0.0);
    run(-1.24);
    run(1.379);
    run(1.0);
    run(-1.0);
    run(0.693147);
    run(-0.693147);
    for (int n = 0; n < 300; n++) run(-1.24 + 2.619 * real'($urandom % 100000) / 100000.0);
    checks++;
    if (n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL coverage neg=%0d pos=%0d", n_neg, n_pos);
    end
    $display("max abs error %e", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
