// Condition-code logic and register (Cclogic and Cc_reg).
//
// Cclogic decides whether the trial step of the current iteration is
// taken. x is the current X_int_reg value x_i, trial the subtractor output
// x_i - ln(1 + s 2^-i), with s = +1 for x_i >= 0 and s = -1 for x_i < 0
// (dir = cc_cntrl = sign of x_i). The step is accepted only when it brings
// X closer to zero, |trial| < |x_i|. Because the step always points towards
// zero, that is the case exactly when x_i + trial keeps the sign of x_i and
// is not zero, so one extra adder of W+1 bits decides it. Cc_reg keeps the
// flag for the controller: clr (reset_cc_reg) forces it to 0 (step
// refused), en (en_cc_reg) loads cc_out; rst_n is an asynchronous
// active-low reset to 0.
//
// Timing: cc_out is combinational, cc follows one clock later. Only the
// names Cclogic and Cc_reg and their place after the X subtractor come
// from the original architecture; the acceptance test is this design's.
module cc_logic #(
  parameter int unsigned W = 25
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         dir,
  input  logic [W-1:0] x,
  input  logic [W-1:0] trial,
  output logic         cc_out,
  output logic         cc
);
  logic signed [W:0] sum;

  always_comb begin
    sum = $signed({x[W-1], x}) + $signed({trial[W-1], trial});
    if (dir) cc_out = sum[W];
    else     cc_out = !sum[W] && (sum != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cc <= 1'b0;
    else if (clr) cc <= 1'b0;
    else if (en)  cc <= cc_out;
  end
endmodule
