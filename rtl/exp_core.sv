// Iterative shift-and-add exponential unit: y = exp(x0).
//
// The unit drives X towards zero with the recurrence
//   x_{i+1} = x_i - ln(1 + s_i 2^-i),   y_{i+1} = y_i + s_i y_i 2^-i,
// starting from X = x0, Y = 1, for i = 0 .. NITER-1, so that the invariant
// y_i * exp(x_i) = exp(x0) gives Y -> exp(x0) as X -> 0. The sign of x_i
// gives the direction of the step (s = +1 for x_i >= 0, s = -1 for
// x_i < 0); the step is taken only when it makes |X| smaller, otherwise
// s_i = 0 and X and Y keep their values. The constants come from two
// registered ROMs, the Y * 2^-i term from a barrel shifter driven by the
// iteration counter; one adder/subtractor forms the trial X, the other
// the new Y, and the condition-code logic decides whether both are
// written back.
//
// Interface: x0 is signed 2.23 and is sampled on the clock edge where
// start = 1 and busy = 0. done is high for one cycle when y (unsigned
// 2.23, Y_reg) holds the result; y keeps it until the next start. The
// convergence range is -1.24 <= x0 <= 1.56, but Y_reg only holds values
// below 4, and Y can pass exp(x0) on the way, so x0 must stay below 1.38
// for y to be valid.
//
// Timing: done is high 2*NITER + 2 clock edges after the edge that samples
// start (52 at NITER = 25), whatever the input.
//
// Word widths, iteration count, the two ROMs, the counter-driven shifter,
// the two adder/subtractors and the condition-code register follow the
// original architecture. The magnitude-reducing step rule (with s_i = 0),
// the extra X input of the condition-code logic, the two-clock iteration
// and the start/busy/done handshake are this design's choices: a rule
// that always steps by the sign of x_i does not converge over the range.
module exp_core
  import exp_pkg::*;
#(
  parameter int unsigned W     = CORE_W,
  parameter int unsigned FRAC  = CORE_FRAC,
  parameter int unsigned N     = NITER,
  parameter int unsigned CW    = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x0,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] y
);
  localparam logic [W-1:0] ONE = W'(1) << FRAC;

  // controller outputs
  logic en_xext, sel_cntrl, en_xint, preset_y, en_y;
  logic reset_count, en_count, reset_cc_reg, en_cc_reg;
  logic cc_cntrl, mux_cntrl, add_sub_cntrl1, add_sub_cntrl2;
  logic cc;

  logic [CW-1:0] count, count_nx;
  logic [W-1:0]  x_ext_q, x_int_q, mux1_out, sub_out;
  logic [W-1:0]  rom1_out, rom2_out, mux_out;
  logic [W-1:0]  y_q, shifted_y, add_sub_out;

  exp_fsm #(.NITER(N), .CW(CW)) u_fsm (
    .clk, .rst_n, .start, .x_sign(x_int_q[W-1]), .cc, .count,
    .en_xext, .sel_cntrl, .en_xint, .preset_y, .en_y,
    .reset_count, .en_count, .reset_cc_reg, .en_cc_reg, .cc_cntrl,
    .mux_cntrl, .add_sub_cntrl1, .add_sub_cntrl2, .busy, .done
  );

  // X path
  data_reg #(.W(W)) u_xext_reg (
    .clk, .rst_n, .preset(1'b0), .en(en_xext), .d(x0), .q(x_ext_q)
  );

  mux2 #(.W(W)) u_mux1 (
    .sel(sel_cntrl), .in0(x_ext_q), .in1(sub_out), .out(mux1_out)
  );

  data_reg #(.W(W)) u_xint_reg (
    .clk, .rst_n, .preset(1'b0), .en(en_xint), .d(mux1_out), .q(x_int_q)
  );

  iter_counter #(.W(CW)) u_counter (
    .clk, .rst_n, .clr(reset_count), .en(en_count), .count, .count_nx
  );

  // The ROMs sample the counter's next value, so rom*_out = ROM[count].

  ln_rom #(.W(W), .FRAC(FRAC), .DEPTH(N), .AW(CW), .NEG(1'b0)) u_rom1 (
    .clk, .addr(count_nx), .data(rom1_out)
  );

  ln_rom #(.W(W), .FRAC(FRAC), .DEPTH(N), .AW(CW), .NEG(1'b1)) u_rom2 (
    .clk, .addr(count_nx), .data(rom2_out)
  );

  mux2 #(.W(W)) u_mux2 (
    .sel(mux_cntrl), .in0(rom1_out), .in1(rom2_out), .out(mux_out)
  );

  add_sub #(.W(W)) u_add_sub2 (
    .a(x_int_q), .b(mux_out), .sub(add_sub_cntrl2), .y(sub_out)
  );

  cc_logic #(.W(W)) u_cc (
    .clk, .rst_n, .clr(reset_cc_reg), .en(en_cc_reg), .dir(cc_cntrl),
    .x(x_int_q), .trial(sub_out), .cc_out(), .cc
  );

  // Y path
  barrel_shifter #(.W(W), .SW(CW)) u_shifter (
    .din(y_q), .shamt(count), .dout(shifted_y)
  );

  add_sub #(.W(W)) u_add_sub1 (
    .a(y_q), .b(shifted_y), .sub(add_sub_cntrl1), .y(add_sub_out)
  );

  data_reg #(.W(W), .PRESET(ONE)) u_y_reg (
    .clk, .rst_n, .preset(preset_y), .en(en_y), .d(add_sub_out), .q(y_q)
  );

  assign y = y_q;

  // Iterations must never run past the end of the ROMs.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    en_count |-> (int'(count) < N));
endmodule
