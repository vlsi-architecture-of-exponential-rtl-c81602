// Extended-range exponential unit: exp(x) for -128 <= x < 128.
//
// The iterative core converges only for -1.24 <= x <= 1.56. This wrapper
// uses e^x = 2^(x/ln2): it multiplies |x| by 1/ln2, splits the product
// into an 8-bit integer I and a 16-bit fraction f, lets the core compute
// e^(f ln2) (or e^(-f ln2) for negative x), and scales the result by 2^I
// (or 2^-I) with a shifter.
//
// Datapath, one register per stage:
//   X_ext_reg   <- x                               (on start_exp)
//   Mult1_out    = X_ext_reg * 1/ln2               (10.32, 42 bits)
//   Mux_out      = x < 0 ? -Mult1_out : Mult1_out  (magnitude)
//   Integer_part <- Mux_out[39:32]                 (I, 8 bits)
//   X_frac_reg  <- +/- Mux_out[31:16] * ln2        (2.23, core input)
//   Fraction_part <- core result in 1.15           (16 bits)
//   Exp_extended_out <- 2^(+/-I) * Fraction_part   (unsigned 8.16)
// The sign of the core input follows the sign of x, so that a negative x
// gives 2^-I * e^(-f ln2) = e^x; the result saturates to all ones above
// 255.99998 (x > about 5.545) and underflows to 0 for very negative x.
//
// Interface: x is signed 8.16, sampled on the clock edge where
// start_exp = 1 and busy = 0. done is high for one cycle when
// exp_extended_out holds the result, which stays until the next start.
// Latency: done is high 2*NITER + 6 clock edges after the edge that
// samples start_exp (56 at NITER = 25); start_exp is ignored while busy.
// The sequencer here is this design's own; only the datapath blocks and
// their widths come from the architecture it implements.
module exp_extended
  import exp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_exp,
  input  logic [EXT_W-1:0] x,
  output logic             busy,
  output logic             done,
  output logic [EXT_W-1:0] exp_extended_out
);
  typedef enum logic [2:0] {
    S_IDLE, S_SPLIT, S_EXP, S_WAIT, S_SHIFT, S_DONE
  } state_t;

  state_t state, state_nx;

  logic en_xext, en_split, core_start, en_fracp, en_out;

  logic [EXT_W-1:0]   x_ext_q;
  logic [MULT1_W-1:0] mult1_out, comp_out, mux_out;
  logic [INT_W-1:0]   int_q;
  logic [EXT_FRAC-1:0] frac_f;
  logic [MULT2_W-1:0] mult2_out;
  logic [CORE_W-1:0]  frac_mag, exp_inp_d, exp_inp_q, exp_out;
  logic               neg_q;
  logic               core_busy, core_done;
  logic [FRACP_W-1:0] fracp_q;
  logic [EXT_W-1:0]   shift_out;
  logic               saturated;

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx   = state;
    en_xext    = 1'b0;
    en_split   = 1'b0;
    core_start = 1'b0;
    en_fracp   = 1'b0;
    en_out     = 1'b0;
    busy       = 1'b1;
    done       = 1'b0;
    unique case (state)
      S_IDLE: begin
        busy = 1'b0;
        if (start_exp) begin
          en_xext  = 1'b1;
          state_nx = S_SPLIT;
        end
      end
      S_SPLIT: begin
        en_split = 1'b1;
        state_nx = S_EXP;
      end
      S_EXP: begin
        core_start = 1'b1;
        state_nx   = S_WAIT;
      end
      S_WAIT: begin
        if (core_done) begin
          en_fracp = 1'b1;
          state_nx = S_SHIFT;
        end
      end
      S_SHIFT: begin
        en_out   = 1'b1;
        state_nx = S_DONE;
      end
      S_DONE: begin
        done     = 1'b1;
        state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end

  // ---------------- integer / fraction separation ----------------
  data_reg #(.W(EXT_W)) u_x_ext_reg (
    .clk, .rst_n, .preset(1'b0), .en(en_xext), .d(x), .q(x_ext_q)
  );

  const_mult #(.AW(EXT_W), .CW(INV_LN2_W), .C(INV_LN2), .A_SIGNED(1'b1)) u_mult1 (
    .a(x_ext_q), .p(mult1_out)
  );

  twos_complement #(.W(MULT1_W)) u_twos (
    .a(mult1_out), .y(comp_out)
  );

  mux2 #(.W(MULT1_W)) u_sign_mux (
    .sel(x_ext_q[EXT_W-1]), .in0(mult1_out), .in1(comp_out), .out(mux_out)
  );

  data_reg #(.W(INT_W)) u_integer_part (
    .clk, .rst_n, .preset(1'b0), .en(en_split),
    .d(mux_out[MULT1_FRAC +: INT_W]), .q(int_q)
  );

  data_reg #(.W(1)) u_sign_reg (
    .clk, .rst_n, .preset(1'b0), .en(en_split),
    .d(x_ext_q[EXT_W-1]), .q(neg_q)
  );

  assign frac_f = mux_out[MULT1_FRAC-EXT_FRAC +: EXT_FRAC];

  const_mult #(.AW(EXT_FRAC), .CW(LN2_W), .C(LN2), .A_SIGNED(1'b0)) u_mult2 (
    .a(frac_f), .p(mult2_out)
  );

  // f*ln2 < 1: two zero integer bits, top 23 fraction bits of the product
  always_comb begin
    frac_mag  = {2'b00, mult2_out[MULT2_W-1 -: CORE_FRAC]};
    exp_inp_d = x_ext_q[EXT_W-1] ? (~frac_mag + CORE_W'(1)) : frac_mag;
  end

  data_reg #(.W(CORE_W)) u_x_frac_reg (
    .clk, .rst_n, .preset(1'b0), .en(en_split), .d(exp_inp_d), .q(exp_inp_q)
  );

  // ---------------- exponential of the fraction ----------------
  exp_core u_exp (
    .clk, .rst_n, .start(core_start), .x0(exp_inp_q),
    .busy(core_busy), .done(core_done), .y(exp_out)
  );

  // e^(+/-f ln2) lies in [0.5, 2): bit 24 of the 2.23 result is zero
  data_reg #(.W(FRACP_W)) u_fraction_part (
    .clk, .rst_n, .preset(1'b0), .en(en_fracp),
    .d(exp_out[CORE_FRAC -: FRACP_W]), .q(fracp_q)
  );

  // ---------------- scaling by 2^(+/-I) ----------------
  pow2_shifter #(.FW(FRACP_W), .SW(INT_W), .OW(EXT_W), .OFRAC(EXT_FRAC)) u_shifter (
    .e(fracp_q), .shamt(int_q), .neg(neg_q), .out(shift_out), .saturated
  );

  data_reg #(.W(EXT_W)) u_out_reg (
    .clk, .rst_n, .preset(1'b0), .en(en_out), .d(shift_out), .q(exp_extended_out)
  );

  // The core is started only when it is idle.
  a_core_idle: assert property (@(posedge clk) disable iff (!rst_n)
    core_start |-> !core_busy);
endmodule
