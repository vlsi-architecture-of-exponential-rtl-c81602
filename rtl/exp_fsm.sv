// Controller of the iterative exponential core.
//
// One state per step of the algorithm:
//   S_IDLE  (step 1) wait for start; on start load X_ext_reg, clear the
//                    counter and the condition code
//   S_INIT  (step 2) X_int_reg <= X_ext_reg, Y_reg <= 1.0
//   S_CHECK (step 4) if i = NITER go to S_DONE; otherwise register in
//                    Cc_reg whether the trial step X - ROM(i) is accepted
//   S_ITER  (step 3) if accepted: X <= X - ROM(i), Y <= Y +/- Y*2^-i;
//                    always i <= i + 1
//   S_DONE  (step 5) result in Y_reg, done = 1 for one cycle, back to idle
// The sign of the current X (x_sign, from X_int_reg) selects ROM1 and
// addition of Y*2^-i for X >= 0 (s_i in {0, +1}), ROM2 and subtraction for
// X < 0 (s_i in {-1, 0}). For a negative X iteration 0 is always
// refused (ln(1 - 2^0) does not exist), which keeps the operation length
// fixed. Each iteration takes two clocks (S_CHECK then S_ITER). done is high 2*NITER + 2 clock edges after
// the edge that samples start (52 for NITER = 25). The five steps and the
// control signal names are those of the original controller; the trial in
// step 4, the state encoding and the handshake are this design's.
module exp_fsm #(
  parameter int unsigned NITER = 25,
  parameter int unsigned CW    = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          x_sign,         // sign bit of X_int_reg
  input  logic          cc,             // Cc_reg: trial step accepted
  input  logic [CW-1:0] count,
  output logic          en_xext,
  output logic          sel_cntrl,      // Mux1: 0 = X_ext_reg, 1 = sub_out
  output logic          en_xint,
  output logic          preset_y,
  output logic          en_y,
  output logic          reset_count,
  output logic          en_count,
  output logic          reset_cc_reg,
  output logic          en_cc_reg,
  output logic          cc_cntrl,       // direction: 1 = negative X
  output logic          mux_cntrl,      // Mux2: 0 = ROM1, 1 = ROM2
  output logic          add_sub_cntrl1, // Add/Sub1: 1 = subtract
  output logic          add_sub_cntrl2, // Add/Sub2: 1 = subtract
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_CHECK, S_ITER, S_DONE
  } state_t;

  state_t state, state_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx       = state;
    en_xext        = 1'b0;
    sel_cntrl      = 1'b0;
    en_xint        = 1'b0;
    preset_y       = 1'b0;
    en_y           = 1'b0;
    reset_count    = 1'b0;
    en_count       = 1'b0;
    reset_cc_reg   = 1'b0;
    en_cc_reg      = 1'b0;
    cc_cntrl       = x_sign;
    mux_cntrl      = x_sign;
    add_sub_cntrl1 = x_sign;
    add_sub_cntrl2 = 1'b1;
    busy           = 1'b1;
    done           = 1'b0;
    unique case (state)
      S_IDLE: begin
        busy = 1'b0;
        if (start) begin
          en_xext      = 1'b1;
          reset_count  = 1'b1;
          reset_cc_reg = 1'b1;
          state_nx     = S_INIT;
        end
      end
      S_INIT: begin
        sel_cntrl = 1'b0;
        en_xint   = 1'b1;
        preset_y  = 1'b1;
        state_nx  = S_CHECK;
      end
      S_CHECK: begin
        if (int'(count) >= NITER) begin
          state_nx = S_DONE;
        end else begin
          if (x_sign && count == '0) reset_cc_reg = 1'b1;
          else                      en_cc_reg    = 1'b1;
          state_nx = S_ITER;
        end
      end
      S_ITER: begin
        sel_cntrl = 1'b1;
        en_xint   = cc;
        en_y      = cc;
        en_count  = 1'b1;
        state_nx  = S_CHECK;
      end
      S_DONE: begin
        done     = 1'b1;
        state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end
endmodule
