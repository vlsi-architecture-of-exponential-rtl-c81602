// Two's complement adder/subtractor (Add/Sub1 and Add/Sub2 of the core).
//
// y = a + b when sub = 0, y = a - b when sub = 1, modulo 2^W. The
// subtraction is done as a + ~b + 1 so one adder serves both operations.
// Combinational.
//
// Width and use follow the original architecture; the single-adder form
// is this design's.
module add_sub #(
  parameter int unsigned W = 25
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);
  logic [W-1:0] b_eff;
  always_comb begin
    b_eff = sub ? ~b : b;
    y     = a + b_eff + W'(sub);
  end
endmodule
