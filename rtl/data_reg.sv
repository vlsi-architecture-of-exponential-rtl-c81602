// Data register with load enable and synchronous preset.
//
// Holds operands, intermediate results and outputs (X_ext_reg, X_int_reg,
// Y_reg, Integer_part, X_frac_reg, Fraction_part). preset loads the
// constant PRESET and has priority over en, which loads d. rst_n is an
// asynchronous active-low reset to zero.
//
// The preset/enable priority and the reset value are this design's
// choices.
module data_reg #(
  parameter int unsigned W      = 25,
  parameter logic [W-1:0] PRESET = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         preset,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (preset) q <= PRESET;
    else if (en)     q <= d;
  end
endmodule
