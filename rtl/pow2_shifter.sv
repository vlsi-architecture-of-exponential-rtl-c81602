// Final scaling of the extended-range unit: out = 2^(+/-I) * e.
//
// e is the core result e^(+/-f ln2) cut to FW bits in 1.(FW-1) format
// (value in [0.5, 2)). It is first aligned to the OFRAC fraction bits of the
// output, then shifted left by shamt = I for a non-negative input (neg = 0)
// or right by I for a negative one (neg = 1). A left shift whose result does
// not fit in OW bits saturates to all ones; a right shift truncates, and
// underflows to zero for large I. Combinational.
//
// The shift by I follows the original architecture; the output format,
// the saturation and the truncation are this design's choices.
module pow2_shifter #(
  parameter int unsigned FW    = 16,
  parameter int unsigned SW    = 8,
  parameter int unsigned OW    = 24,
  parameter int unsigned OFRAC = 16
) (
  input  logic [FW-1:0] e,
  input  logic [SW-1:0] shamt,
  input  logic          neg,
  output logic [OW-1:0] out,
  output logic          saturated
);
  localparam int unsigned MW = FW + (OFRAC - (FW - 1)); // e with OFRAC fraction bits
  localparam int unsigned XW = MW + OW;                 // room for any shift that can fit

  logic [MW-1:0] m;
  logic [XW-1:0] wide;

  always_comb begin
    m         = {e, {(OFRAC - (FW - 1)){1'b0}}};
    wide      = '0;
    saturated = 1'b0;
    if (neg) begin
      wide = XW'(m) >> shamt;
      out  = wide[OW-1:0];
    end else if (int'(shamt) >= OW) begin
      saturated = (m != '0);
      out       = saturated ? '1 : '0;
    end else begin
      wide      = XW'(m) << shamt;
      saturated = (wide[XW-1:OW] != '0);
      out       = saturated ? '1 : wide[OW-1:0];
    end
  end
endmodule
