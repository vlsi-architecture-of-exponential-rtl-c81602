// Logarithmic barrel shifter: logical right shift by 0 .. 2^SW-1.
//
// Built as SW stages of 2:1 multiplexers; stage k shifts by 2^k when bit k
// of shamt is set. Zeros enter from the top. In the core it forms
// Y_reg * 2^-i from Y_reg and the iteration counter. Combinational.
//
// The original architecture asks for a barrel shifter made of
// multiplexers; the logarithmic staging is this design's.
module barrel_shifter #(
  parameter int unsigned W  = 25,
  parameter int unsigned SW = 5
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] shamt,
  output logic [W-1:0]  dout
);
  logic [W-1:0] stage [SW+1];

  assign stage[0] = din;

  for (genvar k = 0; k < SW; k++) begin : g_stage
    if ((1 << k) >= W) begin : g_all
      assign stage[k+1] = shamt[k] ? '0 : stage[k];
    end else begin : g_part
      assign stage[k+1] = shamt[k] ? {{(1 << k){1'b0}}, stage[k][W-1:(1 << k)]} : stage[k];
    end
  end

  assign dout = stage[SW];
endmodule
