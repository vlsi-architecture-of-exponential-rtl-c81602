// 2:1 multiplexer.
//
// Used as Mux1 (selects the external operand or the subtractor result for
// X_int_reg), Mux2 (selects ROM1 or ROM2) and the sign mux of the
// extended-range path. Purely combinational: out = sel ? in1 : in0.
//
// A plain 2:1 multiplexer as in the original architecture.
module mux2 #(
  parameter int unsigned W = 25
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
