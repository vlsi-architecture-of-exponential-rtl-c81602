// Two's complement negation: y = -a modulo 2^W (invert and add one).
//
// In the extended-range path it turns the negative product x * (1/ln2)
// into its magnitude before the integer and fraction fields are cut out.
// Combinational.
//
// As in the original architecture.
module twos_complement #(
  parameter int unsigned W = 42
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  always_comb y = ~a + W'(1);
endmodule
