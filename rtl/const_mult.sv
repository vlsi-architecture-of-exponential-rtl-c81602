// Multiplication by a fixed constant (Multiplier1 and Multiplier2).
//
// p = a * C, with C an unsigned constant of CW bits. a is read as signed
// two's complement when A_SIGNED is 1 and as unsigned otherwise; p has
// AW + CW bits and is exact. Combinational; a synthesis tool maps it to a
// hard multiplier or to shift-and-add logic.
//
// The two multipliers and their widths follow the original
// architecture; the constant values and formats are this design's.
module const_mult #(
  parameter int unsigned  AW       = 24,
  parameter int unsigned  CW       = 18,
  parameter logic [CW-1:0] C       = '1,
  parameter bit           A_SIGNED = 1'b1
) (
  input  logic [AW-1:0]    a,
  output logic [AW+CW-1:0] p
);
  logic signed [AW:0]      a_ext;
  logic signed [CW:0]      c_ext;
  logic signed [AW+CW+1:0] full;

  always_comb begin
    a_ext = A_SIGNED ? $signed({a[AW-1], a}) : $signed({1'b0, a});
    c_ext = $signed({1'b0, C});
    full  = a_ext * c_ext;
    p     = full[AW+CW-1:0];
  end
endmodule
