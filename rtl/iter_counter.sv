// Iteration counter of the core.
//
// Gives the iteration index i, used as the ROM address and as the shift
// amount of the barrel shifter. clr (synchronous) returns it to 0, en
// advances it by one; rst_n is an asynchronous active-low reset. count_nx
// is the value the counter takes at the next clock edge: the registered
// ROMs sample it so that their output always belongs to the current count.
// The controller stops the count at NITER; the counter itself wraps at 2^W.
//
// The count_nx output and the clear-over-enable priority are this
// design's additions to the counter of the original architecture.
module iter_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count,
  output logic [W-1:0] count_nx
);
  always_comb begin
    if (clr)     count_nx = '0;
    else if (en) count_nx = count + 1'b1;
    else         count_nx = count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count_nx;
  end
endmodule
