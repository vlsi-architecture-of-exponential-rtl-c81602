// Synchronous look-up table of the core's per-iteration constants.
//
// With NEG = 0 (ROM1) entry i is ln(1 + 2^-i); with NEG = 1 (ROM2) it is
// ln(1 - 2^-i). Values are signed fixed point with FRAC fraction bits,
// rounded to nearest. ln(1 - 2^0) does not exist, so ROM2 entry 0 holds 0;
// the controller never accepts that step.
// The contents are computed at elaboration time from these formulas, not
// read from a file. The read is registered: data is valid one clock after
// addr is presented.
//
// Table sizes follow the original architecture; the rounding and the
// elaboration-time computation are this design's.
module ln_rom #(
  parameter int unsigned W     = 25,
  parameter int unsigned FRAC  = 23,
  parameter int unsigned DEPTH = 25,
  parameter int unsigned AW    = 5,
  parameter bit          NEG   = 1'b0
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);
  typedef logic [W-1:0] table_t [DEPTH];

  function automatic logic [W-1:0] to_fixed(real v);
    real    scaled;
    longint q;
    scaled = v * (2.0 ** FRAC);
    if (scaled >= 0.0) q = longint'($floor(scaled + 0.5));
    else               q = -longint'($floor(-scaled + 0.5));
    return W'(q);
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      if (NEG && i == 0) t[i] = '0;
      else if (NEG)      t[i] = to_fixed($ln(1.0 - 2.0 ** (-i)));
      else               t[i] = to_fixed($ln(1.0 + 2.0 ** (-i)));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    if (int'(addr) < DEPTH) data <= TABLE[addr];
    else                    data <= '0;
  end
endmodule
