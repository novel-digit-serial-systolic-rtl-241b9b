// gf_type1_cell: control cell of one iteration (one row) of the division array.
//
// Purely combinational. It sees r_m, the coefficient of x^m of x*R (bit m-1 of
// R from the previous row), the current state, and the count flag of column
// m-1 from the previous row. The count is kept as a one-hot flag across the
// columns at position m-count; this cell owns column m, so its flag is
// C-zero (count = 0). In state 0 the count grows, which moves the flag away
// from column m, so C-zero is 0; in state 1 it shrinks, so the flag at
// column m-1 moves into column m.
//
//   Ctrl1  = (state == 0) & (r_m == 1)      operation (I): swap R and S, T = U
//   Ctrl2  = (r_m == 1)                     operation (II): R += S (and T += U)
//   Ctrl3  = C-zero                         operation (III): V += T, U <-> V
//   state' = ~state if (r_m & state == 0) or (C-zero & state == 1), else state
//
// The equations are the document's; the flag encoding of the count is this
// design's own reading of the Inc/Dec multiplexer it describes.
module gf_type1_cell (
  input  logic state,      // state of this iteration (before update)
  input  logic rm,         // r_m: bit m of x*R
  input  logic fm1,        // count flag at column m-1 from the previous row
  output logic ctrl1,
  output logic ctrl2,
  output logic ctrl3,      // C-zero: count == 0 after this iteration
  output logic state_next
);
  logic czero;

  always_comb begin
    czero      = state & fm1;
    ctrl1      = ~state & rm;
    ctrl2      = rm;
    ctrl3      = czero;
    state_next = state ^ ((~state & rm) | (state & czero));
  end
endmodule
