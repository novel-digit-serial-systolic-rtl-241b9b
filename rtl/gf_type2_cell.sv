// gf_type2_cell: one coefficient position j of one iteration of the division
// array. Purely combinational.
//
// It computes bit j of the iteration
//   R = x*R; T = x*T mod G
//   Ctrl1: S = R, R = R + S, T = U                  (I)/(II), state 0
//   Ctrl2 & ~Ctrl1: R = R + S, T = T + U            (II),     state 1
//   Ctrl3: V = T + V, then U <-> V                  (III)
// and moves the one-hot count flag: towards the MSB side (f_j = f_{j-1}) when
// the count decrements (state 1), towards the LSB side (f_j = f_{j+1}) when it
// increments (state 0). The flag sits at column m-count, so "inc" and "dec"
// are the two inputs of the flag multiplexer.
//
// Inputs come from the previous row: rd/td/fd are bit j-1 (the x* shift),
// s/u/v/g are bit j, fu is the flag of bit j+1. Outputs are bit j of this row.
// The operations follow the document; the gate-level arrangement is this
// design's own.
module gf_type2_cell (
  input  logic rd,     // r_{j-1}
  input  logic td,     // t_{j-1}
  input  logic fd,     // f_{j-1}
  input  logic fu,     // f_{j+1}
  input  logic s,
  input  logic u,
  input  logic v,
  input  logic g,
  input  logic state,
  input  logic ctrl1,
  input  logic ctrl2,
  input  logic ctrl3,
  input  logic tm,     // t_{m-1} of the previous row (reduction by G)
  output logic r_o,
  output logic s_o,
  output logic u_o,
  output logic v_o,
  output logic t_o,
  output logic g_o,
  output logic f_o
);
  logic xt;  // bit j of x*T mod G
  logic tn;  // bit j of T after (I)/(II)

  always_comb begin
    xt  = td ^ (tm & g);
    r_o = ctrl2 ? (rd ^ s) : rd;
    s_o = ctrl1 ? rd : s;
    if (ctrl1)      tn = u;
    else if (ctrl2) tn = xt ^ u;
    else            tn = xt;
    t_o = tn;
    u_o = ctrl3 ? (tn ^ v) : u;
    v_o = ctrl3 ? u : v;
    g_o = g;
    f_o = state ? fd : fu;
  end
endmodule
