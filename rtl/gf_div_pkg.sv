// gf_div_pkg: types shared by the cells of the digit-serial GF(2^m) divider.
//
// lane_t is one coefficient position of the working polynomials as it moves
// between rows of the array: one bit each of R, S, U, V, T, the field
// polynomial G and the one-hot count flag F. The divider streams L of these
// per clock (one digit).
//
// ctl_t is the control word one row produces for its Type-2 cells: the
// iteration's state (before update), Ctrl1 (swap, operation I), Ctrl2
// (r_m = 1, operation II), Ctrl3 (count reached zero, operation III) and
// t_{m-1} of the previous iteration, which steers the reduction of x*T mod G.
package gf_div_pkg;

  typedef struct packed {
    logic r;
    logic s;
    logic u;
    logic v;
    logic t;
    logic g;
    logic f;
  } lane_t;

  typedef struct packed {
    logic state;
    logic ctrl1;
    logic ctrl2;
    logic ctrl3;
    logic tm;
  } ctl_t;

endpackage
