// gf_type3_cell: row controller of the digit-serial cell (one per row).
//
// A Type-1 cell plus a four-bit holding register for state, Ctrl2, Ctrl3 and
// t_{m-1}. In the digit-serial cell one row of the division array is spread
// over m/L+1 clock cycles, but its Type-1 cell only sees r_m in the first
// cycle of a word (Ct = 0). The controls computed then are offered directly on
// ctl_now and loaded into the register at the end of that cycle; for the rest
// of the word (Ct = 1) the register holds them, and they are offered on
// ctl_held. Ctrl1 is rebuilt from the held state and Ctrl2, so only four bits
// are stored, as in the document.
//
// In the Ct = 0 cycle ctl_held still holds the previous word's controls, which
// the lanes still finishing that word need; the cell chooses per lane.
//
// Timing: ctl_now and state_next are combinational from the inputs;
// ctl_held changes one clock after a cycle with Ct = 0. Reset clears it.
module gf_type3_cell
  import gf_div_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ct,          // control sequence 0 1 1 ... 1, 0 at a word's first digit
  input  logic state,       // state of this row's iteration
  input  logic rm,          // r_m
  input  logic tm,          // t_{m-1} of the previous row
  input  logic fm1,         // count flag of column m-1, previous row
  output ctl_t ctl_now,     // controls of the word starting this cycle
  output ctl_t ctl_held,    // controls of the word loaded at the last Ct = 0
  output logic state_next
);
  logic c1, c2, c3;
  logic h_state, h_ctrl2, h_ctrl3, h_tm;

  gf_type1_cell u_t1 (
    .state     (state),
    .rm        (rm),
    .fm1       (fm1),
    .ctrl1     (c1),
    .ctrl2     (c2),
    .ctrl3     (c3),
    .state_next(state_next)
  );

  always_comb begin
    ctl_now = '{state: state, ctrl1: c1, ctrl2: c2, ctrl3: c3, tm: tm};
    ctl_held = '{state: h_state, ctrl1: ~h_state & h_ctrl2, ctrl2: h_ctrl2,
                 ctrl3: h_ctrl3, tm: h_tm};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_state <= 1'b0;
      h_ctrl2 <= 1'b0;
      h_ctrl3 <= 1'b0;
      h_tm    <= 1'b0;
    end else if (!ct) begin
      h_state <= state;
      h_ctrl2 <= c2;
      h_ctrl3 <= c3;
      h_tm    <= tm;
    end
  end
endmodule
