// gf_ds_cell: digit-serial processing element of the GF(2^m) divider.
//
// One cell performs L consecutive iterations (L rows) of the Euclid-type
// division algorithm on words that arrive as m/L digits of L coefficient
// lanes, most significant digit first, one digit per clock. The cell holds L
// row controllers (gf_type3_cell) and L*L coefficient cells (gf_type2_cell),
// the document's count for this cell.
//
// Schedule. Row k works a diagonal slice of the word: in the cycle of digit
// d, its lane p handles coefficient j = m + k - d*L - p. Because every row
// shifts R and T up by one position, a row's lane p needs bit j-1 of the row
// above from the same lane (same cycle), bits j from lane p-1 and the count
// flag of bit j+1 from lane p-2; lanes 0 and 1 take these from registered
// copies of lanes L-2 and L-1 of the previous cycle. In the cycle with Ct = 0
// (first digit of a word) lanes p > k start the new word while lanes p <= k
// still finish the old one, so those take their controls from the row
// controller's holding register, and lane k of each row has its shifted
// inputs r, t and f forced to zero (the 3L AND gates of the document). The
// count flag of column m-1 reads the row controller's C-zero instead of a
// lane; the choice is made by one multiplexer per row.
//
// Interface. d_in carries digit d of a word with ct_in = 0 at d = 0 and
// st_in / cz_in (state and C-zero of the iteration before the cell) valid in
// that cycle. Lane p of digit d is coefficient m-1-d*L-p. The outputs have
// the same format and are two cycles later: one register stage plus the
// one-digit skew that L shifted rows build up. ct_out, st_out and cz_out are
// the matching values for the next cell.
//
// The partition, the schedule, the control-holding rows, the 3L zero gates
// and the per-row multiplexers follow the document; the exact register
// placement and the one-hot count encoding are this design's own.
module gf_ds_cell
  import gf_div_pkg::*;
#(
  parameter int unsigned L = 3    // digit size (L >= 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ct_in,
  input  logic            st_in,
  input  logic            cz_in,
  input  lane_t [L-1:0]   d_in,
  output logic            ct_out,
  output logic            st_out,
  output logic            cz_out,
  output lane_t [L-1:0]   d_out
);
  logic ct_d1, ct_d2, st_d1, st_d2, cz_d1, cz_d2;

  // Each row keeps its own signals inside its generate scope, so the chain of
  // rows is a plain feed-forward path: row k reads only row k-1.
  for (genvar k = 0; k < L; k++) begin : g_row
    lane_t a [L];           // input of this row (output of the row above)
    lane_t o [L];           // output of this row
    lane_t prev [2];        // previous-cycle copies of a[L-2] and a[L-1]
    ctl_t  ctl_now, ctl_held;
    logic  st_a;            // state entering this row
    logic  st_o;            // state leaving this row
    logic  cz_above_now;    // C-zero of the row above, current word
    logic  cz_above_held;   // C-zero of the row above, held from its Ct = 0 cycle

    if (k == 0) begin : g_top
      for (genvar p = 0; p < L; p++) begin : g_in
        assign a[p] = d_in[p];
      end
      assign st_a          = st_in;
      assign cz_above_now  = cz_in;
      assign cz_above_held = 1'b0;   // never selected in row 0
    end else begin : g_inner
      assign a             = g_row[k-1].o;
      assign st_a          = g_row[k-1].st_o;
      assign cz_above_now  = g_row[k-1].ctl_now.ctrl3;
      assign cz_above_held = g_row[k-1].ctl_held.ctrl3;
    end

    gf_type3_cell u_ctl (
      .clk       (clk),
      .rst_n     (rst_n),
      .ct        (ct_in),
      .state     (st_a),
      .rm        (a[k].r),
      .tm        (a[k].t),
      .fm1       (a[k].f),
      .ctl_now   (ctl_now),
      .ctl_held  (ctl_held),
      .state_next(st_o)
    );

    for (genvar p = 0; p < L; p++) begin : g_lane
      ctl_t  c;
      logic  vs, vu, vv, vg;  // bit j of the row above
      logic  rd, td, fd;      // bit j-1 of the row above
      logic  fu;              // count flag of bit j+1 of the row above
      logic  fu_lane;

      always_comb begin
        // lanes p > k start the new word in the Ct = 0 cycle
        c = (!ct_in && p > k) ? ctl_now : ctl_held;

        if (p >= 1) begin
          vs = a[(p >= 1) ? p-1 : 0].s;
          vu = a[(p >= 1) ? p-1 : 0].u;
          vv = a[(p >= 1) ? p-1 : 0].v;
          vg = a[(p >= 1) ? p-1 : 0].g;
        end else begin
          vs = prev[1].s;
          vu = prev[1].u;
          vv = prev[1].v;
          vg = prev[1].g;
        end

        if (p == k) begin
          rd = a[p].r & ct_in;
          td = a[p].t & ct_in;
          fd = a[p].f & ct_in;
        end else begin
          rd = a[p].r;
          td = a[p].t;
          fd = a[p].f;
        end

        fu_lane = (p >= 2) ? a[(p >= 2) ? p-2 : 0].f : prev[(p < 2) ? p : 0].f;
        if (p == k + 1 && !ct_in)
          fu = cz_above_now;          // column m-1, word starting now
        else if (p == 0 && k == L - 1 && !ct_d1)
          fu = cz_above_held;         // column m-1, word started last cycle
        else
          fu = fu_lane;
      end

      gf_type2_cell u_bit (
        .rd   (rd),
        .td   (td),
        .fd   (fd),
        .fu   (fu),
        .s    (vs),
        .u    (vu),
        .v    (vv),
        .g    (vg),
        .state(c.state),
        .ctrl1(c.ctrl1),
        .ctrl2(c.ctrl2),
        .ctrl3(c.ctrl3),
        .tm   (c.tm),
        .r_o  (o[p].r),
        .s_o  (o[p].s),
        .u_o  (o[p].u),
        .v_o  (o[p].v),
        .t_o  (o[p].t),
        .g_o  (o[p].g),
        .f_o  (o[p].f)
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        prev[0] <= '0;
        prev[1] <= '0;
      end else begin
        prev[0] <= a[L-2];
        prev[1] <= a[L-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_d1 <= 1'b1;
      ct_d2 <= 1'b1;
      st_d1 <= 1'b0;
      st_d2 <= 1'b0;
      cz_d1 <= 1'b0;
      cz_d2 <= 1'b0;
      d_out <= '0;
    end else begin
      ct_d1 <= ct_in;
      ct_d2 <= ct_d1;
      st_d1 <= g_row[L-1].st_o;
      st_d2 <= st_d1;
      cz_d1 <= g_row[L-1].ctl_now.ctrl3;
      cz_d2 <= cz_d1;
      for (int p = 0; p < L; p++) d_out[p] <= g_row[L-1].o[p];
    end
  end

  assign ct_out = ct_d2;
  assign st_out = st_d2;
  assign cz_out = cz_d2;

  initial begin
    assert (L >= 2) else $error("gf_ds_cell: digit size L must be at least 2");
  end
endmodule
