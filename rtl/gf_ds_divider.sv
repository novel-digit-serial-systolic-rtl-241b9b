// gf_ds_divider: digit-serial systolic divider for GF(2^m), C = A / B mod G.
//
// The divider runs the 2m iterations of a Euclid-type algorithm (R = B, S = G,
// U = A, V = T = 0; each iteration multiplies R and T by x, conditionally swaps
// and adds, and folds T into V when a degree counter returns to zero) on a
// linear chain of 2m/L identical cells, each doing L iterations on L-bit
// digits. Data flows one way only, from cell to cell, so the array is
// regular and can be lengthened or re-pipelined freely.
//
// Interface. A word is m/L digits, most significant digit first, one per
// clock, with ct_in = 0 on its first digit and 1 on the others (the control
// sequence 0 1 1 ... 1). Bit L-1 of a digit is its highest coefficient, so
// digit d holds coefficients m-1-d*L down to m-L-d*L. Words may follow each
// other back to back. G is the field polynomial without its x^m term; it must
// be irreducible and B must be nonzero.
//
// Timing. Each cell adds two cycles, so digit d of the quotient appears on
// c_out 4m/L + d cycles after digit 0 of A, B and G was presented, with
// ct_out = 0 on its first digit: the last digit leaves 5m/L - 1 cycles after
// the first one entered, and one quotient is produced every m/L cycles.
//
// The algorithm, the cell count, the input format and the rate and latency
// follow the document. The polarity of the digit bits, the reset and the
// protocol assertion are this design's own.
module gf_ds_divider
  import gf_div_pkg::*;
#(
  parameter int unsigned M = 6,   // field degree m
  parameter int unsigned L = 3    // digit size
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ct_in,     // 0 on the first digit of a word
  input  logic [L-1:0] a_in,      // digit of the dividend A(x)
  input  logic [L-1:0] b_in,      // digit of the divisor B(x)
  input  logic [L-1:0] g_in,      // digit of G(x) (x^m term implied)
  output logic         ct_out,    // 0 on the first digit of a quotient
  output logic [L-1:0] c_out      // digit of the quotient C(x)
);
  localparam int unsigned NCELL = 2 * M / L;
  localparam int unsigned ND    = M / L;   // digits per word

  lane_t [L-1:0] d   [NCELL+1];
  logic          ct  [NCELL+1];
  logic          st  [NCELL+1];
  logic          cz  [NCELL+1];

  // Initial values of the algorithm: R = B, S = G, U = A, V = T = 0,
  // state = 0, count = 0 (C-zero = 1, no flag in columns 0..m-1).
  always_comb begin
    for (int p = 0; p < L; p++) begin
      d[0][p] = '{r: b_in[L-1-p], s: g_in[L-1-p], u: a_in[L-1-p], v: 1'b0,
                  t: 1'b0, g: g_in[L-1-p], f: 1'b0};
    end
  end
  assign ct[0] = ct_in;
  assign st[0] = 1'b0;
  assign cz[0] = 1'b1;

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    gf_ds_cell #(.L(L)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .ct_in (ct[i]),
      .st_in (st[i]),
      .cz_in (cz[i]),
      .d_in  (d[i]),
      .ct_out(ct[i+1]),
      .st_out(st[i+1]),
      .cz_out(cz[i+1]),
      .d_out (d[i+1])
    );
  end

  always_comb begin
    for (int p = 0; p < L; p++) c_out[L-1-p] = d[NCELL][p].v;
  end
  assign ct_out = ct[NCELL];

  // Protocol check: ct_in follows the period-m/L sequence 0 1 1 ... 1 once it
  // has started. The check is active from the first reset on: started is
  // cleared by it and set by the first ct_in = 0.
  int unsigned phase;
  logic        started;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 0;
      started <= 1'b0;
    end else if (!ct_in) begin
      phase   <= (ND > 1) ? 1 : 0;
      started <= 1'b1;
    end else begin
      phase   <= (phase + 1 == ND) ? 0 : phase + 1;
    end
  end

  a_ct_period : assert property (@(posedge clk)
                                 started |-> ((phase == 0) == !ct_in))
    else $error("gf_ds_divider: ct_in must be 0 exactly once every m/L cycles");

  initial begin
    assert (M % L == 0) else $error("gf_ds_divider: L must divide M");
  end
endmodule
