// tb_gf_ds_cell: test of one digit-serial cell (L = 3) on its own.
//
// A single cell must perform L iterations of the division algorithm on every
// word that streams through it. The test feeds words of m = 6 (two digits)
// and m = 12 (four digits) to two cells, back to back, each word holding a
// random but legal algorithm state: R, S (with its implied x^m term), U, V,
// T, G, the state bit and the count, which enters as the one-hot flag at
// column m-count plus C-zero. The expected output state is the same word
// after L iterations of the algorithm run in software; output digits must
// appear exactly two cycles after the matching input digits, with ct_out,
// st_out and cz_out marking the word.
module tb_gf_ds_cell;
  import gf_div_pkg::*;
  localparam int unsigned L = 3;    // the cell's default digit size
  localparam int NCFG = 2;
  localparam int unsigned CM [NCFG] = '{6, 12};
  localparam int unsigned NWORDS = 300;

  logic clk = 1'b0, rst_n;
  int   chk [NCFG];
  int   fail [NCFG];
  logic [NCFG-1:0] done;

  always #5 clk = ~clk;

  for (genvar ci = 0; ci < NCFG; ci++) begin : g_cfg
    localparam int unsigned M  = CM[ci];
    localparam int unsigned ND = M / L;

    typedef struct {
      logic [M-1:0] r, s, u, v, t, g;
      logic         state;
      int           count;
    } wst_t;

    logic          ct_in, st_in, cz_in, ct_out, st_out, cz_out;
    lane_t [L-1:0] d_in, d_out;
    wst_t          exp_q[$];
    longint        tin_q[$];
    longint        cyc;
    int            n_swap, n_zero, n_add1;

    gf_ds_cell dut (.*);

    always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

    // L iterations of the algorithm on a word state
    function automatic wst_t iterate(wst_t w, ref int ns, ref int nz, ref int na);
      logic [M:0] r, s, t, u, v, tmp;
      r = {1'b0, w.r}; s = {1'b1, w.s}; t = {1'b0, w.t}; u = {1'b0, w.u}; v = {1'b0, w.v};
      for (int i = 0; i < L; i++) begin
        r = r << 1;
        t = t[M-1] ? ((t << 1) ^ {1'b1, w.g}) : (t << 1);
        if (!w.state) begin
          w.count++;
          if (r[M]) begin tmp = r; r ^= s; s = tmp; t = u; w.state = 1'b1; ns++; end
        end else begin
          w.count--;
          if (r[M]) begin r ^= s; t ^= u; na++; end
        end
        if (w.count == 0) begin v ^= t; tmp = u; u = v; v = tmp; w.state = 1'b0; nz++; end
      end
      w.r = r[M-1:0]; w.s = s[M-1:0]; w.t = t[M-1:0]; w.u = u[M-1:0]; w.v = v[M-1:0];
      return w;
    endfunction

    function automatic logic [M-1:0] flags(int count);
      logic [M-1:0] f = '0;
      if (count > 0) f[M-count] = 1'b1;
      return f;
    endfunction

    // stimulus
    initial begin
      wst_t w;
      logic [M-1:0] f;
      ct_in = 1'b1; st_in = 1'b0; cz_in = 1'b0; d_in = '0;
      n_swap = 0; n_zero = 0; n_add1 = 0;
      @(negedge rst_n);
      @(posedge rst_n);
      repeat (2) @(negedge clk);
      for (int n = 0; n < NWORDS; n++) begin
        w.r = M'({$urandom, $urandom}); w.s = M'({$urandom, $urandom});
        w.u = M'({$urandom, $urandom}); w.v = M'({$urandom, $urandom});
        w.t = M'({$urandom, $urandom}); w.g = M'({$urandom, $urandom});
        w.state = 1'($urandom);
        // legal counts: state 0 may grow by L, state 1 has count >= 1
        if (w.state) w.count = 1 + ($urandom % M);
        else         w.count = (n % 4 == 0) ? 0 : ($urandom % (M - L + 1));
        if (n % 5 == 0) begin w.state = 1'b1; w.count = 1 + (n % L); end
        f = flags(w.count);
        exp_q.push_back(iterate(w, n_swap, n_zero, n_add1));
        tin_q.push_back(cyc);
        for (int d = 0; d < int'(ND); d++) begin
          ct_in = (d != 0);
          st_in = (d == 0) ? w.state : 1'($urandom);
          cz_in = (d == 0) ? (w.count == 0) : 1'($urandom);
          for (int p = 0; p < int'(L); p++) begin
            int j;
            j = M - 1 - d * L - p;
            d_in[p] = '{r: w.r[j], s: w.s[j], u: w.u[j], v: w.v[j], t: w.t[j],
                        g: w.g[j], f: f[j]};
          end
          @(negedge clk);
        end
      end
      forever begin
        for (int d = 0; d < int'(ND); d++) begin
          ct_in = (d != 0);
          d_in = (L * 7)'({$urandom, $urandom});
          @(negedge clk);
        end
      end
    end

    // checker
    initial begin
      wst_t e;
      longint t0;
      logic [M-1:0] r, s, u, v, t, g, f;
      chk[ci] = 0; fail[ci] = 0; done[ci] = 1'b0;
      @(negedge rst_n);
      @(posedge rst_n);
      for (int n = 0; n < NWORDS; n++) begin
        do begin @(posedge clk); #1; end while (ct_out);
        e = exp_q.pop_front();
        t0 = tin_q.pop_front();
        chk[ci] += 3;
        if (cyc - t0 != 2) begin
          fail[ci]++;
          $display("ERROR: m=%0d word %0d delayed %0d cycles, expected 2", M, n, cyc - t0);
        end
        if (st_out != e.state || cz_out != (e.count == 0)) begin
          fail[ci]++;
          $display("ERROR: m=%0d word %0d state/C-zero %b%b expected %b%b", M, n,
                   st_out, cz_out, e.state, e.count == 0);
        end
        for (int d = 0; d < int'(ND); d++) begin
          if (d > 0) begin @(posedge clk); #1; end
          for (int p = 0; p < int'(L); p++) begin
            int j;
            j = M - 1 - d * L - p;
            {r[j], s[j], u[j], v[j], t[j], g[j], f[j]} =
              {d_out[p].r, d_out[p].s, d_out[p].u, d_out[p].v, d_out[p].t, d_out[p].g, d_out[p].f};
          end
        end
        if ({r, s, u, v, t, g, f} != {e.r, e.s, e.u, e.v, e.t, e.g, flags(e.count)}) begin
          fail[ci]++;
          $display("ERROR: m=%0d word %0d: got r%h s%h u%h v%h t%h f%h, expected r%h s%h u%h v%h t%h f%h",
                   M, n, r, s, u, v, t, f, e.r, e.s, e.u, e.v, e.t, flags(e.count));
        end
      end
      $display("m=%0d: swaps=%0d adds-in-state1=%0d count-zero=%0d", M, n_swap, n_add1, n_zero);
      chk[ci]++;
      if (n_swap == 0 || n_zero == 0 || n_add1 == 0) fail[ci]++;
      done[ci] = 1'b1;
    end
  end

  function automatic int total(int x [NCFG]);
    int s = 0;
    foreach (x[i]) s += x[i];
    return s;
  endfunction

  // reset: a falling edge at 1 ns, released after three cycles
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end

  initial begin
    repeat (NWORDS * 4 + 500) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end
endmodule
