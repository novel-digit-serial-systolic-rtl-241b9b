// gf_div_bench: stimulus and checker for the digit-serial GF(2^m) divider.
//
// Drives a stream of words into a divider (A, B and G as m/L digits, most
// significant first, with the control sequence 0 1 1 ... 1 on ct) and checks
// every quotient that comes out. The expected quotient is computed without
// the division algorithm: B^-1 = B^(2^m - 2) by square-and-multiply, then
// C = A * B^-1 mod G; the bench also checks C * B = A. It checks that each
// quotient starts 4m/L cycles after its operands, so its last digit leaves
// 5m/L - 1 cycles after the first operand digit entered, and that quotients
// leave back to back, one every m/L cycles.
//
// Every few words a bubble (a word of don't-care data that is not checked)
// is inserted. The bench also replays the algorithm's iterations in software
// to count how often each operation of the algorithm occurred: the swap (I),
// the addition in state 1 (II), the count returning to zero (III), and how
// many different field polynomials were used; each must occur at least once.
module gf_div_bench #(
  parameter int unsigned M      = 6,
  parameter int unsigned L      = 3,
  parameter int unsigned NWORDS = 60
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ct_in,
  output logic [L-1:0] a_in,
  output logic [L-1:0] b_in,
  output logic [L-1:0] g_in,
  input  logic         ct_out,
  input  logic [L-1:0] c_out,
  output logic         done,
  output int           checks,
  output int           failures
);
  localparam longint ND = M / L;
  localparam longint LAT0 = 4 * M / L;      // first quotient digit
  localparam longint LAT = 5 * M / L - 1;   // last quotient digit
  typedef logic [M-1:0] poly_t;

  // irreducible polynomials (x^m term omitted) for the sizes exercised
  function automatic poly_t pick_g(int unsigned idx);
    logic [63:0] g;
    case (M)
      4:  case (idx % 3) 0: g = 'h3; 1: g = 'h9; default: g = 'hf; endcase
      6:  case (idx % 6) 0: g = 'h03; 1: g = 'h21; 2: g = 'h27;
                         3: g = 'h2d; 4: g = 'h33; default: g = 'h1b; endcase
      8:  case (idx % 2) 0: g = 'h1d; default: g = 'h1b; endcase
      12: case (idx % 2) 0: g = 'h053; default: g = 'h009; endcase
      default: g = 'h3;
    endcase
    return g[M-1:0];
  endfunction

  function automatic poly_t gf_mul(poly_t a, poly_t b, poly_t g);
    poly_t r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = r[M-1] ? ((r << 1) ^ g) : (r << 1);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic poly_t gf_div_ref(poly_t a, poly_t b, poly_t g);
    poly_t inv = poly_t'(1);
    poly_t base = b;
    // B^(2^m - 2) = product of B^(2^i), i = 1 .. m-1
    for (int i = 1; i < M; i++) begin
      base = gf_mul(base, base, g);
      inv  = gf_mul(inv, base, g);
    end
    return gf_mul(a, inv, g);
  endfunction

  int n_op1, n_op2, n_op3, n_bubble, n_gpoly;

  // software replay of the iterations, only to count the operations
  task automatic count_ops(poly_t a, poly_t b, poly_t g);
    logic [M:0] r, s, t, u, v, tmp;
    int cnt;
    logic state;
    r = {1'b0, b}; s = {1'b1, g}; u = {1'b0, a}; v = '0; t = '0;
    state = 1'b0; cnt = 0;
    for (int i = 0; i < 2 * M; i++) begin
      r = r << 1;
      t = t[M-1] ? ((t << 1) ^ {1'b1, g}) : (t << 1);
      if (!state) begin
        cnt++;
        if (r[M]) begin tmp = r; r ^= s; s = tmp; t = u; state = 1'b1; n_op1++; end
      end else begin
        cnt--;
        if (r[M]) begin r ^= s; t ^= u; n_op2++; end
      end
      if (cnt == 0) begin v ^= t; tmp = u; u = v; v = tmp; state = 1'b0; n_op3++; end
    end
  endtask

  typedef struct {
    poly_t a, b, c;
    logic  check;
    longint t_in;
  } word_t;

  word_t  q[$];
  longint cyc;
  logic   started_out;
  longint last_out;
  int     n_words_out;

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // stimulus, driven on the falling edge
  initial begin
    poly_t a, b, g;
    word_t w;
    int    seen_g [int];
    ct_in = 1'b1; a_in = '0; b_in = '0; g_in = '0;
    n_op1 = 0; n_op2 = 0; n_op3 = 0; n_bubble = 0;
    @(negedge rst_n);
    @(posedge rst_n);
    repeat (3) @(negedge clk);
    for (int unsigned n = 0; n < NWORDS; n++) begin
      g = pick_g(n);
      a = poly_t'({$urandom, $urandom});
      b = poly_t'({$urandom, $urandom});
      if (n % 7 == 1) a = poly_t'(1);          // an inverse
      if (n % 11 == 2) b = poly_t'(1);         // trivial divisor
      if (b == '0) b = poly_t'(1) << (n % M);
      w.check = (n % 9 != 4);                  // every ninth word a bubble
      if (!w.check) n_bubble++;
      else begin
        count_ops(a, b, g);
        seen_g[int'(g)] = 1;
      end
      w.a = a; w.b = b; w.c = gf_div_ref(a, b, g);
      w.t_in = cyc;                            // cycle in which digit 0 is presented
      q.push_back(w);
      for (int d = 0; d < int'(ND); d++) begin
        ct_in = (d != 0);
        a_in = a[M-1-d*L -: L];
        b_in = b[M-1-d*L -: L];
        g_in = g[M-1-d*L -: L];
        @(negedge clk);
      end
    end
    n_gpoly = seen_g.num();
    // keep the control sequence running with don't-care data
    forever begin
      for (int d = 0; d < int'(ND); d++) begin
        ct_in = (d != 0);
        a_in = L'($urandom); b_in = L'($urandom); g_in = L'($urandom);
        @(negedge clk);
      end
    end
  end

  // checker
  initial begin
    word_t w;
    poly_t c;
    checks = 0; failures = 0; done = 1'b0; started_out = 1'b0; n_words_out = 0;
    @(negedge rst_n);
    @(posedge rst_n);
    while (n_words_out < NWORDS) begin
      @(posedge clk);
      #1;
      if (!ct_out) begin
        if (q.size() == 0) begin
          failures++;
          $display("ERROR: quotient with no word in flight at cycle %0d", cyc);
          continue;
        end
        w = q.pop_front();
        // start of the quotient: 4m/L cycles after its operands
        checks++;
        if (cyc - w.t_in != LAT0) begin
          failures++;
          $display("ERROR: word %0d starts after %0d cycles, expected %0d",
                   n_words_out, cyc - w.t_in, LAT0);
        end
        checks++;
        if (started_out && cyc - last_out != ND) begin
          failures++;
          $display("ERROR: quotients %0d cycles apart, expected %0d", cyc - last_out, ND);
        end
        started_out = 1'b1;
        last_out = cyc;
        c = '0;
        for (int d = 0; d < int'(ND); d++) begin
          if (d > 0) begin
            @(posedge clk);
            #1;
            checks++;
            if (!ct_out) begin
              failures++;
              $display("ERROR: ct_out low inside a word");
            end
          end
          c[M-1-d*L -: L] = c_out;
        end
        // last digit leaves 5m/L - 1 cycles after the first operand digit
        checks++;
        if (cyc - w.t_in != LAT) begin
          failures++;
          $display("ERROR: latency %0d, expected %0d", cyc - w.t_in, LAT);
        end
        if (w.check) begin
          checks += 2;
          if (c != w.c) begin
            failures++;
            $display("ERROR: word %0d A=%h B=%h: C=%h expected %h",
                     n_words_out, w.a, w.b, c, w.c);
          end
          if (gf_mul(c, w.b, pick_g(n_words_out)) != w.a) begin
            failures++;
            $display("ERROR: word %0d: C*B != A", n_words_out);
          end
        end
        n_words_out++;
      end
    end
    // every operation of the algorithm and every stimulus feature occurred
    $display("M=%0d L=%0d words=%0d swaps(I)=%0d adds-in-state1(II)=%0d count-zero(III)=%0d bubbles=%0d field-polys=%0d",
             M, L, NWORDS, n_op1, n_op2, n_op3, n_bubble, n_gpoly);
    checks += 5;
    if (n_op1 == 0) failures++;
    if (n_op2 == 0) failures++;
    if (n_op3 == 0) failures++;
    if (n_bubble == 0) failures++;
    if (n_gpoly < 2) failures++;
    done = 1'b1;
  end
endmodule
