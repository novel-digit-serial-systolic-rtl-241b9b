// tb_gf_ds_divider_sizes: the divider at other field and digit sizes.
//
// Runs gf_ds_divider side by side at (m, L) = (4, 2), (6, 2), (6, 6),
// (8, 2), (8, 4), (12, 3) and (12, 4), each with its own gf_div_bench, so
// that digit sizes from 2 to m and words of 1 to 6 digits are covered. Each
// bench checks values, latency and rate as in the default-size test.
module tb_gf_ds_divider_sizes;
  localparam int NCFG = 7;
  localparam int unsigned CM [NCFG] = '{4, 6, 6, 8, 8, 12, 12};
  localparam int unsigned CL [NCFG] = '{2, 2, 6, 2, 4, 3, 4};

  logic clk = 1'b0;
  logic rst_n;
  logic [NCFG-1:0] done;
  int   chk [NCFG];
  int   fail [NCFG];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int unsigned M = CM[i];
    localparam int unsigned L = CL[i];
    logic         ct_in, ct_out;
    logic [L-1:0] a_in, b_in, g_in, c_out;

    gf_ds_divider #(.M(M), .L(L)) dut (
      .clk(clk), .rst_n(rst_n), .ct_in(ct_in), .a_in(a_in), .b_in(b_in),
      .g_in(g_in), .ct_out(ct_out), .c_out(c_out)
    );

    gf_div_bench #(.M(M), .L(L), .NWORDS(120)) bench (
      .clk(clk), .rst_n(rst_n), .ct_in(ct_in), .a_in(a_in), .b_in(b_in),
      .g_in(g_in), .ct_out(ct_out), .c_out(c_out), .done(done[i]),
      .checks(chk[i]), .failures(fail[i])
    );
  end

  function automatic int total(int v [NCFG]);
    int s = 0;
    foreach (v[i]) s += v[i];
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
    repeat (120 * 12 + 1000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end
endmodule
