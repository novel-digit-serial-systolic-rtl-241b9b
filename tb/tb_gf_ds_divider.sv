// tb_gf_ds_divider: end-to-end test of the divider at its default size
// (m = 6, L = 3: four cells, words of two 3-bit digits).
//
// Streams words back to back through gf_ds_divider with default parameters
// and checks every quotient, its latency (5m/L - 1 cycles from first operand
// digit to last quotient digit) and the rate of one quotient every m/L
// cycles, using gf_div_bench. A watchdog ends the run as a failure if the
// quotients stop coming.
module tb_gf_ds_divider;
  localparam int unsigned M = 6;   // the divider's defaults
  localparam int unsigned L = 3;
  localparam int unsigned NWORDS = 200;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         ct_in, ct_out, done;
  logic [L-1:0] a_in, b_in, g_in, c_out;
  int           checks, failures;

  always #5 clk = ~clk;

  gf_ds_divider dut (
    .clk(clk), .rst_n(rst_n), .ct_in(ct_in), .a_in(a_in), .b_in(b_in),
    .g_in(g_in), .ct_out(ct_out), .c_out(c_out)
  );

  gf_div_bench #(.M(M), .L(L), .NWORDS(NWORDS)) bench (
    .clk(clk), .rst_n(rst_n), .ct_in(ct_in), .a_in(a_in), .b_in(b_in),
    .g_in(g_in), .ct_out(ct_out), .c_out(c_out), .done(done),
    .checks(checks), .failures(failures)
  );

  // reset: a falling edge at 1 ns, released after three cycles
  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * M / L + 1000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
