// tb_gf_type3_cell: test of the row controller and its holding register.
//
// Random cycles of ct, state, r_m, t_{m-1} and the column m-1 flag are
// applied. ctl_now must follow the control equations in every cycle;
// ctl_held must show the controls of the most recent cycle with ct = 0
// (Ctrl1 rebuilt from the held state and Ctrl2) and must not change while
// ct = 1.
module tb_gf_type3_cell;
  import gf_div_pkg::*;
  logic clk = 1'b0, rst_n;
  logic ct, state, rm, tm, fm1, state_next;
  ctl_t ctl_now, ctl_held;
  ctl_t exp_held, exp_now;
  int   checks = 0, failures = 0;
  int   n_load = 0, n_hold = 0;

  always #5 clk = ~clk;

  gf_type3_cell dut (.*);

  function automatic ctl_t ref_ctl(logic st, logic r, logic t, logic f);
    ctl_t c;
    c.state = st;
    c.ctrl1 = !st && r;
    c.ctrl2 = r;
    c.ctrl3 = st && f;
    c.tm    = t;
    return c;
  endfunction

  initial begin
    // reset: a falling edge at 1 ns, released after two cycles
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    ct = 1'b1; state = 1'b0; rm = 1'b0; tm = 1'b0; fm1 = 1'b0;
    exp_held = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ct = ($urandom % 3) != 0;
      {state, rm, tm, fm1} = 4'($urandom);
      #1;
      exp_now = ref_ctl(state, rm, tm, fm1);
      checks += 3;
      if (ctl_now != exp_now) begin
        failures++;
        $display("ERROR: ctl_now %b expected %b", ctl_now, exp_now);
      end
      if (state_next != (state ? !(fm1) : rm)) begin
        failures++;
        $display("ERROR: state_next wrong");
      end
      if (ctl_held != exp_held) begin
        failures++;
        $display("ERROR: ctl_held %b expected %b", ctl_held, exp_held);
      end
      @(posedge clk);
      if (!ct) begin exp_held = exp_now; n_load++; end
      else n_hold++;
    end
    checks++;
    if (n_load == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
