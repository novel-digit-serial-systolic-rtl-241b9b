// tb_gf_type1_cell: exhaustive test of the row control cell.
//
// All eight combinations of state, r_m and the column m-1 count flag are
// applied; the expected controls come from the division algorithm's own
// rules: in state 0 a set r_m swaps (Ctrl1) and enters state 1, in state 1
// the count falls and returns to zero when the flag was in column m-1, which
// triggers operation III and returns to state 0.
module tb_gf_type1_cell;
  logic state, rm, fm1, ctrl1, ctrl2, ctrl3, state_next;
  int   checks = 0, failures = 0;

  gf_type1_cell dut (.*);

  initial begin
    logic e1, e2, e3, en;
    for (int i = 0; i < 8; i++) begin
      {state, rm, fm1} = 3'(i);
      #1;
      if (!state) begin
        e1 = rm; e2 = rm; e3 = 1'b0; en = rm;
      end else begin
        e1 = 1'b0; e2 = rm; e3 = fm1; en = !fm1;
      end
      checks++;
      if ({ctrl1, ctrl2, ctrl3, state_next} != {e1, e2, e3, en}) begin
        failures++;
        $display("ERROR: state=%b rm=%b fm1=%b -> %b%b%b%b expected %b%b%b%b", state, rm,
                 fm1, ctrl1, ctrl2, ctrl3, state_next, e1, e2, e3, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
