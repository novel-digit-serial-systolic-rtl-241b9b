// tb_gf_type2_cell: exhaustive test of the coefficient cell.
//
// Every combination of the 13 inputs that the row controller can produce
// (Ctrl1 set exactly when Ctrl2 is set in state 0) is applied. The expected bit is
// worked out step by step from the algorithm: multiply R and T by x (taking
// bit j-1, with T reduced by G when t_{m-1} is set), apply (I) or (II), then
// (III), and move the count flag towards column m-count.
module tb_gf_type2_cell;
  logic rd, td, fd, fu, s, u, v, g, state, ctrl1, ctrl2, ctrl3, tm;
  logic r_o, s_o, u_o, v_o, t_o, g_o, f_o;
  int   checks = 0, failures = 0;

  gf_type2_cell dut (.*);

  initial begin
    logic er, es, eu, ev, et, ef, tmp;
    for (int i = 0; i < (1 << 13); i++) begin
      {rd, td, fd, fu, s, u, v, g, state, ctrl1, ctrl2, ctrl3, tm} = 13'(i);
      if (ctrl1 != (!state && ctrl2)) continue;
      #1;
      // R = x*R, T = x*T mod G
      er = rd;
      et = td ^ (tm & g);
      es = s; eu = u; ev = v;
      if (state == 1'b0 && ctrl2) begin       // (I) and (II) in state 0
        tmp = er; er = er ^ es; es = tmp; et = eu;
      end else if (state == 1'b1 && ctrl2) begin  // (II) in state 1
        er = er ^ es; et = et ^ eu;
      end
      if (ctrl3) begin                       // (III): V = T + V; U <-> V
        ev = et ^ ev; tmp = eu; eu = ev; ev = tmp;
      end
      ef = state ? fd : fu;                  // count - 1 : count + 1
      checks++;
      if ({r_o, s_o, u_o, v_o, t_o, g_o, f_o} != {er, es, eu, ev, et, g, ef}) begin
        failures++;
        $display("ERROR: inputs %013b: got %b%b%b%b%b%b%b expected %b%b%b%b%b%b%b", i,
                 r_o, s_o, u_o, v_o, t_o, g_o, f_o, er, es, eu, ev, et, g, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
