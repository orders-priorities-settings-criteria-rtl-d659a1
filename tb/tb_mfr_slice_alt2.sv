// tb_mfr_slice_alt2 - exhaustive test of one bit slice with priority
// count > shift > load (pe_n=0). All 2048 combinations of the five
// commands and six data inputs are applied; the expected D is worked out
// from the truth table of that order, by a priority if-chain in the
// testbench rather than from the multiplexer structure.
module tb_mfr_slice_alt2;
  import mfr_pkg::*;
  mfr_cmd_t cmd;
  logic q, q_prev, q_next, d, phi, psi, d_next, exp_d;
  int checks = 0, failures = 0;

  mfr_slice_alt2 dut (.cmd(cmd), .q(q), .q_prev(q_prev), .q_next(q_next),
                      .d(d), .phi(phi), .psi(psi), .d_next(d_next));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected(mfr_cmd_t c, logic qi, logic qp, logic qn,
                                    logic di, logic ph, logic ps);
    logic shifted = c.l_rn ? qp : qn;
    // counting toggles the bit when all lower bits are 1 (up) or 0 (down)
    logic counted = c.u_dn ? (ps ? ~qi : qi) : (ph ? ~qi : qi);
    if (c.ce)        return counted;
    else if (c.sh)   return shifted;
    else if (!c.pe_n) return di;
    else             return qi;
  endfunction

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {cmd, q, q_prev, q_next, d, phi, psi} = 11'(v);
      #1;
      exp_d = expected(cmd, q, q_prev, q_next, d, phi, psi);
      checks++;
      if (d_next !== exp_d) begin
        failures++;
        $display("FAIL cmd=%b q=%b qp=%b qn=%b d=%b phi=%b psi=%b: D=%b expected %b",
                 cmd, q, q_prev, q_next, d, phi, psi, d_next, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
