// tb_mfr_timing - worst-case clock period of a discrete 74LS build of the
// register, measured on the gate-level timing model for both priority
// orders at 4 and 5 bits.
//
// Expected minimum periods (t_su + t_cq + ANDs*20 + 30 + muxes*15 ns):
//   4 bits (3 AND gates): 210 ns load-first order, 180 ns count-first order
//   5 bits (4 AND gates): 230 ns load-first order, 200 ns count-first order
// The 5-bit figures are the ones for a 4-gate carry chain, 230 ns against
// 200 ns, a 13 % shorter period with identical hardware. Each probe checks
// its own measurement against mfr_pkg::min_period_ns; this testbench also
// checks the four numbers against the constants above and the saving.
module tb_mfr_timing;
  import mfr_pkg::*;

  logic        done [4];
  int unsigned c [4], f [4], up [4], dn [4];
  int checks = 0, failures = 0;

  mfr_ttl_probe #(.P(4), .ORDER(ORDER_PE_SH_CE)) p0 (.done(done[0]), .checks(c[0]), .failures(f[0]), .measured_up_ns(up[0]), .measured_dn_ns(dn[0]));
  mfr_ttl_probe #(.P(4), .ORDER(ORDER_CE_SH_PE)) p1 (.done(done[1]), .checks(c[1]), .failures(f[1]), .measured_up_ns(up[1]), .measured_dn_ns(dn[1]));
  mfr_ttl_probe #(.P(5), .ORDER(ORDER_PE_SH_CE)) p2 (.done(done[2]), .checks(c[2]), .failures(f[2]), .measured_up_ns(up[2]), .measured_dn_ns(dn[2]));
  mfr_ttl_probe #(.P(5), .ORDER(ORDER_CE_SH_PE)) p3 (.done(done[3]), .checks(c[3]), .failures(f[3]), .measured_up_ns(up[3]), .measured_dn_ns(dn[3]));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned EXP [4] = '{210, 180, 230, 200};

  initial begin
    #1;  // let every probe clear its done flag first
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int k = 0; k < 4; k++) begin
      checks += c[k];
      failures += f[k];
      $display("probe %0d: minimum period count-up %0d ns, count-down %0d ns", k, up[k], dn[k]);
      checks += 2;
      if (up[k] != EXP[k] || dn[k] != EXP[k]) begin
        failures++;
        $display("FAIL probe %0d expected %0d ns", k, EXP[k]);
      end
    end
    // saving of the count-first order with a 4-gate carry chain: 30/230 = 13 %
    checks++;
    if ((up[2] - up[3]) * 100 / up[2] != 13) begin
      failures++;
      $display("FAIL saving %0d %%", (up[2] - up[3]) * 100 / up[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
