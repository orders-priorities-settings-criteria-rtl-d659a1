// mfr_ttl_probe - drives one gate-level timing model (mfr_ttl) through the
// clock-period measurement and reports its own checks.
//
// 1. Load 0 1..1 0 and clock once in count-up mode with a long period.
//    Bit 0 rises, so the up-count AND chain switches on one gate after the
//    other up to the top bit, whose D input is the last to settle. Record
//    when the last flip-flop D input settles after the edge. Settling time plus set-up time is the minimum clock period; it
//    must equal mfr_pkg::min_period_ns(ORDER, P-1), as a P-bit register has
//    P-1 AND gates in its longest carry chain. The same is then measured
//    for the count-down chain (1 0..0 1 counting down to 1 0..0).
// 2. Count up and then down through more than a full cycle with the clock
//    at exactly that minimum period: every state must match q + 1 / q - 1
//    and no set-up violation may occur.
// 3. Repeat the count-up run 5 ns faster: set-up violations must now occur.
module mfr_ttl_probe
  import mfr_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter mfr_order_e  ORDER = ORDER_CE_SH_PE
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned measured_up_ns,    // minimum period found, count-up carry
  output int unsigned measured_dn_ns     // same, count-down carry
);

  localparam realtime SLOW = 1000.0;
  localparam int unsigned EXPECT = min_period_ns(ORDER, P - 1);

  logic         ck = 1'b0, sr_n, pe_n, sh, ce, l_rn, u_dn, dr, dl;
  logic [P-1:0] d, q, dnet, m;
  int unsigned  viol;
  realtime      t_edge, t_last;

  mfr_ttl #(.P(P), .ORDER(ORDER)) u_model (
    .ck(ck), .sr_n(sr_n), .pe_n(pe_n), .sh(sh), .ce(ce), .l_rn(l_rn),
    .u_dn(u_dn), .dr(dr), .dl(dl), .d(d), .q(q), .dnet(dnet), .setup_viol(viol)
  );

  always @(dnet) t_last <= $realtime;

  // one clock period: rising edge now, falling edge half way
  task automatic tick(realtime per);
    ck = 1'b1;
    t_edge = $realtime;
    #(per / 2.0) ck = 1'b0;
    #(per - per / 2.0);
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL P=%0d %s: %s (q=%b model=%b viol=%0d)", P, ORDER.name(), what, q, m, viol);
    end
  endtask

  // count enable is dropped while loading: in the count-first order it
  // would override the load
  task automatic reset_and_load(logic [P-1:0] w);
    logic ce_keep = ce;
    sr_n = 1'b0; #(SLOW);
    sr_n = 1'b1; #(SLOW);
    ce = 1'b0; pe_n = 1'b0; d = w; #(SLOW);
    tick(SLOW);
    pe_n = 1'b1; ce = ce_keep; #(SLOW);
  endtask

  function automatic int unsigned settle_plus_setup();
    return int'(t_last - t_edge) + T_SU_NS;
  endfunction

  initial begin
    int unsigned v0;
    done = 1'b0; checks = 0; failures = 0;
    sr_n = 1'b0; pe_n = 1'b1; sh = 1'b0; ce = 1'b0; l_rn = 1'b0; u_dn = 1'b1;
    dr = 1'b0; dl = 1'b0; d = '0;

    // ---- 1: measure the carry paths ------------------------------------
    // 0 1..1 0 -> 0 1..1: bit 0 rises and the up chain psi turns on gate
    // after gate, up to the top bit
    ce = 1'b1; u_dn = 1'b1;
    reset_and_load({1'b0, {(P-2){1'b1}}, 1'b0});
    tick(SLOW);
    measured_up_ns = settle_plus_setup();
    check(q == {1'b0, {(P-1){1'b1}}}, "carry-up result");
    check(measured_up_ns == EXPECT, $sformatf("count-up path %0d ns, expected %0d",
                                              measured_up_ns, EXPECT));
    // 1 0..0 1 -> 1 0..0: bit 0 falls and the down chain phi ripples up
    u_dn = 1'b0;
    reset_and_load({1'b1, {(P-2){1'b0}}, 1'b1});
    tick(SLOW);
    measured_dn_ns = settle_plus_setup();
    check(q == {1'b1, {(P-1){1'b0}}}, "carry-down result");
    check(measured_dn_ns == EXPECT, $sformatf("count-down path %0d ns, expected %0d",
                                              measured_dn_ns, EXPECT));

    // ---- 2: run at the minimum period ----------------------------------
    u_dn = 1'b1;
    reset_and_load('0);
    v0 = viol;
    m = '0;
    for (int n = 0; n < (1 << P) + 2; n++) begin
      tick(real'(EXPECT));
      m = m + 1'b1;
      check(q == m, "count up at the minimum period");
    end
    u_dn = 1'b0; #(SLOW);
    for (int n = 0; n < (1 << P) + 2; n++) begin
      tick(real'(EXPECT));
      m = m - 1'b1;
      check(q == m, "count down at the minimum period");
    end
    check(viol == v0, "no set-up violation at the minimum period");

    // ---- 3: 5 ns too fast ----------------------------------------------
    u_dn = 1'b1;
    reset_and_load('0);
    v0 = viol;
    for (int n = 0; n < (1 << P) + 2; n++) tick(real'(EXPECT) - 5.0);
    check(viol > v0, "set-up violations 5 ns below the minimum period");

    done = 1'b1;
  end
endmodule
