// tb_mfr - end-to-end test of the multifunctional register.
//
// Two registers run side by side from the same stimulus: `dut` with every
// parameter at its default (4 bits, count > shift > load priority) and
// `dut_a1` in the other priority order (load > shift > count). A reference
// model per register computes the next state from the truth table of its
// order, using plain arithmetic (q + 1, q - 1, concatenation) rather than
// gates. Every operation must take effect on the first rising edge, so the
// state is compared after every edge: this also checks the one-clock
// latency of every command.
//
// Phases: directed sequences (load, full count up and down with
// wrap-around, shifts in both directions with both serial inputs, hold),
// then random commands, often several at once, so that the priority order
// decides. Reset is pulsed asynchronously between edges and the register
// must clear before the next edge. Each mechanism is counted per register
// and a mechanism that never happened is a failure. Finally the worst-case
// clock periods of the timing model in mfr_pkg are compared with values
// computed here by hand for a 4-rank carry chain: 230 ns and 200 ns.
module tb_mfr;
  import mfr_pkg::*;

  localparam int unsigned P = 4;

  logic         ck = 1'b0;
  logic         sr_n, pe_n, sh, ce, l_rn, u_dn, dr, dl;
  logic [P-1:0] d, q, q_a1;
  logic [P-1:0] m, m_a1;          // reference models
  int checks = 0, failures = 0;

  typedef enum int {
    M_HOLD, M_RESET, M_LOAD, M_SHR, M_SHL, M_DOWN, M_UP,
    M_WRAP_UP, M_WRAP_DOWN, M_CONFLICT, M_NUM
  } mech_e;
  int cnt_def [M_NUM];
  int cnt_a1  [M_NUM];

  mfr dut (
    .ck(ck), .sr_n(sr_n), .pe_n(pe_n), .sh(sh), .ce(ce), .l_rn(l_rn),
    .u_dn(u_dn), .dr(dr), .dl(dl), .d(d), .q(q)
  );

  mfr #(.ORDER(ORDER_PE_SH_CE)) dut_a1 (
    .ck(ck), .sr_n(sr_n), .pe_n(pe_n), .sh(sh), .ce(ce), .l_rn(l_rn),
    .u_dn(u_dn), .dr(dr), .dl(dl), .d(d), .q(q_a1)
  );

  always #5 ck = ~ck;

  initial begin : watchdog
    repeat (5000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Next state and the mechanism it exercises, from the truth tables.
  function automatic logic [P-1:0] next_state(mfr_order_e order, logic [P-1:0] cur,
                                              output mech_e mech);
    logic do_load = !pe_n, do_sh = sh, do_cnt = ce;
    logic [P-1:0] shifted = l_rn ? {cur[P-2:0], dl} : {dr, cur[P-1:1]};
    logic [P-1:0] counted = u_dn ? cur + 1'b1 : cur - 1'b1;
    mech_e shm  = l_rn ? M_SHL : M_SHR;
    mech_e cntm = u_dn ? ((cur == '1) ? M_WRAP_UP : M_UP)
                       : ((cur == '0) ? M_WRAP_DOWN : M_DOWN);
    if (order == ORDER_PE_SH_CE) begin
      if (do_load)     begin mech = M_LOAD; return d;       end
      else if (do_sh)  begin mech = shm;    return shifted; end
      else if (do_cnt) begin mech = cntm;   return counted; end
    end else begin
      if (do_cnt)      begin mech = cntm;   return counted; end
      else if (do_sh)  begin mech = shm;    return shifted; end
      else if (do_load) begin mech = M_LOAD; return d;      end
    end
    mech = M_HOLD;
    return cur;
  endfunction

  task automatic compare(string what);
    checks += 2;
    if (q !== m) begin
      failures++;
      $display("FAIL default order, %s: q=%h expected %h at %0t", what, q, m, $time);
    end
    if (q_a1 !== m_a1) begin
      failures++;
      $display("FAIL PE>SH>CE order, %s: q=%h expected %h at %0t", what, q_a1, m_a1, $time);
    end
  endtask

  // Apply one set of commands for one clock and check the result.
  task automatic step(logic pe_n_i, logic sh_i, logic ce_i, logic l_rn_i, logic u_dn_i,
                      logic dr_i, logic dl_i, logic [P-1:0] d_i);
    mech_e md, ma;
    logic [P-1:0] nd, na;
    pe_n = pe_n_i; sh = sh_i; ce = ce_i; l_rn = l_rn_i; u_dn = u_dn_i;
    dr = dr_i; dl = dl_i; d = d_i;
    nd = next_state(ORDER_CE_SH_PE, m, md);
    na = next_state(ORDER_PE_SH_CE, m_a1, ma);
    if (32'(!pe_n_i) + 32'(sh_i) + 32'(ce_i) > 1) begin
      cnt_def[M_CONFLICT]++;
      cnt_a1[M_CONFLICT]++;
    end
    @(posedge ck); #1;
    m = nd; m_a1 = na;
    cnt_def[md]++;
    cnt_a1[ma]++;
    compare(md.name());
    @(negedge ck);
  endtask

  task automatic async_reset();
    #2 sr_n = 1'b0;
    #1;
    m = '0; m_a1 = '0;
    cnt_def[M_RESET]++;
    cnt_a1[M_RESET]++;
    compare("asynchronous reset");
    sr_n = 1'b1;   // released in the low phase, before the next rising edge
  endtask

  initial begin
    // ---- timing model --------------------------------------------------
    checks += 4;
    if (min_period_ns(ORDER_PE_SH_CE, 4) != 230) begin
      failures++; $display("FAIL T1 = %0d ns", min_period_ns(ORDER_PE_SH_CE, 4));
    end
    if (min_period_ns(ORDER_CE_SH_PE, 4) != 200) begin
      failures++; $display("FAIL T2 = %0d ns", min_period_ns(ORDER_CE_SH_PE, 4));
    end
    // (230 - 200) * 100 / 230 = 13 %
    if ((min_period_ns(ORDER_PE_SH_CE, 4) - min_period_ns(ORDER_CE_SH_PE, 4)) * 100
        / min_period_ns(ORDER_PE_SH_CE, 4) != 13) begin
      failures++; $display("FAIL relative gain");
    end
    // the gain shrinks as the carry chain grows: 30/390 < 30/230
    if ((min_period_ns(ORDER_PE_SH_CE, 12) - min_period_ns(ORDER_CE_SH_PE, 12)) * 100
        / min_period_ns(ORDER_PE_SH_CE, 12) >= 13) begin
      failures++; $display("FAIL gain at 12 ranks");
    end

    // ---- reset ---------------------------------------------------------
    sr_n = 1'b0; pe_n = 1'b1; sh = 1'b0; ce = 1'b0; l_rn = 1'b0; u_dn = 1'b0;
    dr = 1'b0; dl = 1'b0; d = '0;
    #3;
    m = '0; m_a1 = '0;
    compare("power-on reset");
    @(negedge ck); sr_n = 1'b1;

    // ---- directed ------------------------------------------------------
    //     pe_n sh ce l_rn u_dn dr dl d
    step(0, 0, 0, 0, 0, 0, 0, 4'hA);                 // load A
    step(1, 0, 0, 1, 1, 1, 1, 4'h5);                 // hold
    for (int n = 0; n < 18; n++) step(1, 0, 1, 0, 1, 0, 0, 4'h0);  // count up, wraps
    for (int n = 0; n < 18; n++) step(1, 0, 1, 0, 0, 0, 0, 4'h0);  // count down, wraps
    step(0, 0, 0, 0, 0, 0, 0, 4'h9);                 // load 9
    for (int n = 0; n < 5; n++) step(1, 1, 0, 0, 0, 1, 0, 4'h0);   // shift right, DR = 1
    for (int n = 0; n < 5; n++) step(1, 1, 0, 1, 0, 0, 0, 4'h0);   // shift left, DL = 0
    for (int n = 0; n < 3; n++) step(1, 1, 0, 1, 0, 1, 1, 4'h0);   // shift left, DL = 1
    for (int n = 0; n < 3; n++) step(1, 1, 0, 0, 0, 0, 1, 4'h0);   // shift right, DR = 0
    step(0, 1, 1, 1, 1, 0, 1, 4'h3);                 // all three at once
    step(0, 0, 1, 0, 0, 0, 0, 4'hC);                 // load vs count
    step(1, 1, 1, 0, 1, 1, 0, 4'h0);                 // shift vs count
    async_reset();
    step(0, 0, 0, 0, 0, 0, 0, 4'h0);                 // load zero, then down-wrap
    step(1, 0, 1, 0, 0, 0, 0, 4'h0);

    // ---- random --------------------------------------------------------
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] r;
      r = $urandom;
      step(r[0] | r[1], r[2] & r[3], r[4] | r[5], r[6], r[7], r[8], r[9], r[13:10]);
      if (r[31:27] == 0) async_reset();
    end

    // ---- coverage of mechanisms ---------------------------------------
    for (int k = 0; k < M_NUM; k++) begin
      checks += 2;
      if (cnt_def[k] == 0) begin failures++; $display("FAIL default order never did %s", mech_e'(k)); end
      if (cnt_a1[k]  == 0) begin failures++; $display("FAIL PE>SH>CE order never did %s", mech_e'(k)); end
      $display("%-12s default %5d   PE>SH>CE %5d", mech_e'(k), cnt_def[k], cnt_a1[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
