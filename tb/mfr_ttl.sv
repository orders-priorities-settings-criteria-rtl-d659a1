// mfr_ttl - gate-level timing model of the multifunctional register as a
// discrete 74LS build, for measuring its critical path in simulation.
//
// It has the same structure as the synthesizable register (mfr): a ripple
// AND chain for the count toggle conditions, two XORs per bit, five 2:1
// multiplexers per bit stacked in the order ORDER selects, and one D
// flip-flop per bit with asynchronous clear. Every element is one of the
// delay-annotated models ttl_and2, ttl_xor2, ttl_mux2 and ttl_dff, so the
// time from a clock edge until the last D input settles is the sum of the
// data-book delays along the slowest path. setup_viol counts, over all
// bits, the clock edges that came too early for the D input.
module mfr_ttl
  import mfr_pkg::*;
#(
  parameter int unsigned P     = 4,
  parameter mfr_order_e  ORDER = ORDER_CE_SH_PE
) (
  input  logic         ck,
  input  logic         sr_n,
  input  logic         pe_n,
  input  logic         sh,
  input  logic         ce,
  input  logic         l_rn,
  input  logic         u_dn,
  input  logic         dr,
  input  logic         dl,
  input  logic [P-1:0] d,
  output logic [P-1:0] q,
  output logic [P-1:0] dnet,            // flip-flop D inputs, for measurement
  output int unsigned  setup_viol
);

  logic [P-1:0] q_n, phi, psi, up, dn, cnt, shv, t1, t2;
  logic [P+1:0] q_ext;
  int unsigned  viol [P];

  assign q_ext = {dr, q, dl};
  assign phi[0] = 1'b1;
  assign psi[0] = 1'b1;

  for (genvar i = 0; i < P; i++) begin : g_bit
    if (i > 0) begin : g_and
      ttl_and2 u_phi (.a(phi[i-1]), .b(q_n[i-1]), .y(phi[i]));
      ttl_and2 u_psi (.a(psi[i-1]), .b(q[i-1]),   .y(psi[i]));
    end
    ttl_xor2 u_xup(.a(q[i]), .b(psi[i]), .y(up[i]));
    ttl_xor2 u_xdn(.a(q[i]), .b(phi[i]), .y(dn[i]));
    ttl_mux2 u_ud (.s(u_dn), .i1(up[i]),       .i0(dn[i]),         .y(cnt[i]));
    ttl_mux2 u_lr (.s(l_rn), .i1(q_ext[i]),    .i0(q_ext[i+2]),    .y(shv[i]));
    if (ORDER == ORDER_PE_SH_CE) begin : g_alt1
      ttl_mux2 u_ce (.s(ce),   .i1(cnt[i]), .i0(q[i]),  .y(t1[i]));
      ttl_mux2 u_sh (.s(sh),   .i1(shv[i]), .i0(t1[i]), .y(t2[i]));
      ttl_mux2 u_pe (.s(pe_n), .i1(t2[i]),  .i0(d[i]),  .y(dnet[i]));
    end else begin : g_alt2
      ttl_mux2 u_pe (.s(pe_n), .i1(q[i]),   .i0(d[i]),  .y(t1[i]));
      ttl_mux2 u_sh (.s(sh),   .i1(shv[i]), .i0(t1[i]), .y(t2[i]));
      ttl_mux2 u_ce (.s(ce),   .i1(cnt[i]), .i0(t2[i]), .y(dnet[i]));
    end
    ttl_dff u_ff (.ck(ck), .clr_n(sr_n), .d(dnet[i]), .q(q[i]), .q_n(q_n[i]),
                  .setup_viol(viol[i]));
  end

  always_comb begin
    setup_viol = 0;
    for (int i = 0; i < P; i++) setup_viol += viol[i];
  end
endmodule
