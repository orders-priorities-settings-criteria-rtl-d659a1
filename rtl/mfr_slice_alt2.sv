// mfr_slice_alt2 - next-state logic of one bit of the multifunctional
// register for the priority order SR > CE > SH > PE.
//
// The same five 2:1 multiplexers as the other order, rearranged so that
// the highest synchronous priority is counting:
//   PE mux      : Q itself (hold) when PE_n = 1, parallel data d when 0
//   L/R mux     : left neighbour Q[i-1] or right neighbour Q[i+1]
//   SH mux      : shifted value, or the result of the PE mux
//   up/down mux : count-up value (Q ^ psi) or count-down value (Q ^ phi)
//   CE mux      : counted value, or the result of the SH mux
// A counted value now passes only two multiplexers on its way to D. Since
// counting has the longest path in front of the multiplexers (the ripple
// AND chain and an XOR), giving it the top priority shortens the clock
// period by two multiplexer delays at no cost in hardware.
//
// The multiplexer arrangement and the truth table follow the design
// description. The count-down value is Q ^ phi, which is what
// "Q - 1 mod 2^p" requires. Reset acts on the flip-flop's clear. Purely
// combinational.
module mfr_slice_alt2
  import mfr_pkg::*;
(
  input  mfr_cmd_t cmd,      // synchronous commands, shared by all bits
  input  logic     q,        // this bit, Q[i]
  input  logic     q_prev,   // Q[i-1], or DL for bit 0
  input  logic     q_next,   // Q[i+1], or DR for bit p-1
  input  logic     d,        // parallel data d[i]
  input  logic     phi,      // all lower bits 0
  input  logic     psi,      // all lower bits 1
  output logic     d_next    // to the flip-flop's D input
);
  logic cnt_up, cnt_dn, cnt, pe_out, shv, sh_out;

  always_comb begin
    cnt_up = q ^ psi;
    cnt_dn = q ^ phi;
  end

  mux2 u_mux_pe (.s(cmd.pe_n), .i1(q),      .i0(d),      .y(pe_out));
  mux2 u_mux_lr (.s(cmd.l_rn), .i1(q_prev), .i0(q_next), .y(shv));
  mux2 u_mux_sh (.s(cmd.sh),   .i1(shv),    .i0(pe_out), .y(sh_out));
  mux2 u_mux_ud (.s(cmd.u_dn), .i1(cnt_up), .i0(cnt_dn), .y(cnt));
  mux2 u_mux_ce (.s(cmd.ce),   .i1(cnt),    .i0(sh_out), .y(d_next));
endmodule
