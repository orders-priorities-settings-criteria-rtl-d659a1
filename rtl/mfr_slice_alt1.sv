// mfr_slice_alt1 - next-state logic of one bit of the multifunctional
// register for the priority order SR > PE > SH > CE.
//
// Five 2:1 multiplexers form a chain, lowest priority first:
//   up/down mux : count-up value (Q ^ psi) or count-down value (Q ^ phi)
//   CE mux      : counted value, or Q itself (hold)
//   L/R mux     : left neighbour Q[i-1] (shift left) or right neighbour
//                 Q[i+1] (shift right); it sits beside the chain
//   SH mux      : shifted value, or the result of the CE mux
//   PE mux      : the result so far when PE_n = 1, parallel data d when 0
// The output is the D input of the bit's flip-flop; reset acts on the
// flip-flop's clear and is not in this logic. A counted value passes four
// multiplexers on its way to D, which makes counting the slowest operation
// of this order.
//
// The multiplexer chain and the truth table follow the design description.
// The count-down value is Q ^ phi, which is what "Q - 1 mod 2^p" requires.
// At the register ends the neighbour inputs carry the serial inputs DL
// (bit 0) and DR (bit p-1). Purely combinational.
module mfr_slice_alt1
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
  logic cnt_up, cnt_dn, cnt, ce_out, shv, sh_out;

  always_comb begin
    cnt_up = q ^ psi;
    cnt_dn = q ^ phi;
  end

  mux2 u_mux_ud (.s(cmd.u_dn), .i1(cnt_up), .i0(cnt_dn), .y(cnt));
  mux2 u_mux_ce (.s(cmd.ce),   .i1(cnt),    .i0(q),      .y(ce_out));
  mux2 u_mux_lr (.s(cmd.l_rn), .i1(q_prev), .i0(q_next), .y(shv));
  mux2 u_mux_sh (.s(cmd.sh),   .i1(shv),    .i0(ce_out), .y(sh_out));
  mux2 u_mux_pe (.s(cmd.pe_n), .i1(sh_out), .i0(d),      .y(d_next));
endmodule
