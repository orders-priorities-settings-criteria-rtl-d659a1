// mfr - p-bit multifunctional register (top level).
//
// One register that can hold, reset, load d in parallel, shift left or
// right with serial inputs DL/DR, and count up or down modulo 2^p. All
// operations except reset take effect on the rising edge of ck; reset
// (sr_n = 0) clears the register immediately and overrides everything.
//
// Operations (Q' is the state after the clock edge):
//   load        Q' = d
//   shift right Q' = {dr, Q[p-1:1]}      (l_rn = 0)
//   shift left  Q' = {Q[p-2:0], dl}      (l_rn = 1)
//   count down  Q' = Q - 1 mod 2^p       (u_dn = 0)
//   count up    Q' = Q + 1 mod 2^p       (u_dn = 1)
//   hold        Q' = Q                   (pe_n = 1, sh = 0, ce = 0)
// When several commands are active, ORDER decides which wins:
//   ORDER_PE_SH_CE : load (pe_n = 0) > shift (sh) > count (ce)
//   ORDER_CE_SH_PE : count (ce) > shift (sh) > load (pe_n = 0)
// The second order is the default: counting has the longest logic path
// (ripple AND chain + XOR), so it is given the fewest multiplexers between
// that path and the flip-flops, which shortens the minimum clock period
// (see mfr_pkg::min_period_ns). The two orders cost the same hardware.
//
// Structure: one mfr_count_chain produces the count toggle conditions, and
// each bit has a bit slice (mfr_slice_alt1 or mfr_slice_alt2, chosen by
// ORDER) feeding an mfr_dff whose asynchronous clear is sr_n. The
// behaviour, the two priority orders, the slice structure and the default
// width of 4 bits follow the design description; the port names, the
// ORDER parameter and the choice of default order are this design's own.
// Timing: q changes after each rising ck edge; the next-state logic is
// combinational from q, d, dl, dr and the commands, so those must be
// stable for one set-up time before the edge.
module mfr
  import mfr_pkg::*;
#(
  parameter int unsigned P     = 4,               // width in bits
  parameter mfr_order_e  ORDER = ORDER_CE_SH_PE   // command priority order
) (
  input  logic         ck,     // clock, rising edge
  input  logic         sr_n,   // reset, asynchronous, active low
  input  logic         pe_n,   // parallel enable, active low
  input  logic         sh,     // shift enable
  input  logic         ce,     // count enable
  input  logic         l_rn,   // shift direction: 1 left, 0 right
  input  logic         u_dn,   // count direction: 1 up, 0 down
  input  logic         dr,     // serial input of a right shift (enters bit p-1)
  input  logic         dl,     // serial input of a left shift (enters bit 0)
  input  logic [P-1:0] d,      // parallel data
  output logic [P-1:0] q       // register state
);
  mfr_cmd_t     cmd;
  logic [P-1:0] phi, psi, d_next, q_n;
  logic [P+1:0] q_ext;         // {dr, q, dl}: neighbours of every bit

  always_comb begin
    cmd   = '{pe_n: pe_n, sh: sh, ce: ce, l_rn: l_rn, u_dn: u_dn};
    q_ext = {dr, q, dl};
  end

  mfr_count_chain #(.P(P)) u_chain (.q(q), .q_n(q_n), .phi(phi), .psi(psi));

  for (genvar i = 0; i < P; i++) begin : g_bit
    if (ORDER == ORDER_PE_SH_CE) begin : g_alt1
      mfr_slice_alt1 u_slice (
        .cmd(cmd), .q(q[i]), .q_prev(q_ext[i]), .q_next(q_ext[i+2]),
        .d(d[i]), .phi(phi[i]), .psi(psi[i]), .d_next(d_next[i])
      );
    end else begin : g_alt2
      mfr_slice_alt2 u_slice (
        .cmd(cmd), .q(q[i]), .q_prev(q_ext[i]), .q_next(q_ext[i+2]),
        .d(d[i]), .phi(phi[i]), .psi(psi[i]), .d_next(d_next[i])
      );
    end
    mfr_dff u_ff (.ck(ck), .clr_n(sr_n), .d(d_next[i]), .q(q[i]), .q_n(q_n[i]));
  end
endmodule
