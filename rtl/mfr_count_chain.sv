// mfr_count_chain - toggle conditions of a p-bit binary up/down counter.
//
// For bit i of a binary counter:
//   psi[i] = Q[0] & Q[1] & ... & Q[i-1]    (all lower bits 1: bit i toggles
//                                           when counting up)
//   phi[i] = ~Q[0] & ~Q[1] & ... & ~Q[i-1] (all lower bits 0: bit i toggles
//                                           when counting down)
// with psi[0] = phi[0] = 1. Each term is built from the previous one with a
// single 2-input AND gate (psi[i] = psi[i-1] & Q[i-1]), so the chain ripples
// from bit 0 upwards and its delay grows linearly with i; that ripple is the
// largest part of the register's critical path. As in the discrete build,
// the down chain takes the flip-flops' inverted outputs q_n rather than
// inverting q. The recurrence follows the design description; pulling the
// AND gates out of the bit slices into one module is this design's choice.
// Purely combinational.
module mfr_count_chain #(
  parameter int unsigned P = 4          // register width in bits
) (
  input  logic [P-1:0] q,               // present register state
  input  logic [P-1:0] q_n,             // its complement (flip-flop Q-bar outputs)
  output logic [P-1:0] phi,             // down-count toggle condition per bit
  output logic [P-1:0] psi              // up-count toggle condition per bit
);
  always_comb begin
    phi[0] = 1'b1;
    psi[0] = 1'b1;
  end

  for (genvar i = 1; i < P; i++) begin : g_and
    always_comb begin
      phi[i] = phi[i-1] & q_n[i-1];
      psi[i] = psi[i-1] & q[i-1];
    end
  end
endmodule
