// ttl_xor2 - behavioural timing model of one 2-input XOR gate of a 74LS86:
// y = a ^ b after the data-book maximum propagation delay (30 ns). Used
// only by the gate-level timing model of the register.
module ttl_xor2 #(
  parameter int unsigned T_PD = 30       // ns
) (
  input  logic a,
  input  logic b,
  output logic y
);
  assign #(T_PD) y = a ^ b;
endmodule
