// ttl_and2 - behavioural timing model of one 2-input AND gate of a 74LS08:
// y = a & b after the data-book maximum propagation delay (20 ns). Used
// only by the gate-level timing model of the register.
module ttl_and2 #(
  parameter int unsigned T_PD = 20       // ns
) (
  input  logic a,
  input  logic b,
  output logic y
);
  assign #(T_PD) y = a & b;
endmodule
