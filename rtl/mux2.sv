// mux2 - 2:1 multiplexer, the building block of every bit slice of the
// multifunctional register.
//
// y = i1 & s | i0 & ~s. In the discrete build this is an inverter on the
// select line and two tri-state buffers whose outputs are tied together;
// one buffer is enabled by s, the other by its inverse, so exactly one
// drives the output. Here it is written as the equivalent two-level logic,
// which is what that circuit computes when one buffer is always enabled.
// Purely combinational.
module mux2 (
  input  logic s,    // select: 1 picks i1, 0 picks i0
  input  logic i1,
  input  logic i0,
  output logic y
);
  always_comb y = (i1 & s) | (i0 & ~s);
endmodule
