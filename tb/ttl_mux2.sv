// ttl_mux2 - behavioural timing model of the discrete 2:1 multiplexer: an
// inverter (1/6 74LS04) on the select line and two 74LS126A tri-state
// buffers on a shared output, one enabled by s and one by its inverse.
// Modelled as y = s ? i1 : i0 after the worst-case data-to-output delay of
// 15 ns; the simulator has no high-impedance state, so the bus itself is
// not modelled. Used only by the gate-level timing model of the register.
module ttl_mux2 #(
  parameter int unsigned T_PD = 15       // ns
) (
  input  logic s,
  input  logic i1,
  input  logic i0,
  output logic y
);
  assign #(T_PD) y = s ? i1 : i0;
endmodule
