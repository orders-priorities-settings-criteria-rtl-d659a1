// ttl_dff - behavioural timing model of one half of a 74LS74A D flip-flop
// with its preset unused. Q follows D 40 ns (worst-case clock-to-Q) after
// a rising clock edge; a low clear forces Q to 0 after the same delay,
// without a clock edge. Every rising edge that comes less than the 20 ns
// set-up time after the last change of D is counted in setup_viol; the
// value then captured is whatever D held at the edge, which in the real
// part is not guaranteed.
module ttl_dff #(
  parameter int unsigned T_CQ = 40,      // ns, clock to Q
  parameter int unsigned T_SU = 20       // ns, D set-up before the edge
) (
  input  logic        ck,
  input  logic        clr_n,
  input  logic        d,
  output logic        q,
  output logic        q_n,
  output int unsigned setup_viol
);

  realtime t_d = 0.0;                    // time of the last change of d

  initial setup_viol = 0;
  always @(d) t_d <= $realtime;

  always @(posedge ck or negedge clr_n) begin
    if (!clr_n) begin
      q <= #(T_CQ) 1'b0;
    end else begin
      if ($realtime - t_d < real'(T_SU)) setup_viol <= setup_viol + 1;
      q <= #(T_CQ) d;
    end
  end
  assign q_n = ~q;
endmodule
