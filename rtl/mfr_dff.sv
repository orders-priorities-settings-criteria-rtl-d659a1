// mfr_dff - one storage bit of the multifunctional register: a D flip-flop
// that samples D on the rising clock edge and is cleared at once, without a
// clock edge, while the active-low clear input is 0 (the behaviour of one
// half of a 74LS74A with its preset tied inactive). The asynchronous clear
// carries the register's Reset command, which overrides all others. Q and
// its complement are both brought out, as on the TTL part.
module mfr_dff (
  input  logic ck,      // clock, rising edge
  input  logic clr_n,   // asynchronous clear, active low
  input  logic d,
  output logic q,
  output logic q_n
);
  always_ff @(posedge ck or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= d;
  end
  always_comb q_n = ~q;
endmodule
