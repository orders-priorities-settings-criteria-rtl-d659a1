// tb_mfr_full - the register with every parameter at its default (4 bits,
// count > shift > load priority), taken through one complete use: reset,
// parallel load, a full count-up cycle and a full count-down cycle (each
// 2^P steps, ending back at the loaded value), a serial shift-in of a whole
// word through DR and out again through DL, commands in conflict, and an
// asynchronous reset between clock edges. The state is compared after every
// edge with expected values computed here with plain arithmetic.
module tb_mfr_full;
  localparam int unsigned P = 4;

  logic         ck = 1'b0;
  logic         sr_n, pe_n, sh, ce, l_rn, u_dn, dr, dl;
  logic [P-1:0] d, q, exp_q;
  int checks = 0, failures = 0;

  mfr dut (
    .ck(ck), .sr_n(sr_n), .pe_n(pe_n), .sh(sh), .ce(ce), .l_rn(l_rn),
    .u_dn(u_dn), .dr(dr), .dl(dl), .d(d), .q(q)
  );

  always #5 ck = ~ck;

  initial begin : watchdog
    repeat (1000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h at %0t", what, q, exp_q, $time);
    end
  endtask

  // one clock with the given commands; result checked after the edge
  task automatic clk(logic pe_n_i, logic sh_i, logic ce_i, logic l_rn_i, logic u_dn_i,
                     logic dr_i, logic dl_i, logic [P-1:0] d_i, logic [P-1:0] expect_i,
                     string what);
    pe_n = pe_n_i; sh = sh_i; ce = ce_i; l_rn = l_rn_i; u_dn = u_dn_i;
    dr = dr_i; dl = dl_i; d = d_i;
    @(posedge ck); #1;
    exp_q = expect_i;
    check(what);
    @(negedge ck);
  endtask

  localparam logic [P-1:0] WORD = 4'b1011;
  logic [P-1:0] v;
  logic [P-1:0] out_bits;

  initial begin
    sr_n = 1'b0; pe_n = 1'b1; sh = 1'b0; ce = 1'b0; l_rn = 1'b0; u_dn = 1'b0;
    dr = 1'b0; dl = 1'b0; d = '0;
    #2 exp_q = '0; check("reset");
    @(negedge ck); sr_n = 1'b1;

    clk(0, 0, 0, 0, 0, 0, 0, 4'h6, 4'h6, "load");
    clk(1, 0, 0, 0, 0, 1, 1, 4'h9, 4'h6, "hold");

    v = 4'h6;
    for (int n = 0; n < (1 << P); n++) begin
      v = v + 1'b1;
      clk(1, 0, 1, 0, 1, 0, 0, 4'h0, v, "count up");
    end
    for (int n = 0; n < (1 << P); n++) begin
      v = v - 1'b1;
      clk(1, 0, 1, 0, 0, 0, 0, 4'h0, v, "count down");
    end

    // shift WORD in through DR, LSB first: after P right shifts q == WORD
    for (int n = 0; n < P; n++) begin
      v = {WORD[n], v[P-1:1]};
      clk(1, 1, 0, 0, 0, WORD[n], 0, 4'h0, v, "shift right in");
    end
    checks++;
    if (q !== WORD) begin failures++; $display("FAIL serial load gave %h", q); end
    // shift it out through the MSB with left shifts, feeding zeros in at DL
    for (int n = 0; n < P; n++) begin
      out_bits[P-1-n] = q[P-1];
      v = {v[P-2:0], 1'b0};
      clk(1, 1, 0, 1, 0, 0, 0, 4'h0, v, "shift left out");
    end
    checks++;
    if (out_bits !== WORD) begin failures++; $display("FAIL serial out %h", out_bits); end

    // conflicts: count beats shift and load, shift beats load
    clk(0, 0, 0, 0, 0, 0, 0, 4'h3, 4'h3, "load 3");
    clk(0, 1, 1, 0, 1, 0, 0, 4'hC, 4'h4, "count over shift and load");
    clk(0, 1, 0, 1, 0, 0, 1, 4'hC, 4'h9, "shift over load");

    // asynchronous reset in the low phase of the clock
    #2 sr_n = 1'b0;
    #1 exp_q = '0; check("asynchronous reset");
    sr_n = 1'b1;
    clk(1, 0, 1, 0, 0, 0, 0, 4'h0, 4'hF, "count down from 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
