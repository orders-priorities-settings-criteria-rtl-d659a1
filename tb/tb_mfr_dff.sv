// tb_mfr_dff - checks the register bit's flip-flop: D is taken only on a
// rising clock edge, the clear acts at once without any clock edge and
// holds the bit at 0 across edges while asserted, and q_n is always ~q.
module tb_mfr_dff;
  logic ck = 1'b0, clr_n, d, q, q_n;
  int checks = 0, failures = 0;

  mfr_dff dut (.ck(ck), .clr_n(clr_n), .d(d), .q(q), .q_n(q_n));

  always #5 ck = ~ck;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic exp, string what);
    checks++;
    if (q !== exp || q_n !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%b q_n=%b expected %b at %0t", what, q, q_n, exp, $time);
    end
  endtask

  logic model;
  initial begin
    clr_n = 1'b0; d = 1'b1;
    #2 expect_q(1'b0, "clear without clock");
    @(posedge ck); #1 expect_q(1'b0, "clear held over an edge");
    clr_n = 1'b1;
    @(negedge ck);
    model = 1'b0;
    for (int n = 0; n < 200; n++) begin
      d = 1'($urandom);
      #2 expect_q(model, "no change between edges");
      @(posedge ck); #1;
      model = d;
      expect_q(model, "sample on rising edge");
      if (n % 17 == 3) begin
        // clear asserted in the middle of the high phase, no edge involved
        clr_n = 1'b0; #1;
        expect_q(1'b0, "asynchronous clear");
        clr_n = 1'b1;
        model = 1'b0;
      end
      @(negedge ck);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
