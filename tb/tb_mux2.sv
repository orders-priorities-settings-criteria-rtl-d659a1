// tb_mux2 - exhaustive test of the 2:1 multiplexer: all eight input
// combinations, output compared with "s ? i1 : i0".
module tb_mux2;
  logic s, i1, i0, y;
  int checks = 0, failures = 0;

  mux2 dut (.s(s), .i1(i1), .i0(i0), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, i1, i0} = 3'(v);
      #1;
      checks++;
      if (y !== (s ? i1 : i0)) begin
        failures++;
        $display("FAIL s=%b i1=%b i0=%b y=%b", s, i1, i0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
