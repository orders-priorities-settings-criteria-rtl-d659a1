// tb_mfr_count_chain - exhaustive test of the counter toggle conditions at
// widths 4 and 7. The expected value of psi[i] is "the i low bits of q are
// all ones", of phi[i] "the i low bits of q are all zeros", each worked out
// with a mask rather than a chain.
module tb_mfr_count_chain;
  localparam int unsigned PA = 4;
  localparam int unsigned PB = 7;

  logic [PA-1:0] qa, phia, psia;
  logic [PB-1:0] qb, phib, psib;
  int checks = 0, failures = 0;

  mfr_count_chain #(.P(PA)) dut_a (.q(qa), .q_n(~qa), .phi(phia), .psi(psia));
  mfr_count_chain #(.P(PB)) dut_b (.q(qb), .q_n(~qb), .phi(phib), .psi(psib));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic low_all(int unsigned v, int unsigned i, logic ones);
    int unsigned mask = (1 << i) - 1;
    return ones ? ((v & mask) == mask) : ((v & mask) == 0);
  endfunction

  initial begin
    for (int unsigned v = 0; v < (1 << PB); v++) begin
      qa = PA'(v);
      qb = PB'(v);
      #1;
      for (int unsigned i = 0; i < PB; i++) begin
        checks += 2;
        if (psib[i] !== low_all(v, i, 1'b1) || phib[i] !== low_all(v, i, 1'b0)) begin
          failures++;
          $display("FAIL P=%0d q=%b bit %0d psi=%b phi=%b", PB, qb, i, psib[i], phib[i]);
        end
      end
      if (v < (1 << PA)) begin
        for (int unsigned i = 0; i < PA; i++) begin
          checks += 2;
          if (psia[i] !== low_all(v, i, 1'b1) || phia[i] !== low_all(v, i, 1'b0)) begin
            failures++;
            $display("FAIL P=%0d q=%b bit %0d psi=%b phi=%b", PA, qa, i, psia[i], phia[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
