// Testbench of pdm_controller: the phase order of a search, six clocks from
// an accepted request to the result pulse, requests ignored while busy, and
// back-to-back requests.
module tb_pdm_controller;
  import tcam_pkg::*;
  logic clk = 0, rst_n, search_valid, search_ready, result_valid;
  phase_t phase;
  int checks = 0, failures = 0;

  pdm_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  phase_t order[6] = '{PH_IN, PH_ST, PH_LEN, PH_CMP, PH_RD, PH_IDLE};

  initial begin
    rst_n = 0; search_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (!search_ready || phase != PH_IDLE || result_valid) failures++;
    for (int n = 0; n < 20; n++) begin
      int lat;
      repeat ($urandom_range(2)) @(negedge clk);
      search_valid = 1;
      checks++; if (!search_ready) begin failures++; $display("not ready when idle"); end
      @(negedge clk);
      search_valid = $urandom_range(1);  // a held request must not restart the search
      lat = 1;
      for (int p = 0; p < 6; p++) begin
        checks++;
        if (phase != order[p]) begin failures++; $display("step %0d phase %s", p, phase.name()); end
        checks++;
        if (search_ready != (order[p] == PH_IDLE)) failures++;
        checks++;
        if (result_valid != (p == 5)) begin failures++; $display("result_valid %b at step %0d", result_valid, p); end
        if (p < 5) begin @(negedge clk); lat++; end
      end
      checks++;
      if (lat != 6) begin failures++; $display("latency %0d", lat); end
      search_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
