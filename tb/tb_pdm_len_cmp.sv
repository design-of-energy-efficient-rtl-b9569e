// Testbench of pdm_len_cmp: the rows of the Phase 3 table. P2R care with a
// care cell keeps MML (match), P2R care with a don't care cell discharges it
// (mismatch), P2R don't care with a don't care cell keeps it.
module tb_pdm_len_cmp;
  logic nx, p2r, mml_pd;
  int checks = 0, failures = 0;

  pdm_len_cmp dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic row(logic care, logic p2, logic exp_mml);
    nx = care; p2r = p2;
    #1;
    checks++;
    if (~mml_pd !== exp_mml) begin
      failures++;
      $display("care=%b p2r=%b: MML=%b expected %b", care, p2, ~mml_pd, exp_mml);
    end
  endtask

  initial begin
    row(1'b1, 1'b1, 1'b1);
    row(1'b0, 1'b1, 1'b0);
    row(1'b0, 1'b0, 1'b1);
    row(1'b1, 1'b0, 1'b1);  // not reachable in a search; PSS stays off
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
