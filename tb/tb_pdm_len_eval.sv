// Testbench of pdm_len_eval: the four rows of the Phase 2 table
// (care or don't care cell, entry matched or not) give the CMD level.
module tb_pdm_len_eval;
  logic nx, p1r, cmd_pd;
  int checks = 0, failures = 0;

  pdm_len_eval dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {care, match} -> CMD level after evaluation (1 = stays precharged)
  logic exp_cmd [4] = '{1'b1, 1'b1, 1'b1, 1'b0};

  initial begin
    for (int r = 0; r < 4; r++) begin
      nx = r[1]; p1r = r[0];
      #1;
      checks++;
      if (~cmd_pd !== exp_cmd[r]) begin
        failures++;
        $display("nx=%b p1r=%b: CMD=%b", nx, p1r, ~cmd_pd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
