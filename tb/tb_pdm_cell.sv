// Testbench of pdm_cell: for each stored value, the Phase 1 match line
// pull-down for search 1, search 0 and a masked bit, then with DL=DLB=1 the
// Phase 2 CMD pull-down (for a matched and an unmatched entry) and the
// Phase 3 MML pull-down for both P2R values.
module tb_pdm_cell;
  import tcam_pkg::*;

  logic clk = 0;
  logic we, dsl_en, p1r, p2r, ml_pd, cmd_pd, mml_pd;
  ternary_t wdata, data;
  dl_t dl;
  int checks = 0, failures = 0;

  pdm_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  ternary_t vals[3] = '{T0, T1, TX};

  initial begin
    we = 0; wdata = TX; dl = '0; dsl_en = 1; p1r = 0; p2r = 0;
    foreach (vals[i]) begin
      @(negedge clk); we = 1; wdata = vals[i];
      @(negedge clk); we = 0;
      // Phase 1
      dl = '{1'b1, 1'b0}; #1 chk($sformatf("%s search1 ml", vals[i].name()), ml_pd, vals[i] == T0);
      dl = '{1'b0, 1'b1}; #1 chk($sformatf("%s search0 ml", vals[i].name()), ml_pd, vals[i] == T1);
      dl = '{1'b0, 1'b0}; #1 chk($sformatf("%s masked ml", vals[i].name()), ml_pd, 1'b0);
      // Phase 2
      dl = '{1'b1, 1'b1};
      p1r = 1; #1 chk($sformatf("%s p2 match cmd", vals[i].name()), cmd_pd, vals[i] != TX);
      p1r = 0; #1 chk($sformatf("%s p2 mismatch cmd", vals[i].name()), cmd_pd, 1'b0);
      // Phase 3
      p1r = 1;
      p2r = 1; #1 chk($sformatf("%s p3 p2r=1 mml", vals[i].name()), mml_pd, vals[i] == TX);
      p2r = 0; #1 chk($sformatf("%s p3 p2r=0 mml", vals[i].name()), mml_pd, 1'b0);
      // no source-line pulse: no pull-down at all
      dsl_en = 0; p2r = 0; dl = '{1'b1, 1'b1};
      #1 chk("dsl off ml", ml_pd, 1'b0);
      dsl_en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
