// Testbench of sis_state_driver: the four rows of the state-segment search
// table for every entry, then random match-line vectors.
module tb_sis_state_driver;
  localparam int E = 4;
  logic pc_n;
  logic [E-1:0] ml_in, st_en;
  int checks = 0, failures = 0;

  sis_state_driver #(.ENTRIES(E)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {pre-charge control, ML} -> search the state segment?
  logic table4 [4] = '{1'b0, 1'b1, 1'b0, 1'b0};  // 00 01 10 11

  initial begin
    for (int e = 0; e < E; e++) begin
      for (int r = 0; r < 4; r++) begin
        pc_n = r[1]; ml_in = '0; ml_in[e] = r[0];
        #1 checks++;
        if (st_en[e] !== table4[r] || (st_en & ~(E'(1) << e)) != '0) begin
          failures++;
          $display("entry %0d pc_n=%b ml=%b st_en=%b", e, pc_n, r[0], st_en);
        end
      end
    end
    for (int n = 0; n < 50; n++) begin
      pc_n = $urandom_range(1); ml_in = E'($urandom);
      #1 checks++;
      if (st_en !== (pc_n ? '0 : ml_in)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
