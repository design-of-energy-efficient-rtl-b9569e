// Testbench of cmd_sense_p2r: random pull-down patterns; P2R must become
// the column OR one clock after load and hold while load is low.
module tb_cmd_sense_p2r;
  localparam int E = 4, W = 24;
  logic clk = 0, rst_n, load;
  logic [E-1:0][W-1:0] cmd_pd;
  logic [W-1:0] p2r, exp_p2r;
  int checks = 0, failures = 0;

  cmd_sense_p2r #(.ENTRIES(E), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; cmd_pd = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    checks++; if (p2r !== '0) failures++;
    exp_p2r = '0;
    for (int n = 0; n < 100; n++) begin
      for (int e = 0; e < E; e++) cmd_pd[e] = ($urandom_range(2) == 0) ? '0 : W'($urandom);
      load = $urandom_range(1);
      @(negedge clk);
      if (load) begin
        exp_p2r = '0;
        for (int e = 0; e < E; e++) exp_p2r |= cmd_pd[e];
      end
      checks++;
      if (p2r !== exp_p2r) begin failures++; $display("p2r %h expected %h", p2r, exp_p2r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
