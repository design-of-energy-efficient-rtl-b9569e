// Testbench of result_sram: words written by address and read back through
// one-hot word lines one clock later; no word line reads 0; two word lines
// read the OR of both words; rdata holds while re is low.
module tb_result_sram;
  localparam int E = 4, DW = 16;
  logic clk = 0, rst_n, we, re;
  logic [1:0] waddr;
  logic [DW-1:0] wdata, rdata;
  logic [E-1:0] wl;
  logic [DW-1:0] m [E];
  int checks = 0, failures = 0;

  result_sram #(.ENTRIES(E), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] exp;
  initial begin
    rst_n = 0; we = 0; re = 0; waddr = 0; wdata = 0; wl = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < E; e++) begin
      we = 1; waddr = 2'(e); wdata = DW'($urandom); m[e] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(2) == 0) begin
        we = 1; waddr = 2'($urandom); wdata = DW'($urandom);
        m[waddr] = wdata;
        @(negedge clk); we = 0;
      end
      case ($urandom_range(3))
        0: wl = '0;
        1: wl = E'($urandom);
        default: wl = E'(1) << $urandom_range(E-1);
      endcase
      exp = '0;
      for (int e = 0; e < E; e++) if (wl[e]) exp |= m[e];
      re = 1;
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== exp) begin failures++; $display("n %0d wl %b rdata %h expected %h", n, wl, rdata, exp); end
      wl = ~wl;
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin failures++; $display("rdata changed without re"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
