// Testbench of tcam_row (8 cells): random ternary words and keys. The match
// line is checked against a bit-by-bit ternary compare, the CMD pull-downs
// against the word's care bits, and MML against "no care bit of P2R falls
// on a don't care cell".
module tb_tcam_row;
  import tcam_pkg::*;
  localparam int W = 8;

  logic clk = 0;
  logic we, dsl_en, p1r, ml, mml;
  ternary_t [W-1:0] wdata, data;
  dl_t [W-1:0] dl;
  logic [W-1:0] p2r, cmd_pd;
  int checks = 0, failures = 0;

  tcam_row #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ternary_t rnd_t();
    case ($urandom_range(2))
      0: return T0;
      1: return T1;
      default: return TX;
    endcase
  endfunction

  ternary_t [W-1:0] word;
  logic [W-1:0] key, kmask, care;
  logic exp_ml, exp_mml;

  initial begin
    we = 0; dsl_en = 1; p1r = 1; p2r = '0; dl = '0; wdata = '0;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < W; i++) word[i] = rnd_t();
      @(negedge clk); we = 1; wdata = word;
      @(negedge clk); we = 0;
      // search
      key = W'($urandom);
      kmask = ($urandom_range(3) == 0) ? W'($urandom) : '0;
      if ($urandom_range(1) == 1)  // make a match likely
        for (int i = 0; i < W; i++) if (word[i] != TX) key[i] = (word[i] == T1);
      exp_ml = 1'b1;
      for (int i = 0; i < W; i++) begin
        dl[i].dl  = key[i] & ~kmask[i];
        dl[i].dlb = ~key[i] & ~kmask[i];
        if (!kmask[i] && word[i] != TX && (word[i] == T1) != key[i]) exp_ml = 1'b0;
        care[i] = (word[i] != TX);
      end
      #1 checks++;
      if (ml !== exp_ml) begin failures++; $display("ml word %p key %b mask %b got %b", word, key, kmask, ml); end
      // length phases
      for (int i = 0; i < W; i++) dl[i] = '{1'b1, 1'b1};
      p1r = 1;
      #1 checks++;
      if (cmd_pd !== care) begin failures++; $display("cmd_pd %b care %b", cmd_pd, care); end
      p1r = 0;
      #1 checks++;
      if (cmd_pd !== '0) failures++;
      p1r = 1;
      p2r = ($urandom_range(1) == 1) ? care : W'($urandom);
      exp_mml = ((p2r & ~care) == '0);
      #1 checks++;
      if (mml !== exp_mml) begin failures++; $display("mml p2r %b care %b got %b", p2r, care, mml); end
      checks++;
      if (data !== word) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
