// Testbench of tcam_array. First the worked example of the priority
// decision: four entries in arbitrary order, key 10100101 on the 8-bit
// input segment; three entries match and the one with the longest length
// 11111100 must be the only line left after Phase 3. Then random prefix
// patterns in random slots, checked phase by phase against the reference
// lookup: input matches, the state words the SIS driver enables, Phase 1,
// the longest length and the final line.
module tb_tcam_array;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int E = 4, IW = 8, SW = 16, LW = IW + SW;

  logic clk = 0, rst_n;
  phase_t phase;
  logic wr_en, wr_valid;
  logic [1:0] wr_addr;
  ternary_t [IW-1:0] wr_in;
  ternary_t [SW-1:0] wr_st;
  logic [IW-1:0] key_in, key_in_mask;
  logic [SW-1:0] key_st, key_st_mask;
  logic [E-1:0] ml_in_q, st_en_q, p1r_q, mml_q;
  logic [LW-1:0] p2r_q;
  int checks = 0, failures = 0;

  tcam_array #(.ENTRIES(E), .IN_W(IW), .ST_W(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MAXW-1:0] m_care [E], m_val [E];
  logic m_valid [E];

  task automatic write(int a, logic v, logic [LW-1:0] care, logic [LW-1:0] val);
    @(negedge clk);
    wr_en = 1; wr_addr = 2'(a); wr_valid = v;
    for (int i = 0; i < SW; i++) wr_st[i] = to_t(care[i], val[i]);
    for (int i = 0; i < IW; i++) wr_in[i] = to_t(care[SW+i], val[SW+i]);
    m_care[a] = MAXW'(care); m_val[a] = MAXW'(val); m_valid[a] = v;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic chk(string what, logic [LW-1:0] got, logic [LW-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  int n_multi = 0, n_skip = 0;

  task automatic search(logic [LW-1:0] key, logic [LW-1:0] kmask);
    logic [E-1:0] e_in, e_p1, e_line;
    logic [LW-1:0] e_len;
    int best;
    @(negedge clk);
    {key_in, key_st} = key; {key_in_mask, key_st_mask} = kmask;
    e_in = '0; e_p1 = '0; e_line = '0; e_len = '0; best = -1;
    for (int e = 0; e < E; e++) begin
      e_in[e] = m_valid[e] && ref_match(m_care[e] >> SW, m_val[e] >> SW, MAXW'(key >> SW), MAXW'(kmask >> SW));
      e_p1[e] = m_valid[e] && ref_match(m_care[e], m_val[e], MAXW'(key), MAXW'(kmask));
      if (e_p1[e] && ref_len(m_care[e]) > best) begin best = ref_len(m_care[e]); e_len = LW'(m_care[e]); end
    end
    for (int e = 0; e < E; e++) if (e_p1[e] && ref_len(m_care[e]) == best) e_line[e] = 1'b1;
    if ($countones(e_p1) > 1) n_multi++;
    if ((e_in ^ {E{1'b1}}) != '0) n_skip++;
    phase = PH_IN;  @(negedge clk); chk("input match", LW'(ml_in_q), LW'(e_in));
    phase = PH_ST;  @(negedge clk); chk("state search enables", LW'(st_en_q), LW'(e_in));
                                    chk("phase 1", LW'(p1r_q), LW'(e_p1));
    phase = PH_LEN; @(negedge clk); chk("longest length", p2r_q, e_len);
    phase = PH_CMP; @(negedge clk); chk("longest match line", LW'(mml_q), LW'(e_line));
    phase = PH_IDLE;
  endtask

  logic [LW-1:0] c, v, k, km;
  int len, src;

  initial begin
    rst_n = 0; phase = PH_IDLE; wr_en = 0; wr_valid = 0; wr_addr = 0;
    wr_in = '0; wr_st = '0; key_in = '0; key_in_mask = '0; key_st = '0; key_st_mask = '0;
    for (int e = 0; e < E; e++) begin m_valid[e] = 0; m_care[e] = '0; m_val[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Worked example: state segment left don't care.
    write(0, 1, {8'b1111_0000, 16'h0}, {8'b1010_0000, 16'h0});
    write(1, 1, {8'b1111_1100, 16'h0}, {8'b1010_0100, 16'h0});
    write(2, 1, {8'b1100_0000, 16'h0}, {8'b1100_0000, 16'h0});
    write(3, 1, {8'b1000_0000, 16'h0}, {8'b1000_0000, 16'h0});
    search({8'b1010_0101, 16'h1234}, '0);
    chk("example: length 11111100", p2r_q, {8'b1111_1100, 16'h0});
    chk("example: entry 2 selected", LW'(mml_q), LW'(4'b0010));
    // Random prefix patterns.
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(1) == 0 || n < 4) begin
        len = $urandom_range(LW);
        c = LW'(prefix_mask(LW, len));
        v = LW'({$urandom, $urandom}) & c;
        write($urandom_range(E-1), ($urandom_range(7) != 0), c, v);
      end
      src = $urandom_range(E-1);
      k = LW'({$urandom, $urandom});
      if ($urandom_range(2) != 0) k = (k & ~LW'(m_care[src])) | LW'(m_val[src]);
      if ($urandom_range(3) == 0) k[LW-1 - $urandom_range(LW-1)] ^= 1'b1;
      km = ($urandom_range(5) == 0) ? LW'(prefix_mask(LW, LW)) >> $urandom_range(LW) : '0;
      search(k, km);
    end
    checks++;
    if (n_multi == 0 || n_skip == 0) begin failures++; $display("coverage: multi %0d skip %0d", n_multi, n_skip); end
    $display("multiple matches resolved: %0d, searches with skipped state words: %0d", n_multi, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
