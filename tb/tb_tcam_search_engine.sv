// End-to-end testbench of tcam_search_engine at its default size.
//
// Writes patterns of random prefix lengths into random slots (overwriting
// and deleting entries, never sorting), then runs searches through the
// valid/ready handshake and compares every result with the reference
// longest-match lookup: hit, one-hot line, SRAM word, longest length, the
// input-segment matches and the state words the sequential input-state
// scheme enabled. The latency from an accepted request to result_valid must
// be six clocks. Directed cases come first: the worked example of the
// priority decision (key 10100101, longest length 11111100, second entry),
// a tie between two entries of equal length, and care masks that are not
// contiguous. The testbench counts how often each mechanism occurred: multiple matches resolved in memory, state
// words skipped and searched, no hit, masked key bits, overwrites, deletes
// and requests held during a busy search. A mechanism that never occurred
// counts as a failure.
module tb_tcam_search_engine;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int E = 4, IW = 8, SW = 16, LW = IW + SW, DW = 16;

  logic clk = 0, rst_n;
  logic wr_en, wr_valid;
  logic [1:0] wr_addr;
  ternary_t [IW-1:0] wr_in;
  ternary_t [SW-1:0] wr_st;
  logic [DW-1:0] wr_data;
  logic search_valid, search_ready;
  logic [IW-1:0] key_in, key_in_mask;
  logic [SW-1:0] key_st, key_st_mask;
  logic result_valid, result_hit;
  logic [E-1:0] result_line, state_search_en, input_match, phase1_match;
  logic [DW-1:0] result_data;
  logic [LW-1:0] result_len;
  int checks = 0, failures = 0;

  tcam_search_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MAXW-1:0] m_care [E], m_val [E];
  logic [DW-1:0] m_data [E];
  logic m_valid [E];

  int n_multi = 0, n_skip = 0, n_stsearch = 0, n_nohit = 0, n_masked = 0;
  int n_over = 0, n_del = 0, n_held = 0, n_hit = 0;

  task automatic write(int a, logic v, logic [LW-1:0] care, logic [LW-1:0] val, logic [DW-1:0] d);
    @(negedge clk);
    if (m_valid[a] && v) n_over++;
    if (m_valid[a] && !v) n_del++;
    wr_en = 1; wr_addr = 2'(a); wr_valid = v; wr_data = d;
    for (int i = 0; i < SW; i++) wr_st[i] = to_t(care[i], val[i]);
    for (int i = 0; i < IW; i++) wr_in[i] = to_t(care[SW+i], val[SW+i]);
    m_care[a] = MAXW'(care); m_val[a] = MAXW'(val); m_valid[a] = v; m_data[a] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic chk(string what, logic [LW-1:0] got, logic [LW-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic search(logic [LW-1:0] key, logic [LW-1:0] kmask, logic hold);
    logic [E-1:0] e_in, e_p1, e_line;
    logic [LW-1:0] e_len;
    logic [DW-1:0] e_data;
    int best, lat;
    e_in = '0; e_p1 = '0; e_line = '0; e_len = '0; e_data = '0; best = -1;
    for (int e = 0; e < E; e++) begin
      e_in[e] = m_valid[e] && ref_match(m_care[e] >> SW, m_val[e] >> SW, MAXW'(key >> SW), MAXW'(kmask >> SW));
      e_p1[e] = m_valid[e] && ref_match(m_care[e], m_val[e], MAXW'(key), MAXW'(kmask));
      if (e_p1[e] && ref_len(m_care[e]) > best) begin best = ref_len(m_care[e]); e_len = LW'(m_care[e]); end
    end
    for (int e = 0; e < E; e++)
      if (e_p1[e] && ref_len(m_care[e]) == best) begin e_line[e] = 1'b1; e_data |= m_data[e]; end
    if ($countones(e_p1) > 1) n_multi++;
    if (e_line == '0) n_nohit++; else n_hit++;
    for (int e = 0; e < E; e++) begin
      if (m_valid[e] && !e_in[e]) n_skip++;
      if (e_in[e]) n_stsearch++;
    end
    if (kmask != '0) n_masked++;
    @(negedge clk);
    {key_in, key_st} = key; {key_in_mask, key_st_mask} = kmask;
    search_valid = 1;
    checks++; if (!search_ready) begin failures++; $display("engine not ready"); end
    @(negedge clk);
    // A held request, or a changed key, must not disturb the running search.
    search_valid = hold;
    if (hold) n_held++;
    key_in = ~key_in; key_st = ~key_st;
    lat = 1;
    while (!result_valid && lat < 20) begin
      checks++;
      if (search_ready) begin failures++; $display("ready while busy"); end
      @(negedge clk); lat++;
    end
    search_valid = 0;
    chk("latency", LW'(lat), LW'(6));
    chk("hit", LW'(result_hit), LW'(e_line != '0));
    chk("line", LW'(result_line), LW'(e_line));
    chk("data", LW'(result_data), LW'(e_data));
    chk("input matches", LW'(input_match), LW'(e_in));
    chk("state words searched", LW'(state_search_en), LW'(e_in));
    chk("phase 1 matches", LW'(phase1_match), LW'(e_p1));
    if (e_line != '0) chk("longest length", result_len, e_len);
    @(negedge clk);
    checks++;
    if (result_valid) begin failures++; $display("result_valid longer than one clock"); end
  endtask

  logic [LW-1:0] c, v, k, km;
  int len, src;

  initial begin
    rst_n = 0; wr_en = 0; wr_valid = 0; wr_addr = 0; wr_data = 0;
    wr_in = '0; wr_st = '0; search_valid = 0;
    key_in = '0; key_in_mask = '0; key_st = '0; key_st_mask = '0;
    for (int e = 0; e < E; e++) begin m_valid[e] = 0; m_care[e] = '0; m_val[e] = '0; m_data[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Empty table: no hit.
    search('0, '0, 0);
    // Worked example on the input segment.
    write(0, 1, {8'b1111_0000, 16'h0}, {8'b1010_0000, 16'h0}, 16'h0A01);
    write(1, 1, {8'b1111_1100, 16'h0}, {8'b1010_0100, 16'h0}, 16'h0A02);
    write(2, 1, {8'b1100_0000, 16'h0}, {8'b1100_0000, 16'h0}, 16'h0A03);
    write(3, 1, {8'b1000_0000, 16'h0}, {8'b1000_0000, 16'h0}, 16'h0A04);
    search({8'b1010_0101, 16'h0}, '0, 0);
    chk("example: longest length", result_len, {8'b1111_1100, 16'h0});
    chk("example: entry 2", LW'(result_line), LW'(4'b0010));
    chk("example: SRAM word", LW'(result_data), LW'(16'h0A02));
    // A longer pattern written into a free-standing slot wins at once.
    write(3, 1, {8'hFF, 16'hF000}, {8'b1010_0101, 16'h5000}, 16'h0A05);
    search({8'b1010_0101, 16'h5abc}, '0, 0);
    chk("update: new longest entry", LW'(result_line), LW'(4'b1000));
    // Two matching entries of the same length: both lines, words ORed.
    write(0, 1, {8'hF0, 16'h0}, {8'hA0, 16'h0}, 16'h00F0);
    write(1, 1, {8'hF0, 16'h0}, {8'hA0, 16'h0}, 16'h0F00);
    write(2, 0, '0, '0, 16'h0);
    write(3, 0, '0, '0, 16'h0);
    search({8'hA7, 16'h1111}, '0, 0);
    chk("tie: both lines", LW'(result_line), LW'(4'b0011));
    chk("tie: words ORed", LW'(result_data), LW'(16'h0FF0));
    // Care bits that are not one contiguous run: the ORed mask equals
    // neither entry, so Phase 3 leaves no line although both matched.
    write(0, 1, {8'hC0, 16'h0}, {8'h80, 16'h0}, 16'h0001);
    write(1, 1, {8'h30, 16'h0}, {8'h20, 16'h0}, 16'h0002);
    @(negedge clk);
    {key_in, key_st} = {8'hA0, 16'h0}; {key_in_mask, key_st_mask} = '0;
    search_valid = 1;
    @(negedge clk); search_valid = 0;
    while (!result_valid) @(negedge clk);
    chk("split masks: both matched", LW'(phase1_match), LW'(4'b0011));
    chk("split masks: ORed length", result_len, {8'hF0, 16'h0});
    chk("split masks: no line", LW'(result_line), '0);
    @(negedge clk);
    write(0, 0, '0, '0, 16'h0);
    write(1, 0, '0, '0, 16'h0);
    // Random traffic.
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(2) == 0) begin
        len = $urandom_range(LW);
        c = LW'(prefix_mask(LW, len));
        v = LW'({$urandom, $urandom}) & c;
        write($urandom_range(E-1), ($urandom_range(7) != 0), c, v, DW'($urandom));
      end
      src = $urandom_range(E-1);
      k = LW'({$urandom, $urandom});
      if ($urandom_range(3) != 0) k = (k & ~LW'(m_care[src])) | LW'(m_val[src]);
      if ($urandom_range(4) == 0) k[LW-1 - $urandom_range(LW-1)] ^= 1'b1;
      km = ($urandom_range(5) == 0) ? LW'(prefix_mask(LW, LW)) >> $urandom_range(1, LW) : '0;
      search(k, km, $urandom_range(3) == 0);
    end
    $display("multiple matches resolved %0d, state words skipped %0d, searched %0d, hits %0d, no hit %0d",
             n_multi, n_skip, n_stsearch, n_hit, n_nohit);
    $display("masked keys %0d, overwrites %0d, deletes %0d, held requests %0d", n_masked, n_over, n_del, n_held);
    checks++; if (n_multi == 0)    begin failures++; $display("no multiple match"); end
    checks++; if (n_skip == 0)     begin failures++; $display("no state word skipped"); end
    checks++; if (n_stsearch == 0) begin failures++; $display("no state word searched"); end
    checks++; if (n_hit == 0)      begin failures++; $display("no hit"); end
    checks++; if (n_nohit == 0)    begin failures++; $display("no miss"); end
    checks++; if (n_masked == 0)   begin failures++; $display("no masked key"); end
    checks++; if (n_over == 0)     begin failures++; $display("no overwrite"); end
    checks++; if (n_del == 0)      begin failures++; $display("no delete"); end
    checks++; if (n_held == 0)     begin failures++; $display("no held request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
