// Workload testbench of the sequential input-state search: a table of 16
// entries, one per hex digit, each with the digit in its 8-bit input
// segment (all care) and a random state pattern. Searches with uniformly
// random hex digits and random states match the input segment of one entry
// in 16, so the SIS driver should leave 15 of every 16 state words idle
// (93.75 %). The testbench counts the state words actually enabled, checks
// each search's result against the reference lookup, and checks that the
// skipped share is 93.75 % within one percentage point.
module tb_sis_hex_workload;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int E = 16, IW = 8, SW = 16, LW = IW + SW, DW = 16;
  localparam int SEARCHES = 3000;

  logic clk = 0, rst_n;
  logic wr_en, wr_valid;
  logic [3:0] wr_addr;
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

  tcam_search_engine #(.ENTRIES(E), .IN_W(IW), .ST_W(SW), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MAXW-1:0] m_care [E], m_val [E];
  logic [SW-1:0] st_val [E];
  int enabled = 0, hits = 0;
  real skipped;

  initial begin
    rst_n = 0; wr_en = 0; wr_valid = 0; wr_addr = 0; wr_data = 0; wr_in = '0; wr_st = '0;
    search_valid = 0; key_in = '0; key_in_mask = '0; key_st = '0; key_st_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < E; e++) begin
      logic [LW-1:0] c, v;
      // entries written in a scrambled order: slot e holds digit (e*7+3) mod 16
      st_val[e] = SW'($urandom);
      c = {8'hFF, 16'hFFF0};  // the state's last nibble is don't care
      v = {8'((e * 7 + 3) % 16), st_val[e] & 16'hFFF0};
      m_care[e] = MAXW'(c); m_val[e] = MAXW'(v);
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(e); wr_valid = 1; wr_data = DW'(e);
      for (int i = 0; i < LW; i++) begin
        if (i < SW) wr_st[i] = to_t(c[i], v[i]);
        else        wr_in[i-SW] = to_t(c[i], v[i]);
      end
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < SEARCHES; n++) begin
      logic [E-1:0] e_line;
      logic [LW-1:0] k;
      int pick;
      k[LW-1 -: IW] = 8'($urandom_range(15));
      pick = 0;
      for (int e = 0; e < E; e++) if ((e * 7 + 3) % 16 == int'(k[LW-1 -: IW])) pick = e;
      k[SW-1:0] = ($urandom_range(1) == 1) ? st_val[pick] ^ 16'($urandom_range(15)) : 16'($urandom);
      e_line = '0;
      for (int e = 0; e < E; e++) e_line[e] = ref_match(m_care[e], m_val[e], MAXW'(k), '0);
      @(negedge clk);
      {key_in, key_st} = k; search_valid = 1;
      @(negedge clk); search_valid = 0;
      while (!result_valid) @(negedge clk);
      enabled += $countones(state_search_en);
      if (result_hit) hits++;
      checks++;
      if (result_line !== e_line) begin failures++; $display("key %h line %b expected %b", k, result_line, e_line); end
      checks++;
      if ($countones(state_search_en) != 1) begin failures++; $display("key %h enabled %b", k, state_search_en); end
    end
    skipped = 100.0 * (1.0 - real'(enabled) / real'(SEARCHES * E));
    $display("state words skipped: %0.2f %% of %0d, hits %0d", skipped, SEARCHES * E, hits);
    checks++;
    if (skipped < 92.75 || skipped > 94.75) begin failures++; $display("skipped share off 93.75 %%"); end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
