// Energy-efficient ternary search engine with priority decision in memory.
//
// The pattern table is a TCAM of ENTRIES ternary entries, each an IN_W-bit
// input segment and an ST_W-bit state segment, plus one DATA_W-bit SRAM word
// per entry. Entries may be written in any order: the engine does not need
// the table sorted by pattern length and has no priority encoder. A search
// returns the longest matching pattern in three phases inside the array:
// Phase 1 compares the key with all entries (input segment first, then the
// state segment of only those entries whose input segment matched), Phase 2
// ORs the care masks of the matching entries column by column into the
// longest pattern length, and Phase 3 compares each matching entry's mask
// with that length, leaving one match line high. That line reads the SRAM
// word directly.
//
// Interface: a write (wr_en, wr_addr, wr_valid, wr_in, wr_st, wr_data)
// stores or deletes one entry and its word; it is accepted only while
// search_ready is high. A search starts when search_valid is high while
// search_ready is high; the key and its masks are taken in that clock.
// Six clocks later result_valid pulses for one clock, with result_hit,
// the one-hot result_line, the SRAM word result_data, the longest length
// result_len ({input, state}, 1 = care), state_search_en (the state
// words the search enabled), input_match (input-segment matches) and
// phase1_match (whole-entry matches before the length decision). These outputs hold until the next search ends.
module tcam_search_engine
  import tcam_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned IN_W    = 8,
  parameter int unsigned ST_W    = 16,
  parameter int unsigned DATA_W  = 16,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic                   wr_valid,
  input  ternary_t [IN_W-1:0]    wr_in,
  input  ternary_t [ST_W-1:0]    wr_st,
  input  logic [DATA_W-1:0]      wr_data,
  input  logic                   search_valid,
  output logic                   search_ready,
  input  logic [IN_W-1:0]        key_in,
  input  logic [IN_W-1:0]        key_in_mask,
  input  logic [ST_W-1:0]        key_st,
  input  logic [ST_W-1:0]        key_st_mask,
  output logic                   result_valid,
  output logic                   result_hit,
  output logic [ENTRIES-1:0]     result_line,
  output logic [DATA_W-1:0]      result_data,
  output logic [IN_W+ST_W-1:0]   result_len,
  output logic [ENTRIES-1:0]     state_search_en,
  output logic [ENTRIES-1:0]     input_match,
  output logic [ENTRIES-1:0]     phase1_match
);

  phase_t phase;
  logic   accept, wr_go;

  pdm_controller u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .search_valid(search_valid),
    .search_ready(search_ready),
    .phase       (phase),
    .result_valid(result_valid)
  );

  assign accept = search_valid && search_ready;
  assign wr_go  = wr_en && search_ready;

  // The key is held for the whole search.
  logic [IN_W-1:0] key_in_q, key_in_mask_q;
  logic [ST_W-1:0] key_st_q, key_st_mask_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_in_q      <= '0;
      key_in_mask_q <= '1;
      key_st_q      <= '0;
      key_st_mask_q <= '1;
    end else if (accept) begin
      key_in_q      <= key_in;
      key_in_mask_q <= key_in_mask;
      key_st_q      <= key_st;
      key_st_mask_q <= key_st_mask;
    end
  end

  logic [ENTRIES-1:0] mml_q;

  tcam_array #(.ENTRIES(ENTRIES), .IN_W(IN_W), .ST_W(ST_W)) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .phase      (phase),
    .wr_en      (wr_go),
    .wr_addr    (wr_addr),
    .wr_valid   (wr_valid),
    .wr_in      (wr_in),
    .wr_st      (wr_st),
    .key_in     (key_in_q),
    .key_in_mask(key_in_mask_q),
    .key_st     (key_st_q),
    .key_st_mask(key_st_mask_q),
    .ml_in_q    (input_match),
    .st_en_q    (state_search_en),
    .p1r_q      (phase1_match),
    .p2r_q      (result_len),
    .mml_q      (mml_q)
  );

  result_sram #(.ENTRIES(ENTRIES), .DATA_W(DATA_W)) u_sram (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (wr_go),
    .waddr(wr_addr),
    .wdata(wr_data),
    .re   (phase == PH_RD),
    .wl   (mml_q),
    .rdata(result_data)
  );

  assign result_line = mml_q;
  assign result_hit  = |mml_q;

  // A write is only taken while no search is running.
  a_write_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 wr_en |-> search_ready)
    else $error("write while a search is running");

endmodule
