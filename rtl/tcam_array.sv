// TCAM array with priority decision in memory (PDM) and sequential
// input-state (SIS) search.
//
// ENTRIES entries are stored in any order; each is an input-segment word
// (IN_W cells) and a state-segment word (ST_W cells) of 4T2R plus PDM
// cells, plus a valid bit. The pattern length of an entry is not stored: it
// is the set of its care cells, read back through the data lines. One
// search walks through the phases given on `phase` (see pdm_controller):
//   PH_IN   the input key is put on the input words; ml_in_q latches each
//           valid entry's input match.
//   PH_ST   the SIS driver enables the state words of input matches only;
//           p1r_q latches the Phase 1 result (input and state match),
//           st_en_q which state words were searched.
//   PH_LEN  Phase 2: DL=DLB=1 on all columns; matching entries pull down
//           the CMD of their care columns; p2r_q latches the longest
//           pattern length (1 = care), entry bit order {input, state}.
//   PH_CMP  Phase 3: DL=DLB=1 again with P2R applied; a matching entry
//           keeps its MML high only if it has no don't care where P2R is
//           care, i.e. its length equals the longest; mml_q latches it.
// mml_q is the one-hot longest-match line that replaces a priority
// encoder. Each register changes at the clock edge ending its phase and
// holds until the next search. Writes (wr_en) store an entry at the clock
// edge; they are meant for idle time. The phases and circuits follow the
// published scheme; the valid bit, the clocked phase registers and the
// {input, state} bit order are this design's choices. The longest-length
// rule relies on each entry's care cells forming one contiguous run.
module tcam_array
  import tcam_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned IN_W    = 8,
  parameter int unsigned ST_W    = 16,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned LW     = IN_W + ST_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  phase_t                   phase,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  logic                     wr_valid,
  input  ternary_t [IN_W-1:0]      wr_in,
  input  ternary_t [ST_W-1:0]      wr_st,
  input  logic [IN_W-1:0]          key_in,
  input  logic [IN_W-1:0]          key_in_mask,
  input  logic [ST_W-1:0]          key_st,
  input  logic [ST_W-1:0]          key_st_mask,
  output logic [ENTRIES-1:0]       ml_in_q,
  output logic [ENTRIES-1:0]       st_en_q,
  output logic [ENTRIES-1:0]       p1r_q,
  output logic [LW-1:0]            p2r_q,
  output logic [ENTRIES-1:0]       mml_q
);

  // ---- data lines ----
  dl_mode_t mode_in, mode_st;
  dl_t [IN_W-1:0] dl_in;
  dl_t [ST_W-1:0] dl_st;

  always_comb begin
    mode_in = DL_STANDBY;
    mode_st = DL_STANDBY;
    unique case (phase)
      PH_IN:          mode_in = DL_SEARCH;
      PH_ST:          mode_st = DL_SEARCH;
      PH_LEN, PH_CMP: begin
        mode_in = DL_LENGTH;
        mode_st = DL_LENGTH;
      end
      default: ;
    endcase
  end

  dl_driver #(.W(IN_W)) u_dl_in (
    .mode(mode_in), .key(key_in), .mask(key_in_mask), .dl(dl_in)
  );
  dl_driver #(.W(ST_W)) u_dl_st (
    .mode(mode_st), .key(key_st), .mask(key_st_mask), .dl(dl_st)
  );

  // ---- SIS: state words searched only behind an input match ----
  logic [ENTRIES-1:0] st_en;
  sis_state_driver #(.ENTRIES(ENTRIES)) u_sis (
    .pc_n (phase != PH_ST),
    .ml_in(ml_in_q),
    .st_en(st_en)
  );

  // ---- entries ----
  logic [ENTRIES-1:0] valid_q;
  logic [ENTRIES-1:0] we;
  logic [ENTRIES-1:0] ml_in, ml_st, mml_in, mml_st;
  logic [ENTRIES-1:0] dsl_in, dsl_st;
  logic [ENTRIES-1:0][LW-1:0] cmd_pd;
  logic [LW-1:0] p2r;

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      we[e] = wr_en && (wr_addr == AW'(e));
      unique case (phase)
        PH_IN:          begin dsl_in[e] = valid_q[e]; dsl_st[e] = 1'b0;     end
        PH_ST:          begin dsl_in[e] = 1'b0;       dsl_st[e] = st_en[e]; end
        PH_LEN, PH_CMP: begin dsl_in[e] = p1r_q[e];   dsl_st[e] = p1r_q[e]; end
        default:        begin dsl_in[e] = 1'b0;       dsl_st[e] = 1'b0;     end
      endcase
    end
  end

  assign p2r = p2r_q;

  for (genvar e = 0; e < ENTRIES; e++) begin : g_entry
    tcam_row #(.W(IN_W)) u_in (
      .clk   (clk),
      .we    (we[e]),
      .wdata (wr_in),
      .dl    (dl_in),
      .dsl_en(dsl_in[e]),
      .p1r   (p1r_q[e]),
      .p2r   (p2r[LW-1 -: IN_W]),
      .ml    (ml_in[e]),
      .mml   (mml_in[e]),
      .cmd_pd(cmd_pd[e][LW-1 -: IN_W]),
      .data  ()
    );
    tcam_row #(.W(ST_W)) u_st (
      .clk   (clk),
      .we    (we[e]),
      .wdata (wr_st),
      .dl    (dl_st),
      .dsl_en(dsl_st[e]),
      .p1r   (p1r_q[e]),
      .p2r   (p2r[ST_W-1:0]),
      .ml    (ml_st[e]),
      .mml   (mml_st[e]),
      .cmd_pd(cmd_pd[e][ST_W-1:0]),
      .data  ()
    );
  end

  cmd_sense_p2r #(.ENTRIES(ENTRIES), .W(LW)) u_p2r (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (phase == PH_LEN),
    .cmd_pd(cmd_pd),
    .p2r   (p2r_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      ml_in_q <= '0;
      st_en_q <= '0;
      p1r_q   <= '0;
      mml_q   <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (we[e]) valid_q[e] <= wr_valid;
      end
      unique case (phase)
        PH_IN: ml_in_q <= ml_in & valid_q;
        PH_ST: begin
          st_en_q <= st_en;
          p1r_q   <= st_en & ml_st;
        end
        // MMLs are precharged only for the Phase 1 matches.
        PH_CMP: mml_q <= p1r_q & mml_in & mml_st;
        default: ;
      endcase
    end
  end

endmodule
