// One TCAM word of W 4T2R plus PDM cells (an 8-bit word by default).
//
// The cells of the word share the precharged match line ML and the mask
// match line MML; a line reads 1 (still precharged) when no cell pulls it
// down, which stands for precharge plus sense amplifier. Each cell's CMD
// pull-down is brought out for its column. dsl_en enables the search of the
// whole word (the sequential input-state scheme disables state words).
// Write: the word is stored at the clock edge when we is high.
// ml and mml are combinational from the data lines, p1r, p2r and the cells.
// The 8-bit word follows the published 8-bit cell row; treating sensing as
// a NOR of the pull-downs is this model's simplification.
module tcam_row
  import tcam_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic           clk,
  input  logic           we,
  input  ternary_t [W-1:0] wdata,
  input  dl_t      [W-1:0] dl,
  input  logic           dsl_en,
  input  logic           p1r,
  input  logic [W-1:0]   p2r,
  output logic           ml,
  output logic           mml,
  output logic [W-1:0]   cmd_pd,
  output ternary_t [W-1:0] data
);

  logic [W-1:0] ml_pd, mml_pd;

  for (genvar i = 0; i < W; i++) begin : g_cell
    pdm_cell u_cell (
      .clk   (clk),
      .we    (we),
      .wdata (wdata[i]),
      .dl    (dl[i]),
      .dsl_en(dsl_en),
      .p1r   (p1r),
      .p2r   (p2r[i]),
      .ml_pd (ml_pd[i]),
      .cmd_pd(cmd_pd[i]),
      .mml_pd(mml_pd[i]),
      .data  (data[i])
    );
  end

  assign ml  = ~|ml_pd;
  assign mml = ~|mml_pd;

endmodule
