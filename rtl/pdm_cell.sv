// 4T2R plus PDM cell: the unmodified 4T2R TCAM cell with its pattern length
// evaluation (Phase 2) and comparison (Phase 3) circuits.
//
// All three line pull-downs come from the same node NX, so what they mean
// depends on the data lines: with the search key on DL/DLB, ml_pd is the
// cell's mismatch (Phase 1); with DL=DLB=1, NX marks a care cell, cmd_pd is
// the Phase 2 pull-down of the column's CMD and mml_pd the Phase 3 pull-down
// of the entry's MML. The row and array read each line only in its phase.
// Write: wdata is stored at the clock edge when we is high.
module pdm_cell
  import tcam_pkg::*;
(
  input  logic     clk,
  input  logic     we,
  input  ternary_t wdata,
  input  dl_t      dl,
  input  logic     dsl_en,
  input  logic     p1r,
  input  logic     p2r,
  output logic     ml_pd,
  output logic     cmd_pd,
  output logic     mml_pd,
  output ternary_t data
);

  logic nx;

  tcam_cell_4t2r u_cell (
    .clk   (clk),
    .we    (we),
    .wdata (wdata),
    .dl    (dl),
    .dsl_en(dsl_en),
    .nx    (nx),
    .data  (data)
  );

  // NML: NX above threshold discharges the match line.
  assign ml_pd = nx;

  pdm_len_eval u_eval (
    .nx    (nx),
    .p1r   (p1r),
    .cmd_pd(cmd_pd)
  );

  pdm_len_cmp u_cmp (
    .nx    (nx),
    .p2r   (p2r),
    .mml_pd(mml_pd)
  );

endmodule
