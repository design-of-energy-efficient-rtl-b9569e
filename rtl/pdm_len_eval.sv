// Pattern length evaluation circuit of one PDM cell (Phase 2).
//
// Two NMOS transistors in series hang on the column mask data line CMD:
// NM, gated by the cell node NX, and the first-search transistor NFS, gated
// by the entry's Phase 1 result. With DL=DLB=1 on the data lines NX is high
// exactly for a care cell, so CMD is pulled low when the entry matched in
// Phase 1 and holds a care bit in this column; otherwise the precharged CMD
// stays high. cmd_pd is that pull-down, active high and combinational. The
// wired-OR of a column and its sensing are in cmd_sense_p2r.
// The transistor arrangement is the published circuit's; representing the
// precharged line by an active-high pull-down is this model's convention.
module pdm_len_eval (
  input  logic nx,
  input  logic p1r,
  output logic cmd_pd
);

  logic nm_on, nfs_on;
  assign nm_on  = nx;
  assign nfs_on = p1r;

  always_comb cmd_pd = nm_on & nfs_on;

endmodule
