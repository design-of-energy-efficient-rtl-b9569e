// Pattern length comparison circuit of one PDM cell (Phase 3).
//
// Phase 2's longest pattern length bit P2R (1 = care) gates the
// second-search transistor PSS. With PSS on, node MX is pulled down through
// the mask-search transistor NMC when the cell is care (NX high), or pulled
// up through the mask-search controller PMC when the cell is don't care
// (NX low). MX drives NMML, which pulls the entry's mask match line MML low.
// With PSS off MX stays low. So MML is discharged exactly when the longest
// length has a care bit where this entry has a don't care: the entry is
// shorter than the longest match. The case P2R don't care and cell care
// cannot happen for a matching entry; it leaves MML high here, as PSS is off.
// Purely combinational: mml_pd follows nx and p2r. The switch behaviour is
// the published circuit's; reducing MX and MML to logic levels is this
// model's simplification.
module pdm_len_cmp (
  input  logic nx,
  input  logic p2r,
  output logic mml_pd
);

  logic pss_on, nmc_on, pmc_on;
  logic mx;
  assign pss_on = p2r;
  assign nmc_on = nx;
  assign pmc_on = ~nx;

  always_comb begin
    mx     = pss_on & pmc_on & ~nmc_on;
    mml_pd = mx;
  end

endmodule
