// RCSD-4T2R nonvolatile TCAM cell, as logic.
//
// The cell holds one ternary value in two resistive devices RT and RB
// (see tcam_pkg::ternary_t). In a search the dynamic source line pulse goes
// through comparison transistor NC (gate DL) and RT, and through NCB (gate
// DLB) and RB, to node NX. NX rises above the threshold of the match-line
// driver NML only through a low-resistance device, so
//     nx = dsl_en & ((DL & RT_LRS) | (DLB & RB_LRS))
// and NML then pulls the match line low (mismatch). This gives the cell's
// full truth table: key 1 (DL=1,DLB=0) mismatches a stored 0, key 0
// mismatches a stored 1, a masked key (0,0) matches everything, and
// DL=DLB=1 raises NX exactly when the cell holds a care bit, which the
// priority-decision circuits use to read the pattern length.
//
// Interface: wdata is stored at the clock edge when we is high (the cell
// keeps its value with no reset, being nonvolatile). nx is combinational
// from dl, dsl_en and the stored value. The device physics, precharge and
// write voltages are not modelled; the table above follows the cell's
// published behaviour, the clocked write is this design's choice.
module tcam_cell_4t2r
  import tcam_pkg::*;
(
  input  logic     clk,
  input  logic     we,
  input  ternary_t wdata,
  input  dl_t      dl,
  input  logic     dsl_en,
  output logic     nx,
  output ternary_t data
);

  ternary_t cell_q;

  always_ff @(posedge clk) begin
    if (we) cell_q <= wdata;
  end

  logic rt_lrs, rb_lrs;
  assign rt_lrs = cell_q[1];
  assign rb_lrs = cell_q[0];

  always_comb nx = dsl_en & ((dl.dl & rt_lrs) | (dl.dlb & rb_lrs));

  assign data = cell_q;

endmodule
