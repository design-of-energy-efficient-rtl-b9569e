// Column mask data line (CMD) sensing and the Phase 2 result register.
//
// Every column has one CMD line, precharged at the start of Phase 2 and
// pulled low by any entry that matched in Phase 1 and holds a care bit in
// that column. A low CMD therefore means that the longest matching pattern
// is care in this column. With contiguous masks the OR of the matching
// entries' masks is the longest of them. At the end of Phase 2 (load high)
// the register takes P2R = ~CMD, 1 = care, and holds it for Phase 3.
// Timing: p2r changes one clock after load. Reset clears it.
// Sensing CMD into a register for Phase 3 is the published scheme; the
// clocked load and the reset are this design's choices.
module cmd_sense_p2r #(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned W       = 24
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [ENTRIES-1:0][W-1:0] cmd_pd,
  output logic [W-1:0]              p2r
);

  logic [W-1:0] cmd;

  always_comb begin
    cmd = '1;
    for (int e = 0; e < ENTRIES; e++) begin
      cmd &= ~cmd_pd[e];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     p2r <= '0;
    else if (load)  p2r <= ~cmd;
  end

endmodule
