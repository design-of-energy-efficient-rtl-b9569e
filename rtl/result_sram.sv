// SRAM half of the pattern table: one DATA_W word per TCAM entry.
//
// Written by binary address like any SRAM. Read through word lines driven
// directly by the TCAM's one-hot longest-match lines, so no priority
// encoder or address decoder sits between search and read. If several word
// lines are high the bit lines give the OR of their words; with none high
// the read returns 0. Read is synchronous: rdata changes one clock after re.
// The table's size and word are this design's choice.
module result_sram #(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned DATA_W  = 16,
  localparam int unsigned AW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [DATA_W-1:0]  wdata,
  input  logic               re,
  input  logic [ENTRIES-1:0] wl,
  output logic [DATA_W-1:0]  rdata
);

  logic [DATA_W-1:0] mem [ENTRIES];
  logic [DATA_W-1:0] bitline;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    bitline = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (wl[e]) bitline |= mem[e];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= bitline;
  end

endmodule
