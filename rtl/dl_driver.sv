// Search data-line driver for W columns.
//
// DL_SEARCH puts the key on the data lines: key bit 1 as DL=1/DLB=0, key
// bit 0 as DL=0/DLB=1, and a masked bit as DL=DLB=0, which every cell
// matches. DL_LENGTH drives DL=DLB=1 on all columns, the input the
// priority-decision phases use to read which cells are care. DL_STANDBY
// holds all lines at 0. Combinational. The line values of each operation
// are those of the cell's published search table; the driver itself, and
// the mode encoding, are this design's.
module dl_driver
  import tcam_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  dl_mode_t         mode,
  input  logic [W-1:0]     key,
  input  logic [W-1:0]     mask,
  output dl_t    [W-1:0]   dl
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      unique case (mode)
        DL_SEARCH: begin
          dl[i].dl  = key[i] & ~mask[i];
          dl[i].dlb = ~key[i] & ~mask[i];
        end
        DL_LENGTH: dl[i] = '{dl: 1'b1, dlb: 1'b1};
        default:   dl[i] = '{dl: 1'b0, dlb: 1'b0};
      endcase
    end
  end

endmodule
