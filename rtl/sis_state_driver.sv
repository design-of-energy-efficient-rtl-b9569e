// State search driver of the sequential input-state (SIS) search.
//
// Each entry is split into a short input segment and a longer state
// segment, and the input segment is searched first. An entry's state
// segment is precharged and searched only when the active-low pre-charge
// control pc_n is low (the state search step) and the entry's input-segment
// match line is high; in every other case (pc_n high, or input mismatch)
// the state segment stays idle and spends no search energy, without
// changing the final result. Combinational: st_en[e] = ~pc_n & ml_in[e].
// The enable table is the published one; the active-low polarity of pc_n
// follows it, and the vector form for all entries is this design's.
module sis_state_driver #(
  parameter int unsigned ENTRIES = 4
) (
  input  logic               pc_n,
  input  logic [ENTRIES-1:0] ml_in,
  output logic [ENTRIES-1:0] st_en
);

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      st_en[e] = !pc_n && ml_in[e];
    end
  end

endmodule
