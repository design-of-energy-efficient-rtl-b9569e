// Sequencer of one PDM search.
//
// An accepted request (search_valid while search_ready) runs five steps,
// one clock each: PH_IN (input-segment search), PH_ST (state-segment search
// of the input matches, the sequential input-state scheme), PH_LEN (Phase 2,
// longest pattern length), PH_CMP (Phase 3, longest-match line) and PH_RD
// (SRAM read on that line). result_valid pulses for one clock after PH_RD,
// six clocks after the request was accepted, and search_ready is high only
// in PH_IDLE, so a new search can start every six clocks. The order of the
// phases is the published one; one clock per phase and the valid/ready
// handshake are this design's choice.
module pdm_controller
  import tcam_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   search_valid,
  output logic   search_ready,
  output phase_t phase,
  output logic   result_valid
);

  phase_t phase_d;

  always_comb begin
    unique case (phase)
      PH_IDLE: phase_d = search_valid ? PH_IN : PH_IDLE;
      PH_IN:   phase_d = PH_ST;
      PH_ST:   phase_d = PH_LEN;
      PH_LEN:  phase_d = PH_CMP;
      PH_CMP:  phase_d = PH_RD;
      default: phase_d = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase        <= PH_IDLE;
      result_valid <= 1'b0;
    end else begin
      phase        <= phase_d;
      result_valid <= (phase == PH_RD);
    end
  end

  assign search_ready = (phase == PH_IDLE);

endmodule
