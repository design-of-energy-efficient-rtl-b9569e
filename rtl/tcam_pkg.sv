// Shared types of the PDM ternary search engine.
//
// ternary_t is the content of one nonvolatile 4T2R cell, written as the
// resistance state of its two devices {RT is low-resistance, RB is
// low-resistance}: 0 = (LRS,HRS), 1 = (HRS,LRS), X = (HRS,HRS). The fourth
// code (LRS,LRS) is not a cell state and is never written by the engine.
// dl_t is the data-line pair of one column. phase_t lists the steps of one
// search: the input-segment search and the state-segment search make up
// Phase 1 (sequential input-state search), then the length evaluation
// (Phase 2), the length comparison (Phase 3) and the SRAM read.
// The resistance pairs of the three cell states are the published ones;
// the bit codes and the step names are this design's.
package tcam_pkg;

  typedef enum logic [1:0] {
    TX = 2'b00,   // (HRS,HRS): don't care
    T1 = 2'b01,   // (HRS,LRS): stores 1
    T0 = 2'b10,   // (LRS,HRS): stores 0
    TBAD = 2'b11  // (LRS,LRS): not a valid cell state
  } ternary_t;

  typedef struct packed {
    logic dl;
    logic dlb;
  } dl_t;

  // What the data-line driver puts on the columns.
  typedef enum logic [1:0] {
    DL_STANDBY = 2'b00,  // DL=DLB=0 on every column
    DL_SEARCH  = 2'b01,  // key bits, masked bits as DL=DLB=0
    DL_LENGTH  = 2'b10   // DL=DLB=1 on every column (Phases 2 and 3)
  } dl_mode_t;

  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_IN   = 3'd1,  // Phase 1a: search the input segment
    PH_ST   = 3'd2,  // Phase 1b: search the state segment of input matches
    PH_LEN  = 3'd3,  // Phase 2: find the longest pattern length
    PH_CMP  = 3'd4,  // Phase 3: find the entry with that length
    PH_RD   = 3'd5   // read the SRAM word of the longest match
  } phase_t;

  // True when the cell holds a care bit (0 or 1).
  function automatic logic is_care(ternary_t t);
    return t == T0 || t == T1;
  endfunction

endpackage
