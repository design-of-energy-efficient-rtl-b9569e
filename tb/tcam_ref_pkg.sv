// Reference model for the search engine testbenches: a plain longest-match
// ternary lookup, written without the in-memory phases. Entries are stored
// as (care, value) bit vectors of width LW in {input, state} order.
package tcam_ref_pkg;
  import tcam_pkg::*;

  localparam int MAXW = 64;

  // True when every care bit of the entry equals the key, key-masked bits
  // excepted.
  function automatic logic ref_match(logic [MAXW-1:0] care, logic [MAXW-1:0] val,
                                     logic [MAXW-1:0] key, logic [MAXW-1:0] kmask);
    return ((care & ~kmask & (val ^ key)) == '0);
  endfunction

  function automatic int ref_len(logic [MAXW-1:0] care);
    return $countones(care);
  endfunction

  // Ternary code of one bit.
  function automatic ternary_t to_t(logic care, logic v);
    return !care ? TX : (v ? T1 : T0);
  endfunction

  // A care mask of `len` ones at the top of an lw-bit entry (prefix).
  function automatic logic [MAXW-1:0] prefix_mask(int lw, int len);
    logic [MAXW-1:0] m = '0;
    for (int i = 0; i < len; i++) m[lw-1-i] = 1'b1;
    return m;
  endfunction
endpackage
