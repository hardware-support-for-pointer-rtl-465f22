// hat_compare: the four parallel comparators of the HAT.
//
// Each of the four lanes has a 2:1 multiplexer that selects either one way of
// the addressed cache set or one entry of the current four-entry group of the
// L2 line buffer, and an equality comparator against the search key. The
// same four comparators therefore serve the cache lookup and every step of an
// overflow-line search, four entries per cycle, as in the document's
// structure drawing. A lane only matches when its selected entry is valid.
// Purely combinational; the caller registers the result if it needs to.
module hat_compare #(
  parameter int unsigned KEY_W = 32,
  parameter int unsigned LANES = 4
) (
  input  logic                         sel_buf,    // 1: compare the buffer group
  input  logic [KEY_W-1:0]             key,        // search key
  input  logic [LANES-1:0][KEY_W-1:0]  set_keys,   // keys of the cache set ways
  input  logic [LANES-1:0]             set_valid,
  input  logic [LANES-1:0][KEY_W-1:0]  buf_keys,   // keys of one buffer group
  input  logic [LANES-1:0]             buf_valid,
  output logic [LANES-1:0]             match,      // one bit per lane
  output logic                         any_match
);
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      if (sel_buf) match[l] = buf_valid[l] && (buf_keys[l] == key);
      else         match[l] = set_valid[l] && (set_keys[l] == key);
    end
    any_match = |match;
  end
endmodule
