// replacement_scheme: the Replacement Scheme (RS) of the Way Predict Module.
//
// Combinational. When a line is saved into the cache, this decides what
// happens to the TRB/WRB for its effective tag:
//   1. The tag is already in the TRB (`match`, an entry in use whose tag is
//      equal): RS_UPDATE that entry, i.e. set the way bit in its WRB entry.
//   2. Not in the TRB, and some entry's WRB bits are all ones (`full`, the
//      old tag is in both ways): RS_REPLACE that entry with the new tag.
//   3. Not in the TRB and no entry is all ones: RS_ALLOCATE the new tag to a
//      new, empty entry (`used` low); no replacement happens.
//   4. Not in the TRB, none all ones and none empty: RS_NONE, the tag is not
//      recorded. Accesses to it then read both ways, which is always safe.
// Rules 1 to 3 follow the design. Rule 4, and taking the lowest-numbered
// entry where several qualify, are this design's choices.
module replacement_scheme
#(
  parameter int unsigned ENTRIES = 3,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic [ENTRIES-1:0] match,
  input  logic [ENTRIES-1:0] full,
  input  logic [ENTRIES-1:0] used,
  output wp_pkg::rs_action_e         action,
  output logic [IDX_W-1:0]   idx
);

  // Index of the lowest set bit of v (0 when v is zero).
  function automatic logic [IDX_W-1:0] first_set(input logic [ENTRIES-1:0] v);
    logic [IDX_W-1:0] r;
    r = '0;
    for (int e = int'(ENTRIES) - 1; e >= 0; e--) begin
      if (v[e]) r = IDX_W'(e);
    end
    return r;
  endfunction

  logic [ENTRIES-1:0] hit;
  assign hit = match & used;

  always_comb begin
    if (|hit) begin
      action = wp_pkg::RS_UPDATE;
      idx    = first_set(hit);
    end else if (|full) begin
      action = wp_pkg::RS_REPLACE;
      idx    = first_set(full);
    end else if (|(~used)) begin
      action = wp_pkg::RS_ALLOCATE;
      idx    = first_set(~used);
    end else begin
      action = wp_pkg::RS_NONE;
      idx    = '0;
    end
  end

endmodule
