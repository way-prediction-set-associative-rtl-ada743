// tag_record_buffer: the Tag Record Buffer (TRB) of the Way Predict Module.
//
// A small register array (not a RAM) of ENTRIES effective tags, each compared
// in parallel with two tags: the tag of the access being looked up (lk_tag)
// and the tag of a line being saved into the cache (up_tag). The per-entry
// equality vectors are combinational. An entry is rewritten on the clock edge
// when wr_en is high. Whether an entry is in use is kept by the Way Record
// Buffer (an entry whose way bits are all zero is empty), so the TRB holds
// only tags; all entries reset to zero.
//
// Three entries of 10 bits follow the design's chosen size. The second
// compare port for the update path and the reset value are this design's
// choices.
module tag_record_buffer #(
  parameter int unsigned ENTRIES = 3,
  parameter int unsigned ETAG_W  = 10,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ETAG_W-1:0]  lk_tag,
  output logic [ENTRIES-1:0] lk_match,
  input  logic [ETAG_W-1:0]  up_tag,
  output logic [ENTRIES-1:0] up_match,
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  logic [ETAG_W-1:0]  wr_tag,
  output logic [ETAG_W-1:0]  tags [ENTRIES]
);

  logic [ETAG_W-1:0] trb_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) trb_q[e] <= '0;
    end else if (wr_en) begin
      trb_q[wr_idx] <= wr_tag;
    end
  end

  always_comb begin
    for (int e = 0; e < int'(ENTRIES); e++) begin
      lk_match[e] = (trb_q[e] == lk_tag);
      up_match[e] = (trb_q[e] == up_tag);
      tags[e]     = trb_q[e];
    end
  end

endmodule
