// way_predict_module: the Way Predict Module (WPM).
//
// Predicts, before the cache arrays are read, which ways can hold the line an
// access wants, so that only those ways' tag and data memories are enabled.
// It holds a Tag Record Buffer (TRB) of effective tags (TagL, the low bits
// of the cache tag) and a Way Record Buffer (WRB) with one bit per way per
// entry.
//
// Lookup (combinational, lk_tag -> way_en): if an in-use TRB entry equals
// lk_tag, way_en is that entry's WRB bits (2'b01 means way 0 only, 2'b10
// way 1 only, 2'b11 both; bit w is the enable flag of way w). If no entry
// matches, way_en is all ones: every way is read. This is the operation
// table of the design.
//
// Update (upd_valid for one cycle, applied on the clock edge): a line with
// effective tag upd_tag has been saved into way upd_way. The replacement
// scheme picks what to do (upd_action, combinational): set the way bit of
// the matching entry, replace an entry whose bits are all ones, save into an
// empty entry, or record nothing when no entry qualifies.
//
// The lookup and update rules follow the design. Taking the effective tag as
// the low ETAG_W bits of the tag follows its address split. A lookup in the
// same cycle as an update sees the state before the update. rec_tags and
// rec_ways show the buffer contents for observation.
module way_predict_module
#(
  parameter int unsigned WAYS    = 2,
  parameter int unsigned ENTRIES = 3,
  parameter int unsigned ETAG_W  = 10,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [ETAG_W-1:0] lk_tag,
  output logic [WAYS-1:0]   way_en,
  output logic              lk_trb_hit,
  // update
  input  logic              upd_valid,
  input  logic [ETAG_W-1:0] upd_tag,
  input  logic [WAY_W-1:0]  upd_way,
  output wp_pkg::rs_action_e        upd_action,
  // contents, for observation
  output logic [ETAG_W-1:0] rec_tags [ENTRIES],
  output logic [WAYS-1:0]   rec_ways [ENTRIES]
);

  logic [ENTRIES-1:0] lk_match, up_match, full, used, lk_hit;
  logic [WAYS-1:0]    wrb_bits [ENTRIES];
  logic [IDX_W-1:0]   rs_idx;
  wp_pkg::rs_action_e         rs_action;
  logic               trb_wr, wrb_set, wrb_load;

  tag_record_buffer #(.ENTRIES(ENTRIES), .ETAG_W(ETAG_W)) u_trb (
    .clk, .rst_n,
    .lk_tag, .lk_match,
    .up_tag(upd_tag), .up_match,
    .wr_en(trb_wr), .wr_idx(rs_idx), .wr_tag(upd_tag),
    .tags(rec_tags)
  );

  way_record_buffer #(.ENTRIES(ENTRIES), .WAYS(WAYS)) u_wrb (
    .clk, .rst_n,
    .set_en(wrb_set), .load_en(wrb_load), .idx(rs_idx), .way(upd_way),
    .bits(wrb_bits), .full, .used
  );

  replacement_scheme #(.ENTRIES(ENTRIES)) u_rs (
    .match(up_match), .full, .used, .action(rs_action), .idx(rs_idx)
  );

  assign rec_ways = wrb_bits;

  // Lookup: prediction from the matching entry, else every way.
  assign lk_hit     = lk_match & used;
  assign lk_trb_hit = |lk_hit;

  always_comb begin
    logic [WAYS-1:0] rec;
    rec = '0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (lk_hit[e]) rec |= wrb_bits[e];
    end
    way_en = lk_trb_hit ? rec : '1;
  end

  // Update
  assign upd_action = upd_valid ? rs_action : wp_pkg::RS_NONE;
  assign wrb_set    = upd_valid && (rs_action == wp_pkg::RS_UPDATE);
  assign wrb_load   = upd_valid && (rs_action inside {wp_pkg::RS_REPLACE, wp_pkg::RS_ALLOCATE});
  assign trb_wr     = wrb_load;

  // An effective tag is never held by two entries in use.
  a_unique_entry : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lk_hit));

endmodule
