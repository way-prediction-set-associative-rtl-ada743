// way_record_buffer: the Way Record Buffer (WRB) of the Way Predict Module.
//
// One bit per cache way for each TRB entry. Bit w of entry e is 1 when the
// tag held in TRB entry e has been saved into way w of the cache. Two write
// operations, applied on the clock edge to entry idx:
//   set_en  : OR the bit of `way` into the entry (tag saved in another way);
//   load_en : the entry becomes the bit of `way` alone (entry newly written
//             with a tag, by allocation or by replacement).
// Outputs, all combinational from the registers: every entry's bits, `full`
// (all bits 1, i.e. 2'b11 for two ways: the tag is in every way and the
// entry may be replaced) and `used` (some bit 1; an all-zero entry is empty).
// Reset clears all entries, so all are empty.
//
// The set and reload rules follow the design; the use of the all-zero
// pattern as "empty" follows the empty rows of the block diagram, which show
// zero way bits; the reset is this design's choice.
module way_record_buffer #(
  parameter int unsigned ENTRIES = 3,
  parameter int unsigned WAYS    = 2,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               set_en,
  input  logic               load_en,
  input  logic [IDX_W-1:0]   idx,
  input  logic [WAY_W-1:0]   way,
  output logic [WAYS-1:0]    bits [ENTRIES],
  output logic [ENTRIES-1:0] full,
  output logic [ENTRIES-1:0] used
);

  logic [WAYS-1:0] wrb_q [ENTRIES];
  logic [WAYS-1:0] way_bit;

  assign way_bit = WAYS'(1) << way;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) wrb_q[e] <= '0;
    end else if (load_en) begin
      wrb_q[idx] <= way_bit;
    end else if (set_en) begin
      wrb_q[idx] <= wrb_q[idx] | way_bit;
    end
  end

  always_comb begin
    for (int e = 0; e < int'(ENTRIES); e++) begin
      bits[e] = wrb_q[e];
      full[e] = &wrb_q[e];
      used[e] = |wrb_q[e];
    end
  end

endmodule
