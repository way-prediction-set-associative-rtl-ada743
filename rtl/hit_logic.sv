// hit_logic: tag comparison, hit detection and data selection of the
// two-way cache.
//
// Combinational. For each way w, hit_way[w] is high when that way was read
// this access (rd_en[w], its registered RenNew), its valid bit is set and
// its tag equals the request tag. Hit is the OR of hit0 and hit1. The data
// output selects Data0 when hit0 is high and Data1 otherwise (zero when
// neither hit). The comparators, hit0/hit1, Hit and the Data0/Data1
// multiplexer follow the design's block diagram. Qualifying each hit with
// the way's read enable is this design's choice: a way that was not read
// still shows an older tag, which must not count.
module hit_logic #(
  parameter int unsigned TAG_W  = 23,
  parameter int unsigned DATA_W = 32
) (
  input  logic [TAG_W-1:0]  tag,
  input  logic [1:0]        rd_en,
  input  logic [1:0]        way_valid,
  input  logic [TAG_W-1:0]  way_tag  [2],
  input  logic [DATA_W-1:0] way_data [2],
  output logic [1:0]        hit_way,
  output logic              hit,
  output logic [DATA_W-1:0] data
);

  always_comb begin
    for (int w = 0; w < 2; w++) begin
      hit_way[w] = rd_en[w] && way_valid[w] && (way_tag[w] == tag);
    end
    hit = |hit_way;
    if (hit_way[0])      data = way_data[0];
    else if (hit_way[1]) data = way_data[1];
    else                 data = '0;
  end

endmodule
