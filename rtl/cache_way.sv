// cache_way: one way of the set-associative data cache: valid bits, tag
// memory and data memory.
//
// Reads are synchronous. With ren high, the valid bit, tag and data of set
// rindex appear on rvalid/rtag/rdata after the clock edge. With only tag_ren
// high, just the valid bit and tag are read and the data memory stays idle
// (used to probe the way's tag on a miss). With neither, nothing is read and
// the outputs hold. In the cache, ren is RenNew, the conventional read
// enable ANDed with this way's enable flag from the Way Predict Module.
// Writes happen on the clock edge: wen_line writes valid=1, tag and data of
// set windex (a refill); wen_data writes only the data (a store hit).
// Valid bits are flip-flops cleared by reset; tag and data are RAMs.
//
// The valid/tag/data organisation follows the design's block diagram; the
// separate tag-only read and the write ports are this design's choices.
module cache_way #(
  parameter int unsigned SETS   = 128,
  parameter int unsigned TAG_W  = 23,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned IW    = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ren,
  input  logic              tag_ren,
  input  logic [IW-1:0]     rindex,
  output logic              rvalid,
  output logic [TAG_W-1:0]  rtag,
  output logic [DATA_W-1:0] rdata,
  input  logic              wen_line,
  input  logic              wen_data,
  input  logic [IW-1:0]     windex,
  input  logic [TAG_W-1:0]  wtag,
  input  logic [DATA_W-1:0] wdata
);

  logic [SETS-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      rvalid  <= 1'b0;
    end else begin
      if (ren || tag_ren) rvalid <= valid_q[rindex];
      if (wen_line)       valid_q[windex] <= 1'b1;
    end
  end

  sram_sp #(.DEPTH(SETS), .WIDTH(TAG_W)) u_tag (
    .clk, .ren(ren || tag_ren), .raddr(rindex), .rdata(rtag),
    .wen(wen_line), .waddr(windex), .wdata(wtag)
  );

  sram_sp #(.DEPTH(SETS), .WIDTH(DATA_W)) u_data (
    .clk, .ren(ren), .raddr(rindex), .rdata(rdata),
    .wen(wen_line || wen_data), .waddr(windex), .wdata(wdata)
  );

endmodule
