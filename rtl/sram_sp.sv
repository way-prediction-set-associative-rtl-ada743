// sram_sp: synchronous RAM used for the tag and data memories of a way.
//
// One read port and one write port on the same clock. A read is performed
// only when ren is high: the word at raddr appears on rdata after the clock
// edge and is held there while ren stays low, so a disabled memory neither
// reads nor changes its output (this is where way prediction saves power).
// A write of wdata to waddr happens on the clock edge when wen is high. A
// read and a write of the same address in one cycle return the old word.
// The contents are not reset; the cache's valid bits say which words hold
// lines. Port style and timing are this design's choices.
module sram_sp #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             ren,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             wen,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wen) mem[waddr] <= wdata;
    if (ren) rdata <= mem[raddr];
  end

endmodule
