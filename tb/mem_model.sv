// mem_model: behavioural model of the memory behind the data cache (not
// synthesizable; testbench use only).
//
// Accepts one request at a time: while req is high, gnt is raised with a
// probability of GNT_PCT percent per cycle. A write is applied on the
// granting edge. A read returns its word with rvalid high for one cycle,
// 1 to MAX_LAT cycles after the grant. A word never written reads as
// init_word(addr), a fixed function of its address, which testbenches use to
// know the contents without loading a file.
module mem_model #(
  parameter int GNT_PCT = 70,
  parameter int MAX_LAT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        gnt,
  output logic        rvalid,
  output logic [31:0] rdata
);

  logic [31:0] words [logic [31:0]];
  int          wait_cnt;
  logic        busy;
  logic [31:0] pend_addr;

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] read_word(input logic [31:0] a);
    if (words.exists(a)) return words[a];
    return init_word(a);
  endfunction

  always @(negedge clk) begin
    gnt <= rst_n && req && !busy && (($urandom % 100) < GNT_PCT);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      rvalid   <= 1'b0;
      rdata    <= '0;
      wait_cnt <= 0;
    end else begin
      rvalid <= 1'b0;
      if (req && gnt) begin
        if (we) begin
          words[addr] = wdata;
        end else begin
          busy      <= 1'b1;
          pend_addr <= addr;
          wait_cnt  <= int'($urandom % MAX_LAT);
        end
      end
      if (busy) begin
        if (wait_cnt == 0) begin
          rvalid <= 1'b1;
          rdata  <= read_word(pend_addr);
          busy   <= 1'b0;
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end

endmodule
