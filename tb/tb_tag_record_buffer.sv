// tb_tag_record_buffer: self-checking test of the Tag Record Buffer.
// Random entry writes and random tags on both compare ports; the equality
// vectors and stored tags are compared with a reference model. Tags are
// drawn from a small set so that matches are frequent.
module tb_tag_record_buffer;
  localparam int N = 3, TW = 10;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_idx = 0;
  logic [TW-1:0] lk_tag = 0, up_tag = 0, wr_tag = 0;
  logic [N-1:0] lk_match, up_match;
  logic [TW-1:0] tags [N];
  logic [TW-1:0] ref_tags [N];
  int checks = 0, failures = 0, n_match = 0;

  tag_record_buffer #(.ENTRIES(N), .ETAG_W(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [TW-1:0] rtag();
    return TW'(10'h200 + ($urandom % 6));
  endfunction

  initial begin
    for (int e = 0; e < N; e++) ref_tags[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_en = ($urandom % 3) == 0; wr_idx = 2'($urandom % N); wr_tag = rtag();
      @(posedge clk);
      if (wr_en) ref_tags[wr_idx] = wr_tag;
      #1;
      lk_tag = rtag(); up_tag = rtag();
      #1;
      for (int e = 0; e < N; e++) begin
        checks++;
        if (tags[e] !== ref_tags[e] || lk_match[e] !== (ref_tags[e] == lk_tag) ||
            up_match[e] !== (ref_tags[e] == up_tag)) begin
          failures++;
          $display("FAIL entry %0d: tag=%h exp %h lk=%b up=%b", e, tags[e], ref_tags[e], lk_match[e], up_match[e]);
        end
        if (ref_tags[e] == lk_tag) n_match++;
      end
    end
    checks++;
    if (n_match == 0) begin failures++; $display("FAIL no lookup ever matched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
