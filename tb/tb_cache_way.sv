// tb_cache_way: self-checking test of one cache way.
// Checks that valid bits reset to zero, that a line write sets valid, tag
// and data, that a data-only write changes only the data, that a full read
// (ren) returns all three a cycle later, and that a tag-only read
// (tag_ren) returns valid and tag while the data output holds.
module tb_cache_way;
  localparam int SETS = 16, TW = 23, DW = 32;
  logic clk = 0, rst_n = 0, ren = 0, tag_ren = 0, wen_line = 0, wen_data = 0;
  logic [3:0] rindex = 0, windex = 0;
  logic rvalid;
  logic [TW-1:0] rtag, wtag = 0;
  logic [DW-1:0] rdata, wdata = 0;
  logic ref_v [SETS];
  logic [TW-1:0] ref_t [SETS];
  logic [DW-1:0] ref_d [SETS];
  int checks = 0, failures = 0;

  cache_way #(.SETS(SETS), .TAG_W(TW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (v=%b t=%h d=%h)", what, rvalid, rtag, rdata); end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) begin ref_v[s] = 0; ref_t[s] = '0; ref_d[s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); ren = 1; rindex = 4'(s);
      @(negedge clk); ren = 0;
      chk(rvalid == 0, "valid after reset");
    end
    for (int i = 0; i < 3000; i++) begin
      int op;
      logic [3:0] s;
      logic [DW-1:0] held;
      @(negedge clk);
      op = $urandom % 4; s = 4'($urandom % SETS);
      if (op == 0) begin
        wen_line = 1; windex = s; wtag = TW'($urandom); wdata = $urandom;
        @(negedge clk); wen_line = 0;
        ref_v[s] = 1; ref_t[s] = wtag; ref_d[s] = wdata;
      end else if (op == 1) begin
        wen_data = 1; windex = s; wdata = $urandom;
        @(negedge clk); wen_data = 0;
        ref_d[s] = wdata;
      end else if (op == 2) begin
        ren = 1; rindex = s;
        @(negedge clk); ren = 0;
        chk(rvalid == ref_v[s] && (!ref_v[s] || (rtag == ref_t[s] && rdata == ref_d[s])), "full read");
      end else begin
        held = rdata;
        tag_ren = 1; rindex = s;
        @(negedge clk); tag_ren = 0;
        chk(rvalid == ref_v[s] && (!ref_v[s] || rtag == ref_t[s]), "tag read");
        chk(rdata == held, "data holds on tag-only read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
