// tb_sram_sp: self-checking test of the synchronous RAM.
// Writes random words, reads them back with a one-cycle latency, checks that
// the output holds while the read enable is low and that a read of an
// address written in the same cycle returns the old word.
module tb_sram_sp;
  localparam int DEPTH = 16, WIDTH = 12;
  logic clk = 0, ren = 0, wen = 0;
  logic [3:0] raddr = 0, waddr = 0;
  logic [WIDTH-1:0] rdata, wdata = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wen = 1; waddr = 4'(a); wdata = WIDTH'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); wen = 0;
    // read each, then hold for two cycles with ren low
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); ren = 1; raddr = 4'(a);
      @(negedge clk); ren = 0; raddr = 4'(($urandom % DEPTH));
      check(ref_mem[a], "read");
      @(negedge clk);
      check(ref_mem[a], "hold");
    end
    // read and write the same address in one cycle: old word
    @(negedge clk); ren = 1; raddr = 4'd5; wen = 1; waddr = 4'd5; wdata = ~ref_mem[5];
    @(negedge clk); ren = 0; wen = 0;
    check(ref_mem[5], "read during write");
    ref_mem[5] = ~ref_mem[5];
    @(negedge clk); ren = 1; raddr = 4'd5;
    @(negedge clk); ren = 0;
    check(ref_mem[5], "after write");
    // random traffic
    for (int i = 0; i < 500; i++) begin
      logic [3:0] ra;
      @(negedge clk);
      ra = 4'($urandom % DEPTH);
      ren = 1; raddr = ra;
      wen = ($urandom % 2) == 1; waddr = 4'($urandom % DEPTH); wdata = WIDTH'($urandom);
      begin
        logic [WIDTH-1:0] exp;
        exp = ref_mem[ra];
        if (wen) ref_mem[waddr] = wdata;
        @(negedge clk); ren = 0; wen = 0;
        check(exp, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
