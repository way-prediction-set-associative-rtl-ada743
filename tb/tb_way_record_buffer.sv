// tb_way_record_buffer: self-checking test of the Way Record Buffer.
// Random set (OR in a way bit) and load (replace with one way bit)
// operations on random entries are applied and every entry's bits and the
// full and used flags are compared with a reference model after each edge.
module tb_way_record_buffer;
  localparam int N = 3, W = 2;
  logic clk = 0, rst_n = 0, set_en = 0, load_en = 0;
  logic [1:0] idx = 0;
  logic way = 0;
  logic [W-1:0] bits [N];
  logic [N-1:0] full, used;
  logic [W-1:0] ref_bits [N];
  int checks = 0, failures = 0;

  way_record_buffer #(.ENTRIES(N), .WAYS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int e = 0; e < N; e++) begin
      checks++;
      if (bits[e] !== ref_bits[e] || full[e] !== (&ref_bits[e]) || used[e] !== (|ref_bits[e])) begin
        failures++;
        $display("FAIL entry %0d: bits=%b full=%b used=%b expected %b", e, bits[e], full[e], used[e], ref_bits[e]);
      end
    end
  endtask

  initial begin
    for (int e = 0; e < N; e++) ref_bits[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      set_en = ($urandom % 3) == 0;
      load_en = ($urandom % 4) == 0;
      idx = 2'($urandom % N);
      way = 1'($urandom);
      @(posedge clk);
      if (load_en) ref_bits[idx] = W'(1) << way;
      else if (set_en) ref_bits[idx] = ref_bits[idx] | (W'(1) << way);
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
