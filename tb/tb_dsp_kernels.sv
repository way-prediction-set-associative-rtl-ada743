// tb_dsp_kernels: runs small DSP kernels through the way-prediction data
// cache (default size) and checks their results.
//
// Each kernel is the loop of a classic DSP routine of the kind the cache is
// meant for (dot product, vector sum, vector multiply, maximum search,
// autocorrelation, matrix multiply), written here as a sequence of word
// loads and stores from a processor that waits for each response. Arrays of
// N words sit at fixed addresses; input words are whatever the memory model
// holds (a fixed function of the address), so the expected results are
// computed independently from that same function. Each kernel runs its loop
// twice after a cache reset. For each kernel the test reports how many way
// reads the prediction saved compared with reading both ways every access,
// and checks that the result is right and that some reads were saved.
module tb_dsp_kernels;
  localparam int N = 64;
  localparam logic [31:0] X_BASE = 32'h0001_0000;  // tag 0x80, sets 0..63
  localparam logic [31:0] Y_BASE = 32'h0001_0400;  // tag 0x82, same sets
  localparam logic [31:0] Z_BASE = 32'h0001_0800;  // tag 0x84, same sets
  localparam logic [31:0] R_BASE = 32'h0002_0000;  // scalar results

  logic        clk = 0, rst_n = 0;
  logic        req_valid = 0, req_ready, req_we = 0;
  logic [31:0] req_addr = 0, req_wdata = 0;
  logic        resp_valid, resp_hit;
  logic [31:0] resp_rdata;
  logic [1:0]  ren_new;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  wp_dcache dut (.*);

  mem_model #(.GNT_PCT(100), .MAX_LAT(2)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint acc = 0, ways = 0, hits = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction
  function automatic logic [31:0] xv(input int i); return init_word(X_BASE + 32'(4 * i)); endfunction
  function automatic logic [31:0] yv(input int i); return init_word(Y_BASE + 32'(4 * i)); endfunction

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    acc++;
    ways += $countones(ren_new);
    #1 req_valid = 0;
    do @(posedge clk); while (!resp_valid);
    if (resp_hit) hits++;
    rd = resp_rdata;
  endtask

  task automatic ld(input logic [31:0] a, output logic [31:0] d);
    access(1'b0, a, '0, d);
  endtask
  task automatic st(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] unused;
    access(1'b1, a, d, unused);
  endtask

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic start();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    acc = 0; ways = 0; hits = 0;
  endtask

  task automatic report(input string name);
    $display("%-10s accesses=%0d hits=%0d way reads=%0d of %0d, saved %0.2f%%",
             name, acc, hits, ways, 2 * acc, 100.0 * real'(2 * acc - ways) / real'(2 * acc));
    chk(ways < 2 * acc, {name, ": way prediction saved reads"});
  endtask

  initial begin
    logic [31:0] a, b, s, e;
    repeat (2) @(negedge clk);
    // dot product
    start();
    for (int p = 0; p < 2; p++) begin
      s = 0;
      for (int i = 0; i < N; i++) begin ld(X_BASE + 32'(4*i), a); ld(Y_BASE + 32'(4*i), b); s += a * b; end
      st(R_BASE, s);
    end
    e = 0; for (int i = 0; i < N; i++) e += xv(i) * yv(i);
    chk(s == e, "dotprod result");
    report("dotprod");
    // vector sum z = x + y
    start();
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < N; i++) begin
        ld(X_BASE + 32'(4*i), a); ld(Y_BASE + 32'(4*i), b); st(Z_BASE + 32'(4*i), a + b);
      end
    for (int i = 0; i < N; i += 7) begin ld(Z_BASE + 32'(4*i), a); chk(a == xv(i) + yv(i), "vector_sum element"); end
    report("vector_sum");
    // vector multiply z = x * y
    start();
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < N; i++) begin
        ld(X_BASE + 32'(4*i), a); ld(Y_BASE + 32'(4*i), b); st(Z_BASE + 32'(4*i), a * b);
      end
    for (int i = 0; i < N; i += 5) begin ld(Z_BASE + 32'(4*i), a); chk(a == xv(i) * yv(i), "vector_mul element"); end
    report("vector_mul");
    // maximum value (unsigned)
    start();
    for (int p = 0; p < 2; p++) begin
      s = 0;
      for (int i = 0; i < N; i++) begin ld(X_BASE + 32'(4*i), a); if (a > s) s = a; end
      st(R_BASE + 4, s);
    end
    e = 0; for (int i = 0; i < N; i++) if (xv(i) > e) e = xv(i);
    chk(s == e, "maxval result");
    report("maxval");
    // autocorrelation r[k] = sum x[i] x[i+k], k = 0..3, over 32 samples
    start();
    for (int k = 0; k < 4; k++) begin
      s = 0;
      for (int i = 0; i + k < 32; i++) begin ld(X_BASE + 32'(4*i), a); ld(X_BASE + 32'(4*(i+k)), b); s += a * b; end
      st(R_BASE + 32'(16 + 4*k), s);
      e = 0; for (int i = 0; i + k < 32; i++) e += xv(i) * xv(i+k);
      chk(s == e, $sformatf("autocor r[%0d]", k));
    end
    report("autocor");
    // 8x8 matrix multiply C = A * B, A = x[0..63], B = y[0..63], C in z
    start();
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        s = 0;
        for (int k = 0; k < 8; k++) begin ld(X_BASE + 32'(4*(8*r+k)), a); ld(Y_BASE + 32'(4*(8*k+c)), b); s += a * b; end
        st(Z_BASE + 32'(4*(8*r+c)), s);
        e = 0; for (int k = 0; k < 8; k++) e += xv(8*r+k) * yv(8*k+c);
        chk(s == e, $sformatf("matmul C[%0d][%0d]", r, c));
      end
    report("matmul");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
