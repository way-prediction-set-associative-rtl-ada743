// tb_wp_dcache: end-to-end self-checking test of the way-prediction data
// cache at its default size (1 KB, 2 ways, 4-byte lines, three-entry
// TRB/WRB with 10-bit effective tags), connected to a behavioural memory
// with random grant and read latency.
//
// Random loads and stores are issued from a small pool of tags and sets so
// that lines conflict, tags share effective tags, and the prediction buffer
// fills and replaces entries. A reference copy of memory gives the expected
// data of every load. Checked as well: a load hit answers one cycle after it
// was taken, at most one way hits, a single-way access reads exactly the
// predicted way, and each mechanism happened at least once: single-way
// accesses to way 0 and to way 1, both-way accesses on a TRB hit and on a
// TRB miss, back-to-back hits, refills, refills that evict a valid line,
// wrong predictions (a line found by the miss probe in the way that was not
// read), store hits, store misses, and each replacement-scheme action.
// It starts with the worked example of the scheme (tags 23'h040100,
// 23'h040201, 23'h040200, 23'h040202) as directed accesses whose read
// enables and hit/miss outcome are checked. The run ends with the ratio of array ways read to the ways a conventional
// cache would read.
module tb_wp_dcache;
  localparam int N_OPS = 20000;

  logic        clk = 0, rst_n = 0;
  logic        req_valid = 0, req_ready, req_we = 0;
  logic [31:0] req_addr = 0, req_wdata = 0;
  logic        resp_valid, resp_hit;
  logic [31:0] resp_rdata;
  logic [1:0]  ren_new;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;

  wp_dcache dut (.*);

  mem_model #(.GNT_PCT(70), .MAX_LAT(4)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // ---------------- reference memory ----------------
  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_read(input logic [31:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // ---------------- request pool ----------------
  localparam int N_TAGS = 9;
  logic [22:0] tag_pool [N_TAGS] = '{23'h040100, 23'h040201, 23'h040200, 23'h040202,
                                     23'h040300, 23'h0C0100, 23'h040203, 23'h040204,
                                     23'h1C0201};

  typedef struct {
    logic        we;
    logic [31:0] addr;
    logic [31:0] data;
    longint      t_accept;
  } pend_t;
  pend_t pend [$];

  // ---------------- event counters ----------------
  int n_way0_only = 0, n_way1_only = 0, n_both_trb_hit = 0, n_both_trb_miss = 0;
  int n_b2b = 0, n_fill = 0, n_evict = 0, n_pred_miss = 0, n_st_hit = 0, n_st_miss = 0;
  int n_st_probe = 0, n_ld_hit = 0, n_resp = 0;
  int n_rs [4];
  longint ways_read = 0, accesses = 0;
  longint last_resp_cycle = -10;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, what);
    end
  endtask

  initial begin
    repeat (N_OPS * 30) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // response
      if (resp_valid) begin
        pend_t p;
        n_resp++;
        chk(pend.size() > 0, "response with nothing pending");
        if (pend.size() > 0) begin
          p = pend.pop_front();
          if (!p.we) begin
            chk(resp_rdata == p.data, $sformatf("load %h: got %h expected %h", p.addr, resp_rdata, p.data));
            if (resp_hit) begin
              n_ld_hit++;
              chk(cycle - p.t_accept == 1, $sformatf("hit latency %0d", cycle - p.t_accept));
              if (last_resp_cycle == cycle - 1) n_b2b++;
            end
          end else begin
            if (resp_hit) n_st_hit++; else n_st_miss++;
          end
        end
        last_resp_cycle = cycle;
      end
      // request taken
      if (req_valid && req_ready) begin
        pend_t p;
        logic hit_rec;
        logic [1:0] ways;
        p.we = req_we; p.addr = req_addr; p.t_accept = cycle;
        if (req_we) begin
          ref_mem[req_addr] = req_wdata;
          p.data = req_wdata;
        end else begin
          p.data = ref_read(req_addr);
        end
        pend.push_back(p);
        accesses++;
        ways_read += $countones(ren_new);
        hit_rec = dut.u_wpm.lk_trb_hit;
        ways = dut.u_wpm.way_en;
        chk(ren_new == ways, "RenNew equals the predicted enables");
        if (ren_new == 2'b01) n_way0_only++;
        else if (ren_new == 2'b10) n_way1_only++;
        else if (hit_rec) n_both_trb_hit++;
        else n_both_trb_miss++;
      end
      // internal events
      if (dut.state_q == dut.S_PROBE) begin
        if (|dut.probe_hit) begin
          if (dut.s1_we) n_st_probe++; else n_pred_miss++;
        end else if (!dut.s1_we && dut.way_valid == 2'b11) begin
          n_evict++;
        end
      end
      if (dut.state_q == dut.S_FILL_WAIT && mem_rvalid) n_fill++;
      if (dut.upd_valid) n_rs[int'(dut.upd_action)]++;
    end
  end

  // ---------------- driver ----------------
  logic [31:0] recent [8];

  // One access from the driver, waiting for its response; returns the read
  // enables used and whether it hit. Data is checked by the monitor.
  task automatic one_access(input logic we, input logic [22:0] t, input logic [6:0] s,
                            output logic [1:0] ren, output logic h);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = {t, s, 2'b00}; req_wdata = $urandom;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    ren = ren_new;
    #1 req_valid = 0;
    do @(posedge clk); while (!resp_valid);
    h = resp_hit;
  endtask

  task automatic directed(input logic [22:0] t, input logic [6:0] s,
                          input logic [1:0] exp_ren, input logic exp_hit, input string what);
    logic [1:0] ren;
    logic h;
    one_access(1'b0, t, s, ren, h);
    chk(ren == exp_ren && h == exp_hit,
        $sformatf("%s: ren_new=%b hit=%b expected %b/%b", what, ren, h, exp_ren, exp_hit));
  endtask

  initial begin
    for (int a = 0; a < 8; a++) recent[a] = {tag_pool[0], 7'(a), 2'b00};
    for (int a = 0; a < 4; a++) n_rs[a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Directed: the worked example. Fills put 23'h040100 in way 0,
    // 23'h040201 in way 1 and 23'h040200 in both ways; then the three
    // "instructions" read way 0 only, way 1 only and both ways.
    directed(23'h040100, 7'd0, 2'b11, 1'b0, "fill 040100 -> way 0");
    directed(23'h040201, 7'd0, 2'b11, 1'b0, "fill 040201 -> way 1");
    directed(23'h040200, 7'd1, 2'b11, 1'b0, "fill 040200 -> way 0");
    directed(23'h040100, 7'd2, 2'b01, 1'b0, "fill 040100 -> way 0 (predicted way 0, miss)");
    directed(23'h040200, 7'd2, 2'b01, 1'b0, "fill 040200 -> way 1 (predicted way 0, miss)");
    directed(23'h040100, 7'd0, 2'b01, 1'b1, "instruction 1 reads way 0 only");
    directed(23'h040201, 7'd0, 2'b10, 1'b1, "instruction 2 reads way 1 only");
    directed(23'h040200, 7'd1, 2'b11, 1'b1, "instruction 3 reads both ways");
    // 23'h040202 saved into way 0 replaces the both-ways entry of 040200
    directed(23'h040202, 7'd3, 2'b11, 1'b0, "fill 040202 -> way 0");
    directed(23'h040202, 7'd3, 2'b01, 1'b1, "040202 reads way 0 only");
    directed(23'h040200, 7'd1, 2'b11, 1'b1, "040200 no longer recorded: both ways");
    chk(dut.u_wpm.rec_tags[2] == 10'h202 && dut.u_wpm.rec_ways[2] == 2'b01, "040202 replaced 040200 in the TRB");
    for (int i = 0; i < N_OPS; i++) begin
      logic [22:0] t;
      logic [6:0]  s;
      // phases: small set pool early for conflicts, wider later
      t = tag_pool[$urandom % N_TAGS];
      s = (i < N_OPS / 2) ? 7'($urandom % 4) : 7'($urandom % 128);
      @(negedge clk);
      req_valid = ($urandom % 8) != 0;
      req_we    = ($urandom % 5) == 0;
      // half of the accesses revisit a recent address (loop-like reuse)
      if (($urandom % 2) == 0) req_addr = recent[$urandom % 8];
      else                     req_addr = {t, s, 2'b00};
      recent[i % 8] = req_addr;
      req_wdata = $urandom;
      if (req_valid) begin
        @(posedge clk);
        while (!req_ready) @(posedge clk);
      end
    end
    @(negedge clk);
    req_valid = 0;
    // drain
    repeat (50) @(posedge clk);
    chk(pend.size() == 0, "all requests answered");
    $display("accesses=%0d responses=%0d load hits=%0d", accesses, n_resp, n_ld_hit);
    $display("way0 only=%0d way1 only=%0d both on TRB hit=%0d both on TRB miss=%0d",
             n_way0_only, n_way1_only, n_both_trb_hit, n_both_trb_miss);
    $display("back-to-back hits=%0d refills=%0d evictions=%0d wrong predictions=%0d",
             n_b2b, n_fill, n_evict, n_pred_miss);
    $display("store hits=%0d store misses=%0d store misses found by probe=%0d",
             n_st_hit, n_st_miss, n_st_probe);
    $display("RS actions: none=%0d update=%0d replace=%0d allocate=%0d", n_rs[0], n_rs[1], n_rs[2], n_rs[3]);
    $display("ways read per access: %0d / %0d (conventional cache: %0d)", ways_read, accesses, 2 * accesses);
    chk(n_way0_only > 0, "single-way access to way 0 happened");
    chk(n_way1_only > 0, "single-way access to way 1 happened");
    chk(n_both_trb_hit > 0, "both-way access on a TRB hit happened");
    chk(n_both_trb_miss > 0, "both-way access on a TRB miss happened");
    chk(n_b2b > 0, "back-to-back hits happened");
    chk(n_fill > 0, "refill happened");
    chk(n_evict > 0, "eviction happened");
    chk(n_pred_miss > 0, "wrong prediction happened");
    chk(n_st_hit > 0 && n_st_miss > 0 && n_st_probe > 0, "store hit, store miss and probed store happened");
    chk(n_rs[0] > 0 && n_rs[1] > 0 && n_rs[2] > 0 && n_rs[3] > 0, "every replacement-scheme action happened");
    chk(ways_read < 2 * accesses, "fewer ways read than a conventional cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one hit per access at most (mirrors the design's own assertion)
  always @(posedge clk) if (rst_n && dut.state_q == dut.S_RUN && dut.s1_valid) begin
    checks++;
    if (!$onehot0(dut.hit_way)) begin failures++; $display("FAIL two ways hit"); end
  end
endmodule
