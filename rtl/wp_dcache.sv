// wp_dcache: two-way set-associative L1 data cache with way prediction.
//
// A conventional two-way cache reads the tag and data memories of both ways
// on every access and then keeps only the matching one. Here a Way Predict
// Module (WPM) looks the effective tag (the low 10 bits of the 23-bit tag)
// of each request up in a three-entry Tag Record Buffer before the arrays
// are read. Its Way Record Buffer says in which ways lines of that tag have
// been saved, and only those ways are enabled: RenNew[w] = WayEnFlag[w] &
// Ren[w]. When the tag is not recorded, both ways are read. A line that is
// in a way the prediction left out is not seen: the access is handled as a
// cache miss.
//
// Organisation: 1 KB, 2 ways, 4-byte lines, so 128 sets; a 32-bit byte
// address is tag[31:9], index[8:2], offset[1:0]. Word (32-bit) accesses only.
//
// CPU side: a request (req_valid, req_we, req_addr, req_wdata) is taken on a
// clock edge where req_ready is high. The arrays are read on that edge; in
// the next cycle the tags are compared. A load hit returns resp_valid with
// resp_rdata in that cycle (one-cycle latency) and a new request may be
// taken in the same cycle, so hits stream at one per cycle. On a miss, or a
// store, req_ready stays low until the response.
//
// Miss: in the cycle after the miss is seen, the tags of both ways of the
// set are read ("probe"). If the line is found in the way that was not
// predicted, that way is refilled (so a line never sits in both ways);
// otherwise an invalid way is taken, else the least recently used one. The
// line is read from the next level (mem_req/mem_gnt, then mem_rvalid with
// mem_rdata), written with valid=1, recorded in the WPM, and returned with
// resp_hit low.
//
// Stores are write-through without write-allocate: a store hit writes the
// line, a store miss whose probe finds the line writes it there, and every
// store is then sent to the next level (mem_we=1) and acknowledged with
// resp_valid once mem_gnt is seen.
//
// Next-level interface: mem_req is held with stable mem_we/mem_addr/
// mem_wdata until mem_gnt; a read's data comes with mem_rvalid in a later
// cycle. One request is outstanding at a time.
//
// What follows the design: the organisation, the WPM (TRB, WRB and
// replacement scheme), the enable gating, the comparators, Hit and the
// output multiplexer, and treating a wrong prediction as a miss. This
// design's own choices: the CPU and memory handshakes, the miss probe and
// refill-way rule, LRU victim choice, the write policy and the reset.
// The WPM's TRB-hit flag, replacement action and buffer contents are left
// unconnected at this level; they are there for observation in simulation.
module wp_dcache #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned SETS        = 128,
  parameter int unsigned TAG_W       = 23,
  parameter int unsigned ETAG_W      = 10,
  parameter int unsigned TRB_ENTRIES = 3,
  localparam int unsigned DATA_W     = 32,
  localparam int unsigned OFFSET_W   = 2,
  localparam int unsigned IW         = $clog2(SETS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_rdata,
  output logic              resp_hit,
  output logic [1:0]        ren_new,
  // next level
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [DATA_W-1:0] mem_rdata
);

  typedef enum logic [2:0] {
    S_RUN, S_PROBE, S_FILL_REQ, S_FILL_WAIT, S_WRITE
  } state_e;

  state_e state_q, state_d;

  // ---------------- request decode and way prediction ----------------
  logic [TAG_W-1:0]  req_tag;
  logic [IW-1:0]     req_index;
  logic [1:0]        way_en;        // Way0EnFlag, Way1EnFlag
  logic              trb_hit;
  logic              accept;        // Ren0 = Ren1 = accept

  assign req_tag   = req_addr[OFFSET_W+IW +: TAG_W];
  assign req_index = req_addr[OFFSET_W +: IW];
  assign accept    = req_valid && req_ready;
  assign ren_new   = way_en & {2{accept}};    // AND0, AND1

  // ---------------- stage 1 registers ----------------
  logic              s1_valid;
  logic              s1_we;
  logic [TAG_W-1:0]  s1_tag;
  logic [IW-1:0]     s1_index;
  logic [DATA_W-1:0] s1_wdata;
  logic [1:0]        s1_ren;
  logic              st_hit_q;
  logic              victim_q;

  // ---------------- WPM update ----------------
  logic              upd_valid;
  logic              upd_way;
  wp_pkg::rs_action_e upd_action;
  logic [ETAG_W-1:0] rec_tags [TRB_ENTRIES];
  logic [1:0]        rec_ways [TRB_ENTRIES];

  way_predict_module #(.WAYS(2), .ENTRIES(TRB_ENTRIES), .ETAG_W(ETAG_W)) u_wpm (
    .clk, .rst_n,
    .lk_tag(req_tag[ETAG_W-1:0]), .way_en, .lk_trb_hit(trb_hit),
    .upd_valid, .upd_tag(s1_tag[ETAG_W-1:0]), .upd_way, .upd_action,
    .rec_tags, .rec_ways
  );

  // ---------------- the two ways ----------------
  logic              probe;                     // tag-only read of both ways
  logic [1:0]        wen_line, wen_data;
  logic [IW-1:0]     rindex;
  logic [1:0]        way_valid;
  logic [TAG_W-1:0]  way_tag  [2];
  logic [DATA_W-1:0] way_data [2];
  logic [DATA_W-1:0] wr_data;

  assign rindex = probe ? s1_index : req_index;

  for (genvar w = 0; w < 2; w++) begin : g_way
    cache_way #(.SETS(SETS), .TAG_W(TAG_W), .DATA_W(DATA_W)) u_way (
      .clk, .rst_n,
      .ren(ren_new[w]), .tag_ren(probe), .rindex,
      .rvalid(way_valid[w]), .rtag(way_tag[w]), .rdata(way_data[w]),
      .wen_line(wen_line[w]), .wen_data(wen_data[w]), .windex(s1_index),
      .wtag(s1_tag), .wdata(wr_data)
    );
  end

  // ---------------- compare and select ----------------
  logic [1:0]        hit_way, probe_hit;
  logic              hit;
  logic [DATA_W-1:0] hit_data;

  hit_logic #(.TAG_W(TAG_W), .DATA_W(DATA_W)) u_hit (
    .tag(s1_tag), .rd_en(s1_ren), .way_valid, .way_tag, .way_data,
    .hit_way, .hit, .data(hit_data)
  );

  // In S_PROBE both tags of the set are on the way outputs.
  assign probe_hit[0] = way_valid[0] && (way_tag[0] == s1_tag);
  assign probe_hit[1] = way_valid[1] && (way_tag[1] == s1_tag);

  // ---------------- LRU, one bit per set: the way to evict next ----------------
  logic [SETS-1:0] lru_q;
  logic            lru_upd, lru_way;   // lru_way: the way just used

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       lru_q <= '0;
    else if (lru_upd) lru_q[s1_index] <= ~lru_way;
  end

  // ---------------- control ----------------
  always_comb begin
    state_d    = state_q;
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp_rdata = '0;
    resp_hit   = 1'b0;
    probe      = 1'b0;
    wen_line   = '0;
    wen_data   = '0;
    wr_data    = s1_wdata;
    upd_valid  = 1'b0;
    upd_way    = victim_q;
    lru_upd    = 1'b0;
    lru_way    = hit_way[1];
    mem_req    = 1'b0;
    mem_we     = 1'b0;
    mem_addr   = {s1_tag, s1_index, {OFFSET_W{1'b0}}};
    mem_wdata  = s1_wdata;
    unique case (state_q)
      S_RUN: begin
        req_ready = !s1_valid || (hit && !s1_we);
        if (s1_valid) begin
          if (hit) begin
            lru_upd = 1'b1;
            if (s1_we) begin
              wen_data = hit_way;
              state_d  = S_WRITE;
            end else begin
              resp_valid = 1'b1;
              resp_rdata = hit_data;
              resp_hit   = 1'b1;
            end
          end else begin
            probe   = 1'b1;
            state_d = S_PROBE;
          end
        end
      end
      S_PROBE: begin
        if (s1_we) begin
          if (|probe_hit) begin
            wen_data  = probe_hit;
            upd_valid = 1'b1;
            upd_way   = probe_hit[1];
          end
          state_d = S_WRITE;
        end else begin
          state_d = S_FILL_REQ;
        end
      end
      S_FILL_REQ: begin
        mem_req = 1'b1;
        if (mem_gnt) state_d = S_FILL_WAIT;
      end
      S_FILL_WAIT: begin
        if (mem_rvalid) begin
          wen_line[victim_q] = 1'b1;
          wr_data    = mem_rdata;
          upd_valid  = 1'b1;
          lru_upd    = 1'b1;
          lru_way    = victim_q;
          resp_valid = 1'b1;
          resp_rdata = mem_rdata;
          state_d    = S_RUN;
        end
      end
      S_WRITE: begin
        mem_req = 1'b1;
        mem_we  = 1'b1;
        if (mem_gnt) begin
          resp_valid = 1'b1;
          resp_hit   = st_hit_q;
          state_d    = S_RUN;
        end
      end
      default: state_d = S_RUN;
    endcase
  end

  // Refill way: the way already holding the line, else an invalid way,
  // else the LRU way.
  logic victim_d;
  always_comb begin
    if (|probe_hit)        victim_d = probe_hit[1];
    else if (!way_valid[0]) victim_d = 1'b0;
    else if (!way_valid[1]) victim_d = 1'b1;
    else                    victim_d = lru_q[s1_index];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_RUN;
      s1_valid <= 1'b0;
      s1_we    <= 1'b0;
      s1_tag   <= '0;
      s1_index <= '0;
      s1_wdata <= '0;
      s1_ren   <= '0;
      st_hit_q <= 1'b0;
      victim_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        s1_valid <= 1'b1;
        s1_we    <= req_we;
        s1_tag   <= req_tag;
        s1_index <= req_index;
        s1_wdata <= req_wdata;
        s1_ren   <= ren_new;
      end else if (resp_valid) begin
        s1_valid <= 1'b0;
      end
      if (state_q == S_RUN)   st_hit_q <= hit;
      if (state_q == S_PROBE) victim_q <= victim_d;
    end
  end

  // ---------------- checks ----------------
  // A line is never held by both ways of a set.
  a_one_hit : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_RUN && s1_valid) |-> $onehot0(hit_way));
  // The next-level request is held stable until granted.
  a_mem_hold : assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req && !mem_gnt) |=> (mem_req && $stable(mem_addr) && $stable(mem_we)));
  // Way prediction never disables every way of an access.
  a_some_way : assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (ren_new != 2'b00));

endmodule
