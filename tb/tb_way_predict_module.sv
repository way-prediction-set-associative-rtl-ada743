// tb_way_predict_module: self-checking test of the Way Predict Module.
//
// Part 1 builds the buffer contents of the design's worked example: tag
// 23'h040100 saved in way 0, 23'h040201 in way 1 and 23'h040200 in both
// ways, then checks the operation table (a TRB hit with way bits 10 enables
// way 0 only, 01 way 1 only, 11 both; a TRB miss enables both). It then
// saves 23'h040202 into way 0, which must replace the 23'h040200 entry
// (bits 11) with way bits 10, and then into way 1, giving 11.
// Part 2 drives random lookups and updates from a small tag set and compares
// the prediction, the replacement action and the contents with a reference
// model of the rules. Counts of each replacement action and each lookup
// outcome must all be non-zero.
module tb_way_predict_module;
  localparam int N = 3, TW = 10, W = 2;
  logic clk = 0, rst_n = 0;
  logic [TW-1:0] lk_tag = 0, upd_tag = 0;
  logic [W-1:0] way_en;
  logic lk_trb_hit, upd_valid = 0, upd_way = 0;
  wp_pkg::rs_action_e upd_action;
  logic [TW-1:0] rec_tags [N];
  logic [W-1:0] rec_ways [N];
  // reference model
  logic [TW-1:0] m_tag [N];
  logic [W-1:0] m_way [N];
  int checks = 0, failures = 0;
  int n_act [4];
  int n_pred0 = 0, n_pred1 = 0, n_both_hit = 0, n_trb_miss = 0;

  way_predict_module #(.WAYS(W), .ENTRIES(N), .ETAG_W(TW)) dut (.*);

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
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [TW-1:0] et(input logic [22:0] full_tag);
    return full_tag[TW-1:0];
  endfunction

  // reference: prediction
  function automatic logic [W-1:0] m_predict(input logic [TW-1:0] t, output logic h);
    h = 0;
    for (int e = 0; e < N; e++) if (m_way[e] != 0 && m_tag[e] == t) begin h = 1; return m_way[e]; end
    return '1;
  endfunction

  // reference: update, returns the action
  function automatic wp_pkg::rs_action_e m_update(input logic [TW-1:0] t, input logic w);
    for (int e = 0; e < N; e++) if (m_way[e] != 0 && m_tag[e] == t) begin
      m_way[e] |= W'(1) << w; return wp_pkg::RS_UPDATE;
    end
    for (int e = 0; e < N; e++) if (m_way[e] == '1) begin
      m_tag[e] = t; m_way[e] = W'(1) << w; return wp_pkg::RS_REPLACE;
    end
    for (int e = 0; e < N; e++) if (m_way[e] == 0) begin
      m_tag[e] = t; m_way[e] = W'(1) << w; return wp_pkg::RS_ALLOCATE;
    end
    return wp_pkg::RS_NONE;
  endfunction

  task automatic save(input logic [TW-1:0] t, input logic w, input wp_pkg::rs_action_e exp_act);
    wp_pkg::rs_action_e ea;
    @(negedge clk);
    upd_valid = 1; upd_tag = t; upd_way = w;
    #1;
    ea = m_update(t, w);
    chk(upd_action == ea, $sformatf("action for %h way %0d: got %s expected %s", t, w, upd_action.name(), ea.name()));
    if (exp_act != wp_pkg::RS_NONE || ea == wp_pkg::RS_NONE)
      chk(ea == exp_act, $sformatf("example action for %h: %s expected %s", t, ea.name(), exp_act.name()));
    n_act[int'(upd_action)]++;
    @(posedge clk); #1;
    upd_valid = 0;
  endtask

  task automatic lookup(input logic [TW-1:0] t, input logic [W-1:0] exp_en, input logic exp_hit);
    @(negedge clk);
    lk_tag = t; #1;
    chk(way_en == exp_en && lk_trb_hit == exp_hit,
        $sformatf("lookup %h: way_en=%b hit=%b expected %b/%b", t, way_en, lk_trb_hit, exp_en, exp_hit));
  endtask

  task automatic contents(input logic [TW-1:0] t0, t1, t2, input logic [W-1:0] w0, w1, w2);
    chk(rec_tags[0] == t0 && rec_tags[1] == t1 && rec_tags[2] == t2 &&
        rec_ways[0] == w0 && rec_ways[1] == w1 && rec_ways[2] == w2,
        $sformatf("contents %h/%b %h/%b %h/%b", rec_tags[0], rec_ways[0], rec_tags[1], rec_ways[1], rec_tags[2], rec_ways[2]));
  endtask

  initial begin
    for (int a = 0; a < 4; a++) n_act[a] = 0;
    for (int e = 0; e < N; e++) begin m_tag[e] = '0; m_way[e] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // empty: every lookup reads both ways
    lookup(et(23'h040100), 2'b11, 0);
    // ---- Part 1: worked example (way_en bit 0 = Way0EnFlag, bit 1 = Way1EnFlag)
    save(et(23'h040100), 0, wp_pkg::RS_ALLOCATE);
    save(et(23'h040201), 1, wp_pkg::RS_ALLOCATE);
    save(et(23'h040200), 0, wp_pkg::RS_ALLOCATE);
    save(et(23'h040100), 0, wp_pkg::RS_UPDATE);
    save(et(23'h040200), 1, wp_pkg::RS_UPDATE);
    contents(10'h100, 10'h201, 10'h200, 2'b01, 2'b10, 2'b11);
    lookup(et(23'h040100), 2'b01, 1);   // only way 0
    lookup(et(23'h040201), 2'b10, 1);   // only way 1
    lookup(et(23'h040200), 2'b11, 1);   // both
    lookup(et(23'h040300), 2'b11, 0);   // TRB miss: both
    save(et(23'h040202), 0, wp_pkg::RS_REPLACE);
    contents(10'h100, 10'h201, 10'h202, 2'b01, 2'b10, 2'b01);
    lookup(et(23'h040202), 2'b01, 1);
    lookup(et(23'h040200), 2'b11, 0);
    save(et(23'h040202), 1, wp_pkg::RS_UPDATE);
    contents(10'h100, 10'h201, 10'h202, 2'b01, 2'b10, 2'b11);
    lookup(et(23'h040202), 2'b11, 1);
    // buffer has no all-ones... entry 2 is all ones: a new tag replaces it
    save(et(23'h040300), 1, wp_pkg::RS_REPLACE);
    // now none all ones and none empty: nothing recorded
    save(et(23'h040301), 0, wp_pkg::RS_NONE);
    lookup(et(23'h040301), 2'b11, 0);
    // ---- Part 2: random
    for (int i = 0; i < 3000; i++) begin
      logic [TW-1:0] t;
      logic h;
      logic [W-1:0] ep;
      t = TW'(10'h200 + ($urandom % 6));
      if ($urandom % 2) begin
        save(t, 1'($urandom), wp_pkg::RS_NONE);
      end else begin
        ep = m_predict(t, h);
        lookup(t, ep, h);
        if (!h) n_trb_miss++;
        else if (ep == 2'b01) n_pred0++;
        else if (ep == 2'b10) n_pred1++;
        else n_both_hit++;
      end
    end
    $display("actions: none=%0d update=%0d replace=%0d allocate=%0d", n_act[0], n_act[1], n_act[2], n_act[3]);
    $display("lookups: way0 only=%0d way1 only=%0d both (hit)=%0d trb miss=%0d", n_pred0, n_pred1, n_both_hit, n_trb_miss);
    chk(n_act[0] > 0 && n_act[1] > 0 && n_act[2] > 0 && n_act[3] > 0, "every action seen");
    chk(n_pred0 > 0 && n_pred1 > 0 && n_both_hit > 0 && n_trb_miss > 0, "every lookup outcome seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
