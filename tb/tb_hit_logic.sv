// tb_hit_logic: self-checking test of tag comparison, hit and data select.
// Random tags (often equal to the request tag), valid bits and read enables;
// hit0/hit1, Hit and the selected data are compared with a reference.
module tb_hit_logic;
  localparam int TW = 23, DW = 32;
  logic [TW-1:0] tag;
  logic [1:0] rd_en, way_valid, hit_way;
  logic [TW-1:0] way_tag [2];
  logic [DW-1:0] way_data [2];
  logic hit;
  logic [DW-1:0] data;
  int checks = 0, failures = 0, n_hit = 0;

  hit_logic #(.TAG_W(TW), .DATA_W(DW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [1:0] eh;
      logic [DW-1:0] ed;
      tag = TW'($urandom);
      rd_en = 2'($urandom); way_valid = 2'($urandom);
      for (int w = 0; w < 2; w++) begin
        way_tag[w] = ($urandom % 2) ? tag : (tag ^ TW'(1 << ($urandom % TW)));
        way_data[w] = $urandom;
      end
      #1;
      for (int w = 0; w < 2; w++) eh[w] = rd_en[w] & way_valid[w] & (way_tag[w] == tag);
      ed = eh[0] ? way_data[0] : (eh[1] ? way_data[1] : '0);
      checks++;
      if (hit_way !== eh || hit !== (|eh) || data !== ed) begin
        failures++;
        $display("FAIL hit_way=%b exp %b data=%h exp %h", hit_way, eh, data, ed);
      end
      if (|eh) n_hit++;
    end
    checks++;
    if (n_hit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
