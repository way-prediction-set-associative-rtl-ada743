// tb_replacement_scheme: exhaustive self-checking test of the replacement
// scheme decision for three entries. Every combination of match, full and
// used is applied and the action and entry are compared with a reference
// written from the rules: a matching entry in use is updated; otherwise an
// entry whose way bits are all ones is replaced; otherwise an empty entry is
// allocated; otherwise nothing is recorded; the lowest entry wins.
module tb_replacement_scheme;
  localparam int N = 3;
  logic [N-1:0] match, full, used;
  wp_pkg::rs_action_e action;
  logic [1:0] idx;
  int checks = 0, failures = 0;
  int n_upd = 0, n_rep = 0, n_all = 0, n_none = 0;

  replacement_scheme #(.ENTRIES(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++)
      for (int f = 0; f < 8; f++)
        for (int u = 0; u < 8; u++) begin
          wp_pkg::rs_action_e ea;
          int ei;
          logic [N-1:0] fu;
          // a full entry is always in use
          fu = N'(f) & N'(u);
          match = N'(m); full = fu; used = N'(u);
          #1;
          ea = wp_pkg::RS_NONE; ei = -1;
          for (int e = 0; e < N; e++) if (ei < 0 && match[e] && used[e]) begin ea = wp_pkg::RS_UPDATE; ei = e; end
          if (ei < 0) for (int e = 0; e < N; e++) if (ei < 0 && fu[e]) begin ea = wp_pkg::RS_REPLACE; ei = e; end
          if (ei < 0) for (int e = 0; e < N; e++) if (ei < 0 && !used[e]) begin ea = wp_pkg::RS_ALLOCATE; ei = e; end
          checks++;
          if (action != ea || (ei >= 0 && idx != 2'(ei))) begin
            failures++;
            $display("FAIL m=%b f=%b u=%b: got %s/%0d expected %s/%0d", match, full, used, action.name(), idx, ea.name(), ei);
          end
          case (ea)
            wp_pkg::RS_UPDATE:   n_upd++;
            wp_pkg::RS_REPLACE:  n_rep++;
            wp_pkg::RS_ALLOCATE: n_all++;
            default:             n_none++;
          endcase
        end
    $display("cases: update=%0d replace=%0d allocate=%0d none=%0d", n_upd, n_rep, n_all, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
