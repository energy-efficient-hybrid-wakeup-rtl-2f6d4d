// tb_issue_window: runs the directed window scenario under all three wakeup
// schemes (Indexing-Only, Hybrid-Plain, Hybrid-Snoop), plus the one-cycle
// Broadcast hold under Hybrid-Snoop, and sums the results.
module tb_issue_window;
  import wakeup_pkg::*;
  int c[4], f[4];
  bit d[4];
  int checks, failures;

  issue_window_scenario #(.SCHEME(INDEXING_ONLY)) s_io (.checks(c[0]), .failures(f[0]), .done(d[0]));
  issue_window_scenario #(.SCHEME(HYBRID_PLAIN))  s_hp (.checks(c[1]), .failures(f[1]), .done(d[1]));
  issue_window_scenario #(.SCHEME(HYBRID_SNOOP))  s_hs (.checks(c[2]), .failures(f[2]), .done(d[2]));
  issue_window_hold                              s_bh (.checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    checks   = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
