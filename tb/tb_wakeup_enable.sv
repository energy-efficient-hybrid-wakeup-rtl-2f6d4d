// tb_wakeup_enable: self-checking test of the comparator-enable logic.
//
// Three instances, one per wakeup scheme, see the same random producers
// (valid, DIE pointer, Empty, Broadcast, Snoop vector). Each enable vector
// and comparison count is compared with a reference worked out here:
// nothing when invalid or when the producer has no dependent, the decoded
// DIE entry alone when Broadcast is clear, all entries (Hybrid-Plain) or the
// snooping entries (Hybrid-Snoop) when it is set. Indexing-Only ignores the
// Broadcast bit.
module tb_wakeup_enable;
  import wakeup_pkg::*;
  localparam int N = 96;
  localparam int IW = $clog2(N);
  localparam int CW = $clog2(N + 1);

  logic          valid, empty, broadcast;
  logic [IW-1:0] die;
  logic [N-1:0]  snoop;
  logic [2:0][N-1:0]  en;
  logic [2:0][CW-1:0] n;
  int checks = 0, failures = 0;

  wakeup_enable #(.WIN_ENTRIES(N), .SCHEME(INDEXING_ONLY)) u_io (.valid, .die, .empty, .broadcast, .snoop, .enable(en[0]), .n_cmp(n[0]));
  wakeup_enable #(.WIN_ENTRIES(N), .SCHEME(HYBRID_PLAIN))  u_hp (.valid, .die, .empty, .broadcast, .snoop, .enable(en[1]), .n_cmp(n[1]));
  wakeup_enable #(.WIN_ENTRIES(N), .SCHEME(HYBRID_SNOOP))  u_hs (.valid, .die, .empty, .broadcast, .snoop, .enable(en[2]), .n_cmp(n[2]));

  function automatic int popc(logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_en;
    for (int it = 0; it < 4000; it++) begin
      valid     = ($urandom_range(0, 7) != 0);
      empty     = $urandom_range(0, 1)[0];
      broadcast = $urandom_range(0, 1)[0];
      die       = IW'($urandom_range(0, N - 1));
      for (int i = 0; i < N; i++) snoop[i] = ($urandom_range(0, 15) == 0);
      #1;
      for (int s = 0; s < 3; s++) begin
        exp_en = '0;
        if (valid) begin
          if (broadcast && s == 1)      exp_en = '1;
          else if (broadcast && s == 2) exp_en = snoop;
          else if (!empty)              exp_en[die] = 1'b1;
        end
        checks++;
        if (en[s] !== exp_en || int'(n[s]) != popc(exp_en)) begin
          failures++;
          if (failures < 10)
            $display("mismatch scheme %0d: valid=%0b empty=%0b bc=%0b die=%0d n=%0d exp=%0d",
                     s, valid, empty, broadcast, die, n[s], popc(exp_en));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
