// issue_window_hold: directed test of the one-cycle hold before a Broadcast
// bit is set (Hybrid-Snoop with BCAST_STALL = 1), used by tb_issue_window.
//
// It checks that:
//   - a second dependent is refused for exactly one cycle and reported as
//     held, then accepted with the Broadcast bit set;
//   - the later broadcast reaches both snooping dependents, which issue the
//     cycle after the producer completes;
//   - when the producer completes during the hold, the retried dependent
//     finds its source ready and no broadcast is ever set;
//   - an instruction that sets no Broadcast bit is never held.
// The hold itself is an evaluated option of the hybrid scheme; the stimulus
// and the expected counts are this test's own. It has no inputs: it drives
// the window at the negative clock edge, samples the combinational outputs
// 1 ns later, and reports its check and failure counts with done raised.
module issue_window_hold (
  output int checks,
  output int failures,
  output bit done
);
  import wakeup_pkg::*;
  localparam int N = WIN_ENTRIES, IWD = ISSUE_WIDTH, WB = WB_WIDTH, NP = NUM_PREGS, NC = NUM_CKPT, OPW = OP_W;
  localparam int IW = $clog2(N), TW = $clog2(NP), CW = $clog2(NC), CNW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_ready;
  logic [IW-1:0] disp_idx;
  logic [OPW-1:0] disp_op;
  logic [1:0] disp_src_valid, disp_src_ready;
  logic [1:0][TW-1:0] disp_src_tag;
  logic [1:0][IW-1:0] disp_src_pie;
  logic disp_has_dest;
  logic [TW-1:0] disp_dest_tag;
  logic [NC-1:0] disp_mask;
  logic [IWD-1:0] iss_valid, iss_has_dest;
  logic [IWD-1:0][IW-1:0] iss_idx;
  logic [IWD-1:0][OPW-1:0] iss_op;
  logic [IWD-1:0][TW-1:0] iss_dest_tag;
  logic [IWD-1:0][1:0][TW-1:0] iss_src_tag;
  logic [IWD-1:0][NC-1:0] iss_mask;
  logic [WB-1:0] wb_valid, wb_has_dest, wb_bcast;
  logic [WB-1:0][IW-1:0] wb_idx;
  logic [WB-1:0][TW-1:0] wb_tag;
  logic [WB-1:0][CNW-1:0] wb_n_cmp;
  logic br_valid, br_mispredict;
  logic [CW-1:0] br_id;
  logic stat_full, stat_dep_stall, stat_bc_stall;
  logic [1:0] stat_links, stat_bcast_set;

  issue_window #(.WIN_ENTRIES(N), .ISSUE_WIDTH(IWD), .WB_WIDTH(WB), .NUM_PREGS(NP),
                 .NUM_CKPT(NC), .OP_W(OPW), .SCHEME(HYBRID_SNOOP),
                 .BCAST_STALL(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  int issued_at[N];
  always @(posedge clk) begin
    for (int i = 0; i < IWD; i++) if (iss_valid[i]) issued_at[iss_idx[i]] = cyc;
    cyc++;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("[hold] %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic idle();
    disp_valid = 0; wb_valid = '0; br_valid = 0; br_mispredict = 0;
  endtask

  // Present one instruction with a single source (tag 0 means none) for one
  // cycle, optionally together with a completion; report what happened.
  task automatic present(input int t0, input bit r0, input int p0, input int dest,
                         input int wb_entry,
                         output bit rdy, output bit held, output int idx,
                         output int links, output int bc, output int ncmp);
    @(negedge clk);
    idle();
    disp_valid      = 1;
    disp_op         = OPW'(dest);
    disp_src_valid  = {1'b0, t0 != 0};
    disp_src_tag[0] = TW'(t0);  disp_src_tag[1] = '0;
    disp_src_ready  = {1'b0, r0};
    disp_src_pie[0] = IW'(p0);  disp_src_pie[1] = '0;
    disp_has_dest   = (dest != 0);
    disp_dest_tag   = TW'(dest);
    disp_mask       = '0;
    if (wb_entry >= 0) begin
      wb_valid[0] = 1;
      wb_idx[0]   = IW'(wb_entry);
    end
    #1;
    rdy   = disp_ready;
    held  = stat_bc_stall;
    idx   = int'(disp_idx);
    links = int'(stat_links);
    bc    = int'(stat_bcast_set);
    ncmp  = int'(wb_n_cmp[0]);
    if (rdy) issued_at[idx] = -1;
    @(posedge clk);
    #1 idle();
  endtask

  task automatic complete(input int idx, output int ncmp, output int bcast, output int when);
    @(negedge clk);
    idle();
    ncmp = -1; bcast = -1; when = cyc;
    chk("completing entry was issued", int'(issued_at[idx] >= 0), 1);
    if (issued_at[idx] < 0) return;
    wb_valid[0] = 1;
    wb_idx[0]   = IW'(idx);
    #1;
    ncmp  = int'(wb_n_cmp[0]);
    bcast = int'(wb_bcast[0]);
    when  = cyc;
    @(posedge clk);
    #1 idle();
  endtask

  task automatic run();
    bit rdy, held;
    int p, a, b, lk, bc, nc, bb, w;
    checks = 0; failures = 0; done = 0;
    idle();
    disp_op = '0; disp_src_valid = '0; disp_src_tag = '0; disp_src_ready = '0;
    disp_src_pie = '0; disp_has_dest = 0; disp_dest_tag = '0; disp_mask = '0;
    wb_idx = '0; br_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. second dependent: held once, then accepted with Broadcast set
    present(0,0,0, 10, -1, rdy, held, p, lk, bc, nc);
    chk("producer accepted", int'(rdy), 1);
    chk("producer not held", int'(held), 0);
    present(10,0,p, 11, -1, rdy, held, a, lk, bc, nc);
    chk("first dependent accepted", int'(rdy), 1);
    chk("first dependent not held", int'(held), 0);
    chk("first dependent links", lk, 1);
    present(10,0,p, 12, -1, rdy, held, b, lk, bc, nc);
    chk("second dependent refused", int'(rdy), 0);
    chk("second dependent held", int'(held), 1);
    present(10,0,p, 12, -1, rdy, held, b, lk, bc, nc);
    chk("second dependent accepted on retry", int'(rdy), 1);
    chk("retry not held", int'(held), 0);
    chk("retry sets Broadcast", bc, 1);
    complete(p, nc, bb, w);
    chk("broadcast on completion", bb, 1);
    chk("snooping entries compared", nc, 2);
    repeat (2) @(posedge clk);
    chk("first dependent issues next cycle", issued_at[a], w + 1);
    chk("second dependent issues next cycle", issued_at[b], w + 1);
    complete(a, nc, bb, w);
    complete(b, nc, bb, w);

    // 2. producer completes during the hold: no broadcast at all
    present(0,0,0, 20, -1, rdy, held, p, lk, bc, nc);
    present(20,0,p, 21, -1, rdy, held, a, lk, bc, nc);
    chk("link for the first dependent", lk, 1);
    repeat (2) @(posedge clk);
    present(20,0,p, 22, p, rdy, held, b, lk, bc, nc);
    chk("held while the producer completes", int'(held), 1);
    chk("refused while the producer completes", int'(rdy), 0);
    chk("completion wakes only the linked dependent", nc, 1);
    present(20,1,p, 22, -1, rdy, held, b, lk, bc, nc);
    chk("retry with a ready source accepted", int'(rdy), 1);
    chk("no Broadcast set", bc, 0);
    chk("no link made", lk, 0);
    chk("no hold for a ready source", int'(held), 0);
    repeat (2) @(posedge clk);
    chk("late dependent issued", int'(issued_at[b] >= 0), 1);

    done = 1;
  endtask

  initial run();
endmodule
