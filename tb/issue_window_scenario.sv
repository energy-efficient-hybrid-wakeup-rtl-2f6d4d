// issue_window_scenario: directed test of one issue_window configuration,
// used by tb_issue_window once per wakeup scheme.
//
// The scenario plays the role of the rename stage: it supplies source tags,
// their readiness and the producer entries (PIE) by hand, and completes
// instructions by window index. It checks, against values worked out from
// the wakeup rules:
//   - a single dependent is woken by exactly one comparison and issues the
//     cycle after its producer completes, never before;
//   - a producer with no dependent costs no comparison;
//   - a second dependent stalls insertion (Indexing-Only) or sets the
//     Broadcast bit, after which the completion costs WIN_ENTRIES
//     comparisons (Hybrid-Plain) or one per snooping entry (Hybrid-Snoop);
//   - an unrelated waiting entry is not woken by a broadcast;
//   - two sources on one producer form one link;
//   - a misprediction frees the younger entries, a dangling DIE pointer
//     left by a squashed consumer only adds a comparison, and a correctly
//     resolved branch no longer squashes anything.
module issue_window_scenario #(
  parameter wakeup_pkg::scheme_e SCHEME = wakeup_pkg::HYBRID_SNOOP
) (
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
                 .NUM_CKPT(NC), .OP_W(OPW), .SCHEME(SCHEME)) dut (.*);

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
      $display("[scheme %0d] %s: got %0d expected %0d", int'(SCHEME), what, got, exp);
    end
  endtask

  task automatic idle();
    disp_valid = 0; wb_valid = '0; br_valid = 0; br_mispredict = 0;
  endtask

  // Insert one instruction; returns its entry. src tags of 0 mean "no source".
  task automatic insert(input int t0, input bit r0, input int p0,
                        input int t1, input bit r1, input int p1,
                        input int dest, input int mask,
                        output int idx, output int links, output int bc);
    @(negedge clk);
    idle();
    disp_valid        = 1;
    disp_op           = OPW'(dest);
    disp_src_valid    = {t1 != 0, t0 != 0};
    disp_src_tag[0]   = TW'(t0);  disp_src_tag[1] = TW'(t1);
    disp_src_ready    = {r1, r0};
    disp_src_pie[0]   = IW'(p0);  disp_src_pie[1] = IW'(p1);
    disp_has_dest     = (dest != 0);
    disp_dest_tag     = TW'(dest);
    disp_mask         = NC'(mask);
    #1;
    chk("disp_ready", int'(disp_ready), 1);
    idx   = int'(disp_idx);
    links = int'(stat_links);
    bc    = int'(stat_bcast_set);
    issued_at[idx] = -1;
    @(posedge clk);
    #1 idle();
  endtask

  // Complete one entry; returns its comparison count and broadcast flag.
  task automatic complete(input int idx, output int ncmp, output int bcast, output int when);
    @(negedge clk);
    idle();
    ncmp = -1; bcast = -1; when = cyc;
    // only an issued instruction can complete
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

  task automatic settle(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    int p, c1, q, u, p2, d1, d2, d3, e, r, s, t, v, x, lk, bc, nc, bb, w;
    checks = 0; failures = 0; done = 0;
    idle();
    disp_op = '0; disp_src_valid = '0; disp_src_tag = '0; disp_src_ready = '0;
    disp_src_pie = '0; disp_has_dest = 0; disp_dest_tag = '0; disp_mask = '0;
    wb_idx = '0; br_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. one producer, one dependent: indexed wakeup
    insert(0,0,0, 0,0,0, 10, 0, p, lk, bc);
    chk("first entry", p, 0);
    insert(10,0,p, 0,0,0, 11, 0, c1, lk, bc);
    chk("link count", lk, 1);
    chk("no broadcast", bc, 0);
    settle(3);
    chk("producer issued", int'(issued_at[p] >= 0), 1);
    chk("consumer waits", issued_at[c1], -1);
    complete(p, nc, bb, w);
    chk("indexed wakeup comparisons", nc, 1);
    chk("indexed wakeup no broadcast", bb, 0);
    settle(2);
    chk("consumer issues next cycle", issued_at[c1], w + 1);
    complete(c1, nc, bb, w);
    chk("no-dependent comparisons", nc, 0);

    // 2. a producer with three dependents, plus an unrelated waiter
    insert(0,0,0, 0,0,0, 30, 0, q, lk, bc);        // q: stays unfinished
    insert(30,0,q, 0,0,0, 31, 0, u, lk, bc);       // u waits on q
    insert(0,0,0, 0,0,0, 20, 0, p2, lk, bc);
    insert(20,0,p2, 0,0,0, 21, 0, d1, lk, bc);
    chk("first dependent links", lk, 1);
    settle(2);
    if (SCHEME == INDEXING_ONLY) begin
      // the second dependent must wait until p2 completes
      @(negedge clk);
      disp_valid = 1; disp_src_valid = 2'b01; disp_src_tag[0] = TW'(20);
      disp_src_ready = 2'b00; disp_src_pie[0] = IW'(p2); disp_has_dest = 1;
      disp_dest_tag = TW'(22); disp_mask = '0;
      #1;
      chk("indexing-only stall", int'(disp_ready), 0);
      chk("stall reported", int'(stat_dep_stall), 1);
      @(posedge clk);
      #1 idle();
      complete(p2, nc, bb, w);
      chk("indexing-only comparisons", nc, 1);
      insert(20,1,p2, 0,0,0, 22, 0, d2, lk, bc);
      chk("after completion no link", lk, 0);
      settle(2);
      chk("d1 woken", issued_at[d1], w + 1);
      chk("d2 issues at once", int'(issued_at[d2] >= 0), 1);
    end else begin
      insert(20,0,p2, 0,0,0, 22, 0, d2, lk, bc);
      chk("second dependent sets broadcast", bc, 1);
      chk("second dependent no link", lk, 0);
      insert(0,0,0, 20,0,p2, 23, 0, d3, lk, bc);
      chk("third dependent, broadcast already set", bc, 0);
      settle(2);
      complete(p2, nc, bb, w);
      chk("broadcast flagged", bb, 1);
      chk("broadcast comparisons", nc, (SCHEME == HYBRID_PLAIN) ? N : 3);
      settle(2);
      chk("d1 woken", issued_at[d1], w + 1);
      chk("d2 woken", issued_at[d2], w + 1);
      chk("d3 woken", issued_at[d3], w + 1);
      complete(d3, nc, bb, w);
    end
    chk("unrelated waiter not woken", issued_at[u], -1);
    complete(d1, nc, bb, w);
    complete(d2, nc, bb, w);

    // 3. both sources on one producer: a single link
    insert(0,0,0, 0,0,0, 40, 0, x, lk, bc);
    insert(40,0,x, 40,0,x, 41, 0, e, lk, bc);
    chk("same producer twice: one link", lk, 1);
    chk("same producer twice: no broadcast", bc, 0);
    settle(2);
    complete(x, nc, bb, w);
    chk("same producer wakeup comparisons", nc, 1);
    settle(2);
    chk("both sources woken", issued_at[e], w + 1);
    complete(e, nc, bb, w);

    // 4. misprediction: squashed consumer leaves a dangling DIE
    insert(0,0,0, 0,0,0, 50, 0, r, lk, bc);          // older than the branch
    insert(50,0,r, 0,0,0, 51, 1, s, lk, bc);         // younger (mask bit 0)
    chk("dangling-to-be link", lk, 1);
    @(negedge clk);
    idle(); br_valid = 1; br_id = '0; br_mispredict = 1;
    #1 chk("no insert on mispredict", int'(disp_ready), 0);
    @(posedge clk);
    #1 idle();
    if (SCHEME == INDEXING_ONLY) begin
      @(negedge clk);
      disp_valid = 1; disp_src_valid = 2'b01; disp_src_tag[0] = TW'(50);
      disp_src_ready = 2'b00; disp_src_pie[0] = IW'(r); disp_has_dest = 1; disp_dest_tag = TW'(52);
      #1 chk("dangling pointer stalls", int'(disp_ready), 0);
      @(posedge clk);
      #1 idle();
      settle(2);
      complete(r, nc, bb, w);
      chk("dangling indexed comparison", nc, 1);
    end else begin
      insert(50,0,r, 0,0,0, 52, 0, t, lk, bc);
      chk("squashed entry reused", t, s);
      chk("dangling pointer forces broadcast", bc, 1);
      settle(2);
      complete(r, nc, bb, w);
      chk("dangling broadcast comparisons", nc, (SCHEME == HYBRID_PLAIN) ? N : 1);
      settle(2);
      chk("new consumer woken", issued_at[t], w + 1);
      complete(t, nc, bb, w);
    end

    // 5. correctly predicted branch: its mask bit is cleared
    insert(0,0,0, 0,0,0, 60, 2, v, lk, bc);
    @(negedge clk);
    idle(); br_valid = 1; br_id = CW'(1); br_mispredict = 0;
    @(posedge clk);
    #1 idle();
    @(negedge clk);
    br_valid = 1; br_id = CW'(1); br_mispredict = 1;   // checkpoint 1 reused, then mispredicted
    @(posedge clk);
    #1 idle();
    settle(2);
    chk("resolved entry survives", int'(issued_at[v] >= 0), 1);
    complete(v, nc, bb, w);

    settle(2);
    done = 1;
  end
endmodule
