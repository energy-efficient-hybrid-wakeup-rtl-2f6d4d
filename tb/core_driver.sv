// core_driver: random instruction stream, execution-unit model and
// scoreboard for hybrid_wakeup_core.
//
// The driver plays everything around the issue stage: a free list of
// physical registers, an in-order reorder buffer that frees the previous
// mapping at retirement, execution units with random latencies (mostly
// short, some long like cache misses), and branch resolution with random
// mispredictions that squash the ROB tail, return its registers and drop
// its instructions from the execution units. It keeps its own rename table
// (with per-branch copies) so that it knows every instruction's producers.
//
// Checks, each cycle:
//   - an issued instruction has all its producers completed (no early issue)
//     and carries the expected physical tags;
//   - an instruction whose producers have all completed and that is not
//     issued must lose out to a full set of ISSUE_WIDTH issues (no lost or
//     late wakeup);
//   - a completing producer enables at least as many comparators as it has
//     dependents still waiting in the window; with at most one dependent ever
//     recorded it makes exactly that many comparisons without broadcasting;
//     with more it broadcasts (Hybrid schemes), to all entries in
//     Hybrid-Plain;
//   - in Indexing-Only an insertion stall is reported only when a producer of
//     the instruction already has a dependent;
//   - at the end every instruction has retired or been squashed.
// Each mechanism (indexed wakeup, broadcast, snoop-limited broadcast, dispatch
// bypass, window full, checkpoint exhaustion, misprediction, correct
// resolution, Indexing-Only stall) is counted, and one that never happened is
// a failure. The average number of comparisons per completing instruction
// with a destination is printed.
module core_driver #(
  parameter wakeup_pkg::scheme_e SCHEME  = wakeup_pkg::HYBRID_SNOOP,
  parameter int                  N_INSTR = 20000,
  parameter int                  LAT_MAX = 40,
  // PROFILE = 1 replaces the random stream by one with a set distribution of
  // close-by dependents (see gen_profile) and checks the average comparison
  // count against the value that distribution predicts
  parameter bit                  PROFILE = 0,
  parameter bit                  BC_STALL = 0     // the core holds Broadcast setters a cycle
) (
  output logic clk,
  output logic rst_n,
  output logic                                in_valid,
  input  logic                                in_ready,
  output logic [wakeup_pkg::OP_W-1:0]         in_op,
  output logic [1:0]                          in_src_valid,
  output logic [1:0][$clog2(wakeup_pkg::NUM_LREGS)-1:0] in_src_lreg,
  output logic                                in_has_dest,
  output logic [$clog2(wakeup_pkg::NUM_LREGS)-1:0] in_dest_lreg,
  output logic [$clog2(wakeup_pkg::NUM_PREGS)-1:0] in_dest_preg,
  output logic                                in_is_branch,
  input  logic [$clog2(wakeup_pkg::WIN_ENTRIES)-1:0] in_entry,
  input  logic [$clog2(wakeup_pkg::NUM_CKPT)-1:0]    in_ckpt,
  input  logic [$clog2(wakeup_pkg::NUM_PREGS)-1:0]   in_old_preg,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0]  iss_valid,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0][$clog2(wakeup_pkg::WIN_ENTRIES)-1:0] iss_idx,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0][wakeup_pkg::OP_W-1:0] iss_op,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0]  iss_has_dest,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0][$clog2(wakeup_pkg::NUM_PREGS)-1:0] iss_dest_tag,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0][1:0][$clog2(wakeup_pkg::NUM_PREGS)-1:0] iss_src_tag,
  input  logic [wakeup_pkg::ISSUE_WIDTH-1:0][wakeup_pkg::NUM_CKPT-1:0] iss_mask,
  output logic [wakeup_pkg::WB_WIDTH-1:0]     wb_valid,
  output logic [wakeup_pkg::WB_WIDTH-1:0][$clog2(wakeup_pkg::WIN_ENTRIES)-1:0] wb_idx,
  output logic                                br_valid,
  output logic [$clog2(wakeup_pkg::NUM_CKPT)-1:0] br_id,
  output logic                                br_mispredict,
  input  logic [wakeup_pkg::WB_WIDTH-1:0][$clog2(wakeup_pkg::WIN_ENTRIES+1)-1:0] stat_wb_cmp,
  input  logic [wakeup_pkg::WB_WIDTH-1:0]     stat_wb_bcast,
  input  logic [wakeup_pkg::WB_WIDTH-1:0]     stat_wb_dest,
  input  logic                                stat_full,
  input  logic                                stat_ckpt_stall,
  input  logic                                stat_dep_stall,
  input  logic [1:0]                          stat_links,
  input  logic [1:0]                          stat_bcast_set,
  input  logic [1:0]                          stat_bypass,
  input  logic                                stat_bc_stall,
  output int                                  checks,
  output int                                  failures,
  output bit                                  done
);
  import wakeup_pkg::*;
  localparam int NW = WIN_ENTRIES, NL = NUM_LREGS, NP = NUM_PREGS, NC = NUM_CKPT;
  localparam int IWD = ISSUE_WIDTH, WB = WB_WIDTH;

  // per-instruction record, indexed by sequence number
  typedef struct {
    bit has_dest, is_branch, squashed, issued, completed, resolved;
    int dest_preg, old_preg, dest_lreg, entry, ckpt;
    bit sv[2];
    int sl[2], sp[2];      // source lreg, source preg
    int prod[2];           // producing sequence number, -1 if none in flight
    int accept_cyc, complete_cyc;
    int ndeps;             // dependents recorded while in flight
  } instr_t;

  instr_t ins[];
  int rob[$];
  int free_list[$];
  int rat_preg[NL], rat_seq[NL];
  int ck_preg[NC][NL], ck_seq[NC][NL];
  int entry_seq[NW];
  int fu_seq[$], fu_due[$];
  int res_seq[$], res_due[$];
  int cyc, nseq;
  bit have_next;
  instr_t nxt;
  // mechanism counters
  int n_indexed, n_bcast, n_snoop_lim, n_nodep, n_bypass, n_full, n_ckpt_stall,
      n_mis, n_ok, n_dep_stall, n_cmp_total, n_dest_compl, n_retired, n_squashed, n_cmp_bcast, n_bc_stall;
  bit bc_held;

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0d] cycle %0d: %s", int'(SCHEME), cyc, what);
    end
  endtask


  function automatic bit prod_done(int p, int t);
    // producer p has completed before cycle t
    return p < 0 || (ins[p].completed && ins[p].complete_cyc < t);
  endfunction

  function automatic bit slow_phase();
    return (nseq / 2000) % 3 == 2;
  endfunction

  // Dependence-profile stream: a producer with a destination and no waiting
  // source, followed by k stores that read its result while it is still
  // executing. k is 0 with probability 0.392, 1 with 0.521, and 2, 3 or 4
  // with 0.087 in total (split 40/40/20, so 2.8 on average).
  localparam real P_SINGLE = 0.521, P_MORE = 0.087, N_MULTI = 2.8;
  int prof_left = 0, prof_reg = 1;

  task automatic gen_profile();
    nxt = '{default: 0};
    if (prof_left > 0) begin
      nxt.sv[0] = 1; nxt.sl[0] = prof_reg;
      prof_left--;
    end else begin
      int u = $urandom_range(0, 999);
      prof_reg = (prof_reg % (NL - 1)) + 1;      // registers 1..NL-1 in turn
      nxt.has_dest = 1; nxt.dest_lreg = prof_reg;
      nxt.sv[0] = 1; nxt.sl[0] = 0;              // register 0 is never written
      prof_left = (u < 392) ? 0 : (u < 913) ? 1 : (u < 948) ? 2 : (u < 983) ? 3 : 4;
    end
    have_next = 1;
  endtask

  task automatic gen_next();
    int k = $urandom_range(0, 99);
    if (PROFILE) begin gen_profile(); return; end
    nxt = '{default: 0};
    // every third block of 2000 instructions is branch-free and slow, so
    // that the window fills up: mostly stores (which take no register)
    // waiting on a few long-latency producers
    nxt.is_branch = (k < 12) && !slow_phase();
    nxt.has_dest  = slow_phase() ? (k < 15) : (k >= 22); // 12% branches, 10% stores
    for (int s = 0; s < 2; s++) begin
      nxt.sv[s] = (s == 0) ? 1'b1 : (k >= 12 && $urandom_range(0, 3) != 0);
      // a small hot set of registers creates many close-by dependents
      nxt.sl[s] = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 7) : $urandom_range(0, NL - 1);
    end
    if ($urandom_range(0, 15) == 0) nxt.sl[1] = nxt.sl[0];
    nxt.dest_lreg = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 7) : $urandom_range(0, NL - 1);
    have_next = 1;
  endtask

  task automatic squash_after(int b);
    // remove every instruction younger than branch b
    while (rob.size() > 0 && rob[$] > b) begin
      int q = rob.pop_back();
      ins[q].squashed = 1;
      n_squashed++;
      if (ins[q].has_dest) free_list.push_back(ins[q].dest_preg);
      if (!ins[q].completed && entry_seq[ins[q].entry] == q) entry_seq[ins[q].entry] = -1;
    end
    for (int i = fu_seq.size() - 1; i >= 0; i--)
      if (ins[fu_seq[i]].squashed) begin fu_seq.delete(i); fu_due.delete(i); end
    for (int i = res_seq.size() - 1; i >= 0; i--)
      if (ins[res_seq[i]].squashed) begin res_seq.delete(i); res_due.delete(i); end
    for (int r = 0; r < NL; r++) begin
      rat_preg[r] = ck_preg[ins[b].ckpt][r];
      rat_seq[r]  = ck_seq[ins[b].ckpt][r];
    end
  endtask

  initial begin
    #(64'd10 * (64'd200 * N_INSTR + 64'd10000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run();
    int wb_list[$];
    int res_now;
    bit mis_now;
    int last_done = 0, last_progress = 0;
    checks = 0; failures = 0; done = 0;
    ins = new[N_INSTR];
    rst_n = 0; in_valid = 0; wb_valid = '0; wb_idx = '0; br_valid = 0; br_id = '0; br_mispredict = 0;
    in_op = '0; in_src_valid = '0; in_src_lreg = '0; in_has_dest = 0; in_dest_lreg = '0;
    in_dest_preg = '0; in_is_branch = 0;
    for (int r = 0; r < NL; r++) begin rat_preg[r] = r; rat_seq[r] = -1; end
    for (int p = NL; p < NP; p++) free_list.push_back(p);
    for (int e = 0; e < NW; e++) entry_seq[e] = -1;
    {n_indexed, n_bcast, n_snoop_lim, n_nodep, n_bypass, n_full, n_ckpt_stall,
     n_mis, n_ok, n_dep_stall, n_cmp_total, n_dest_compl, n_retired, n_squashed, n_cmp_bcast, n_bc_stall} = '0;
    bc_held = 0;
    nseq = 0; have_next = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    while (n_retired + n_squashed < N_INSTR || rob.size() > 0) begin
      @(negedge clk);
      cyc++;
      in_valid = 0; wb_valid = '0; br_valid = 0; br_mispredict = 0;

      // ---- branch resolution (no completions in such a cycle)
      res_now = -1; mis_now = 0;
      for (int i = 0; i < res_seq.size(); i++)
        if (res_due[i] <= cyc) begin res_now = res_seq[i]; res_seq.delete(i); res_due.delete(i); break; end
      if (res_now >= 0) begin
        br_valid = 1;
        br_id = $clog2(NC)'(ins[res_now].ckpt);
        mis_now = ($urandom_range(0, 4) == 0);
        br_mispredict = mis_now;
      end

      // ---- completions
      wb_list.delete();
      if (res_now < 0)
        for (int i = fu_seq.size() - 1; i >= 0; i--)
          if (fu_due[i] <= cyc && wb_list.size() < WB) begin
            wb_list.push_back(fu_seq[i]); fu_seq.delete(i); fu_due.delete(i);
          end
      foreach (wb_list[k]) begin
        wb_valid[k] = 1;
        wb_idx[k]   = $clog2(NW)'(ins[wb_list[k]].entry);
      end

      // ---- next instruction
      if (!have_next && nseq < N_INSTR) gen_next();
      if (!mis_now && have_next && !(nxt.has_dest && free_list.size() == 0) && $urandom_range(0, 9) != 0) begin
        in_valid      = 1;
        in_op         = OP_W'(nseq);
        in_src_valid  = {nxt.sv[1], nxt.sv[0]};
        in_src_lreg[0] = $clog2(NL)'(nxt.sl[0]);
        in_src_lreg[1] = $clog2(NL)'(nxt.sl[1]);
        in_has_dest   = nxt.has_dest;
        in_dest_lreg  = $clog2(NL)'(nxt.dest_lreg);
        in_dest_preg  = nxt.has_dest ? $clog2(NP)'(free_list[0]) : '0;
        in_is_branch  = nxt.is_branch;
      end
      #1;

      // ---- issue checks
      begin
        int nis = 0;
        bit issued_now[int];
        for (int i = 0; i < IWD; i++) if (iss_valid[i]) begin
          int q = entry_seq[iss_idx[i]];
          nis++;
          chk(q >= 0, "issue of an entry holding no instruction");
          if (q >= 0) begin
            issued_now[q] = 1;
            chk(!ins[q].issued, "instruction issued twice");
            chk(prod_done(ins[q].prod[0], cyc) && prod_done(ins[q].prod[1], cyc), "issued before its producers completed");
            chk(!ins[q].has_dest || int'(iss_dest_tag[i]) == ins[q].dest_preg, "wrong destination tag at issue");
            for (int s = 0; s < 2; s++)
              if (ins[q].sv[s]) chk(int'(iss_src_tag[i][s]) == ins[q].sp[s], "wrong source tag at issue");
            ins[q].issued = 1;
            fu_seq.push_back(q);
            if (PROFILE)
              fu_due.push_back(cyc + (ins[q].has_dest ? $urandom_range(10, 14) : $urandom_range(1, 3)));
            else if (slow_phase() && ins[q].has_dest)
              fu_due.push_back(cyc + $urandom_range(LAT_MAX, 2 * LAT_MAX));
            else
              fu_due.push_back(cyc + (($urandom_range(0, 9) == 0) ? $urandom_range(8, LAT_MAX)
                                                                 : $urandom_range(1, 3)));
          end
        end
        if (nis < IWD)
          for (int e = 0; e < NW; e++) begin
            int q = entry_seq[e];
            if (q >= 0 && !ins[q].issued && !issued_now.exists(q) && ins[q].accept_cyc < cyc)
              chk(!(prod_done(ins[q].prod[0], cyc) && prod_done(ins[q].prod[1], cyc)),
                  $sformatf("ready instruction %0d in entry %0d not issued", q, e));
          end
      end

      // ---- completion checks
      foreach (wb_list[k]) begin
        int p = wb_list[k];
        int waiting = 0;
        for (int e = 0; e < NW; e++) begin
          int q = entry_seq[e];
          if (q >= 0 && !ins[q].issued && (ins[q].prod[0] == p || ins[q].prod[1] == p)) waiting++;
        end
        if (ins[p].has_dest) begin
          n_dest_compl++;
          n_cmp_total += int'(stat_wb_cmp[k]);
          chk(stat_wb_dest[k], "completion lost its destination");
          chk(int'(stat_wb_cmp[k]) >= waiting, "fewer comparisons than waiting dependents");
          if (ins[p].ndeps <= 1 || SCHEME == INDEXING_ONLY) begin
            chk(int'(stat_wb_cmp[k]) == ins[p].ndeps && !stat_wb_bcast[k], "single-dependent wakeup not indexed");
            if (ins[p].ndeps == 1) n_indexed++; else n_nodep++;
          end else begin
            chk(stat_wb_bcast[k], "multi-dependent wakeup did not broadcast");
            if (SCHEME == HYBRID_PLAIN) chk(int'(stat_wb_cmp[k]) == NW, "plain broadcast not to all entries");
            n_bcast++;
            n_cmp_bcast += int'(stat_wb_cmp[k]);
            if (int'(stat_wb_cmp[k]) < NW) n_snoop_lim++;
          end
        end else begin
          chk(int'(stat_wb_cmp[k]) == 0, "completion without destination compared");
        end
        ins[p].completed = 1;
        ins[p].complete_cyc = cyc;
        entry_seq[ins[p].entry] = -1;
        if (ins[p].is_branch) begin res_seq.push_back(p); res_due.push_back(cyc + $urandom_range(1, 4)); end
      end

      // ---- dispatch
      if (in_valid) begin
        bit dep_blocked = 0;
        for (int s = 0; s < 2; s++) begin
          int p = rat_seq[nxt.sl[s]];
          if (nxt.sv[s] && p >= 0 && !ins[p].completed && ins[p].ndeps > 0) dep_blocked = 1;
        end
        if (stat_full) n_full++;
        if (stat_ckpt_stall) n_ckpt_stall++;
        if (stat_bc_stall) begin
          n_bc_stall++;
          chk(BC_STALL && SCHEME != INDEXING_ONLY && dep_blocked && !bc_held, "broadcast hold without a reason");
        end
        if (stat_bc_stall) bc_held = 1;
        if (in_ready) bc_held = 0;
        if (stat_dep_stall) begin
          n_dep_stall++;
          chk(SCHEME == INDEXING_ONLY && dep_blocked, "dependence stall without a reason");
        end
        if (SCHEME == INDEXING_ONLY && dep_blocked) chk(!in_ready, "second dependent inserted in Indexing-Only");
        if (in_ready) begin
          int q = nseq++;
          ins[q] = nxt;
          have_next = 0;
          ins[q].entry = int'(in_entry);
          ins[q].accept_cyc = cyc;
          ins[q].complete_cyc = -1;
          chk(entry_seq[ins[q].entry] < 0, "insertion into an occupied entry");
          for (int s = 0; s < 2; s++) begin
            ins[q].prod[s] = -1;
            if (ins[q].sv[s]) begin
              int p = rat_seq[ins[q].sl[s]];
              ins[q].sp[s] = rat_preg[ins[q].sl[s]];
              if (p >= 0 && !ins[p].completed) begin
                ins[q].prod[s] = p;
                if (s == 0 || ins[q].prod[0] != p) ins[p].ndeps++;
              end
              else if (p >= 0 && ins[p].complete_cyc == cyc) n_bypass++;
            end
          end
          if (ins[q].has_dest) begin
            ins[q].dest_preg = free_list.pop_front();
            chk(int'(in_old_preg) == rat_preg[ins[q].dest_lreg], "wrong old mapping");
            ins[q].old_preg = rat_preg[ins[q].dest_lreg];
            rat_preg[ins[q].dest_lreg] = ins[q].dest_preg;
            rat_seq[ins[q].dest_lreg] = q;
          end
          if (ins[q].is_branch) begin
            ins[q].ckpt = int'(in_ckpt);
            for (int r = 0; r < NL; r++) begin ck_preg[ins[q].ckpt][r] = rat_preg[r]; ck_seq[ins[q].ckpt][r] = rat_seq[r]; end
          end
          entry_seq[ins[q].entry] = q;
          rob.push_back(q);
        end else begin
          chk(stat_full || stat_ckpt_stall || stat_dep_stall || stat_bc_stall, "insertion refused without a reason");
        end
      end

      // ---- branch outcome
      if (res_now >= 0) begin
        ins[res_now].resolved = 1;
        if (mis_now) begin
          n_mis++;
          squash_after(res_now);
          bc_held = 0;
          if (have_next) have_next = 0;   // the fetched instruction was on the wrong path
        end else n_ok++;
      end

      // ---- progress watchdog: a lost wakeup or entry stops retirement
      if (n_retired + n_squashed != last_done) begin
        last_done = n_retired + n_squashed;
        last_progress = cyc;
      end else if (cyc - last_progress > 4000) begin
        failures++;
        $display("[%0d] no instruction retired for 4000 cycles at cycle %0d", int'(SCHEME), cyc);
        break;
      end

      // ---- retire
      while (rob.size() > 0 && ins[rob[0]].completed && (!ins[rob[0]].is_branch || ins[rob[0]].resolved)) begin
        int q = rob.pop_front();
        if (ins[q].has_dest) free_list.push_back(ins[q].old_preg);
        n_retired++;
      end
      if (nseq >= N_INSTR && rob.size() == 0) break;
    end
    // squashed instructions are refetched as new sequence numbers, so the
    // stream ends when N_INSTR have been inserted and all have left
    @(negedge clk);
    in_valid = 0; wb_valid = '0; br_valid = 0;
    chk(fu_seq.size() == 0, "instructions left in the execution units");
    for (int e = 0; e < NW; e++) chk(entry_seq[e] < 0, "instruction left in the window");
    chk(n_indexed > 0, "no indexed wakeup happened");
    chk(n_nodep > 0, "no completion without dependents");
    if (!PROFILE) begin
      chk(n_bypass > 0, "no dispatch-time bypass happened");
      if (SCHEME != INDEXING_ONLY) chk(n_full > 0, "window never filled");   // Indexing-Only stalls first
      chk(n_ckpt_stall > 0, "checkpoints never ran out");
      chk(n_mis > 0 && n_ok > 0, "branch outcomes not both seen");
    end else if (n_dest_compl > 0) begin
      // one comparison per single dependent, and per multi-dependent
      // producer all entries (Plain), one per snooping dependent (Snoop) or,
      // once the stalled dependents are inserted, one (Indexing-Only)
      // Hybrid-Snoop: a broadcast reaches its own dependents and any entry
      // still snooping for another broadcasting producer, so the profile
      // gives only a lower bound; the measured snooping-entry count per
      // broadcast is printed
      real avg = real'(n_cmp_total) / real'(n_dest_compl);
      real expv = (SCHEME == HYBRID_PLAIN) ? P_SINGLE + NW * P_MORE :
                  (SCHEME == HYBRID_SNOOP) ? P_SINGLE + N_MULTI * P_MORE : P_SINGLE + P_MORE;
      real tol  = (SCHEME == HYBRID_PLAIN) ? 1.0 : 0.06;
      $display("[scheme %0d] profile: measured %0.3f comparisons, predicted %0s%0.3f", int'(SCHEME), avg,
               (SCHEME == HYBRID_SNOOP) ? "at least " : "", expv);
      if (SCHEME == HYBRID_SNOOP) begin
        $display("[scheme %0d] profile: snooping entries per broadcast %0.2f", int'(SCHEME),
                 (n_bcast > 0) ? real'(n_cmp_bcast) / real'(n_bcast) : 0.0);
        chk(avg > expv - tol && avg < 2.0 * expv, "average comparisons off the profile's prediction");
      end else
        chk(avg > expv - tol && avg < expv + tol, "average comparisons off the profile's prediction");
    end
    if (SCHEME == INDEXING_ONLY) chk(n_dep_stall > 0, "no Indexing-Only stall happened");
    else chk(n_bcast > 0, "no broadcast wakeup happened");
    if (SCHEME == HYBRID_SNOOP) chk(n_snoop_lim > 0, "no snoop-limited broadcast happened");
    if (BC_STALL) chk(n_bc_stall > 0, "no one-cycle broadcast hold happened");
    $display("[scheme %0d] instructions=%0d retired=%0d squashed=%0d cycles=%0d", int'(SCHEME), nseq, n_retired, n_squashed, cyc);
    $display("[scheme %0d] indexed=%0d broadcast=%0d snoop_limited=%0d no_dependent=%0d bypass=%0d full=%0d ckpt_stall=%0d dep_stall=%0d bc_hold=%0d mispredict=%0d correct=%0d",
             int'(SCHEME), n_indexed, n_bcast, n_snoop_lim, n_nodep, n_bypass, n_full, n_ckpt_stall, n_dep_stall, n_bc_stall, n_mis, n_ok);
    $display("[scheme %0d] comparisons per completing instruction with a destination: %0.3f",
             int'(SCHEME), (n_dest_compl > 0) ? real'(n_cmp_total) / real'(n_dest_compl) : 0.0);
    done = 1;
  endtask

  initial run();
endmodule
