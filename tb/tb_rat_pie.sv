// tb_rat_pie: self-checking test of the RAT with PIE field and checkpoints.
//
// Random renames, branch checkpoints, correct resolutions and mispredictions
// are applied against a reference model kept in this testbench (mapping and
// PIE arrays, checkpoint copies, live set and per-checkpoint younger sets).
// Every cycle both source lookups, the old mapping of the renamed register,
// the free-checkpoint choice and the live mask are compared. The test counts
// how many checkpoints were taken, resolved and mispredicted, and how often
// all checkpoints were in use, and fails if any of these never happened.
module tb_rat_pie;
  localparam int NL = wakeup_pkg::NUM_LREGS, NP = wakeup_pkg::NUM_PREGS, NW = wakeup_pkg::WIN_ENTRIES, NC = wakeup_pkg::NUM_CKPT;
  localparam int LW = $clog2(NL), TW = $clog2(NP), IW = $clog2(NW), CW = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic [1:0][LW-1:0] src_lreg;
  logic [1:0][TW-1:0] src_preg;
  logic [1:0][IW-1:0] src_pie;
  logic ren_valid;
  logic [LW-1:0] ren_lreg;
  logic [TW-1:0] ren_preg, ren_old_preg;
  logic [IW-1:0] ren_pie;
  logic ckpt_take, ckpt_avail;
  logic [CW-1:0] ckpt_id;
  logic [NC-1:0] live_mask;
  logic br_valid, br_mispredict;
  logic [CW-1:0] br_id;

  rat_pie dut (.*);

  int m_map[NL], m_pie[NL];
  int c_map[NC][NL], c_pie[NC][NL];
  bit live[NC];
  bit older[NC][NC];
  int checks = 0, failures = 0;
  int n_take = 0, n_ok = 0, n_mis = 0, n_full = 0;

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_id; bit exp_av; int mask;
    ren_valid = 0; ckpt_take = 0; br_valid = 0; br_mispredict = 0; br_id = '0;
    src_lreg = '0; ren_lreg = '0; ren_preg = '0; ren_pie = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NL; r++) begin m_map[r] = r; m_pie[r] = 0; end
    for (int c = 0; c < NC; c++) begin live[c] = 0; for (int d = 0; d < NC; d++) older[c][d] = 0; end
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      src_lreg[0] = LW'($urandom_range(0, NL - 1));
      src_lreg[1] = LW'($urandom_range(0, NL - 1));
      ren_lreg    = LW'($urandom_range(0, NL - 1));
      ren_preg    = TW'($urandom_range(0, NP - 1));
      ren_pie     = IW'($urandom_range(0, NW - 1));
      // a cycle either renames or takes a checkpoint; resolutions are random
      ckpt_take   = ($urandom_range(0, 5) == 0);
      ren_valid   = !ckpt_take && ($urandom_range(0, 1) == 1);
      br_valid    = 0; br_mispredict = 0;
      begin
        automatic int cand[$];
        for (int c = 0; c < NC; c++) if (live[c]) cand.push_back(c);
        if (cand.size() > 0 && $urandom_range(0, 6) == 0) begin
          br_valid = 1;
          br_id = CW'(cand[$urandom_range(0, cand.size() - 1)]);
          br_mispredict = ($urandom_range(0, 2) == 0);
        end
      end
      #1;
      for (int s = 0; s < 2; s++) begin
        check("src_preg", int'(src_preg[s]), m_map[src_lreg[s]]);
        check("src_pie",  int'(src_pie[s]),  m_pie[src_lreg[s]]);
      end
      check("old_preg", int'(ren_old_preg), m_map[ren_lreg]);
      exp_av = 0; exp_id = 0;
      for (int c = NC - 1; c >= 0; c--) if (!live[c]) begin exp_av = 1; exp_id = c; end
      check("ckpt_avail", int'(ckpt_avail), int'(exp_av));
      if (exp_av) check("ckpt_id", int'(ckpt_id), exp_id);
      mask = 0;
      for (int c = 0; c < NC; c++) if (live[c]) mask |= (1 << c);
      check("live_mask", int'(live_mask), mask);
      if (!exp_av) n_full++;
      @(posedge clk);
      // reference update
      if (br_valid && br_mispredict) begin
        automatic int b = int'(br_id);
        n_mis++;
        for (int r = 0; r < NL; r++) begin m_map[r] = c_map[b][r]; m_pie[r] = c_pie[b][r]; end
        for (int c = 0; c < NC; c++) if (c == b || older[c][b]) live[c] = 0;
      end else begin
        if (ren_valid) begin m_map[ren_lreg] = int'(ren_preg); m_pie[ren_lreg] = int'(ren_pie); end
        if (br_valid) begin
          n_ok++;
          live[br_id] = 0;
          for (int c = 0; c < NC; c++) older[c][br_id] = 0;
        end
        if (ckpt_take && exp_av) begin
          n_take++;
          for (int r = 0; r < NL; r++) begin c_map[exp_id][r] = m_map[r]; c_pie[exp_id][r] = m_pie[r]; end
          for (int d = 0; d < NC; d++) older[exp_id][d] = live[d];
          live[exp_id] = 1;
        end
      end
    end
    checks++;
    if (n_take == 0 || n_ok == 0 || n_mis == 0 || n_full == 0) begin
      failures++;
      $display("mechanism missing: take=%0d ok=%0d mis=%0d full=%0d", n_take, n_ok, n_mis, n_full);
    end
    $display("taken=%0d correct=%0d mispredicted=%0d full_cycles=%0d", n_take, n_ok, n_mis, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
