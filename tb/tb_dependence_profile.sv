// tb_dependence_profile: comparison counts for the evaluated dependence
// profile.
//
// The evaluated core completes, on average, 52.1% of its destination-writing
// instructions with exactly one close-by dependent and 8.7% with more than
// one (2.8 on average when there are several), the rest with none. This test
// feeds all three schemes, at the default 96-entry window, with a stream
// built to have that profile, and checks the measured comparisons per
// completing instruction against the arithmetic that follows from it:
//   Hybrid-Plain  0.521 + 96  * 0.087 = 8.87
//   Hybrid-Snoop  0.521 + 2.8 * 0.087 = 0.77
//   Indexing-Only 0.521 +       0.087 = 0.61 (the extra dependents stall)
module tb_dependence_profile;
  import wakeup_pkg::*;
  localparam int IW = $clog2(WIN_ENTRIES), TW = $clog2(NUM_PREGS), LW = $clog2(NUM_LREGS);
  localparam int CW = $clog2(NUM_CKPT), CNW = $clog2(WIN_ENTRIES + 1);
  int c[3], f[3];
  bit d[3];

  for (genvar g = 0; g < 3; g++) begin : g_s
    localparam scheme_e S = (g == 0) ? INDEXING_ONLY : (g == 1) ? HYBRID_PLAIN : HYBRID_SNOOP;
    logic clk, rst_n, in_valid, in_ready, in_has_dest, in_is_branch;
    logic [OP_W-1:0] in_op;
    logic [1:0] in_src_valid;
    logic [1:0][LW-1:0] in_src_lreg;
    logic [LW-1:0] in_dest_lreg;
    logic [TW-1:0] in_dest_preg, in_old_preg;
    logic [IW-1:0] in_entry;
    logic [CW-1:0] in_ckpt, br_id;
    logic [ISSUE_WIDTH-1:0] iss_valid, iss_has_dest;
    logic [ISSUE_WIDTH-1:0][IW-1:0] iss_idx;
    logic [ISSUE_WIDTH-1:0][OP_W-1:0] iss_op;
    logic [ISSUE_WIDTH-1:0][TW-1:0] iss_dest_tag;
    logic [ISSUE_WIDTH-1:0][1:0][TW-1:0] iss_src_tag;
    logic [ISSUE_WIDTH-1:0][NUM_CKPT-1:0] iss_mask;
    logic [WB_WIDTH-1:0] wb_valid, stat_wb_bcast, stat_wb_dest;
    logic [WB_WIDTH-1:0][IW-1:0] wb_idx;
    logic [WB_WIDTH-1:0][CNW-1:0] stat_wb_cmp;
    logic br_valid, br_mispredict, stat_full, stat_ckpt_stall, stat_dep_stall, stat_bc_stall;
    logic [1:0] stat_links, stat_bcast_set, stat_bypass;
    int checks, failures;
    bit done;

    hybrid_wakeup_core #(.SCHEME(S)) dut (.*);
    core_driver #(.SCHEME(S), .N_INSTR(40000), .PROFILE(1)) drv (.*);
    assign c[g] = checks;
    assign f[g] = failures;
    assign d[g] = done;
  end

  initial begin
    wait (d[0] && d[1] && d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
