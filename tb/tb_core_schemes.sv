// tb_core_schemes: end-to-end test of the alternative wakeup configurations.
//
// Two copies of hybrid_wakeup_core, one built for Indexing-Only and one for
// Hybrid-Plain, each driven by its own core_driver with the same kind of
// random stream as the default (Hybrid-Snoop) end-to-end test. Indexing-Only
// must stall insertion of a second dependent and never broadcast;
// Hybrid-Plain must broadcast to every entry. A third copy runs Hybrid-Snoop
// with the optional one-cycle hold before a Broadcast bit is set.
module tb_core_schemes;
  import wakeup_pkg::*;
  localparam int IW = $clog2(WIN_ENTRIES), TW = $clog2(NUM_PREGS), LW = $clog2(NUM_LREGS);
  localparam int CW = $clog2(NUM_CKPT), CNW = $clog2(WIN_ENTRIES + 1);
  int c[3], f[3];
  bit d[3];

  // copy 2 is Hybrid-Snoop with the one-cycle hold before a Broadcast bit is set
  for (genvar g = 0; g < 3; g++) begin : g_s
    localparam scheme_e S = (g == 0) ? INDEXING_ONLY : (g == 1) ? HYBRID_PLAIN : HYBRID_SNOOP;
    localparam bit      H = (g == 2);
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

    hybrid_wakeup_core #(.SCHEME(S), .BCAST_STALL(H)) dut (.*);
    core_driver #(.SCHEME(S), .N_INSTR(20000), .BC_STALL(H)) drv (.*);
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
