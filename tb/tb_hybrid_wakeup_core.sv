// tb_hybrid_wakeup_core: end-to-end test of the issue stage at its default
// size (96-entry window, six-wide issue and completion, Hybrid-Snoop).
//
// core_driver supplies a random instruction stream with branches and stores,
// models the free list, reorder buffer, execution units and branch outcomes,
// and checks wakeup, issue and comparison counts cycle by cycle. The core is
// instantiated with all parameters at their defaults.
module tb_hybrid_wakeup_core;
  import wakeup_pkg::*;
  localparam int IW = $clog2(WIN_ENTRIES), TW = $clog2(NUM_PREGS), LW = $clog2(NUM_LREGS);
  localparam int CW = $clog2(NUM_CKPT), CNW = $clog2(WIN_ENTRIES + 1);

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

  hybrid_wakeup_core dut (.*);
  core_driver #(.SCHEME(HYBRID_SNOOP), .N_INSTR(20000)) drv (.*);

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
