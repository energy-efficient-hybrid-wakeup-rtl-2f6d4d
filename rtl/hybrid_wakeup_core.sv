// hybrid_wakeup_core: rename and issue stage of an out-of-order core with
// energy-efficient hybrid wakeup.
//
// One decoded instruction per cycle enters with logical register numbers and
// a free physical register for its destination (from a free list outside this
// block). rat_pie maps the sources to physical tags and to the window entries
// of their producers (PIE), preg_ready says whether each source is already
// available, and issue_window inserts the instruction, records it in its
// producers' DIE fields (or sets their Broadcast/Snoop bits), and wakes it
// later with a single indexed comparison in the common case. Up to
// ISSUE_WIDTH ready instructions leave per cycle on the iss_* ports; the
// execution units return completions on wb_valid/wb_idx (window index), at
// which point the destination's ready bit is set and the dependents are
// woken. A branch takes a RAT checkpoint (including PIE); br_* resolves it
// and, on a misprediction, restores the RAT and squashes younger entries.
//
// Handshake: in_valid/in_ready; an instruction is taken in a cycle where both
// are high. in_ready falls when the window is full, when a branch finds no
// free checkpoint, in a misprediction cycle, and (INDEXING_ONLY) while a
// source's producer already has a dependent, and (BCAST_STALL) for one cycle
// before an instruction sets a Broadcast bit. in_entry is the window entry
// and in_ckpt the checkpoint of an accepted branch; in_old_preg is the
// mapping the destination replaced, for freeing when the instruction retires.
// Everything is one clock domain with synchronous active-low reset. An
// accepted instruction may issue from the next cycle on; a completion in
// cycle t lets its dependents issue in cycle t+1.
//
// The execution units must drop instructions squashed by a misprediction
// (iss_mask gives each issued instruction's branch mask) and must report a
// completion for every other issued instruction, once. Stores and branches
// (in_has_dest low) wake nobody; a branch must not have a destination.
//
// The structure (RAT with PIE, ready bits, window with DIE/Empty/Broadcast/
// Snoop, arbiter) follows the hybrid wakeup scheme; the interface, the single
// dispatch per cycle and the checkpoint mechanism are this design's own.
module hybrid_wakeup_core #(
  parameter int unsigned         WIN_ENTRIES = wakeup_pkg::WIN_ENTRIES,
  parameter int unsigned         ISSUE_WIDTH = wakeup_pkg::ISSUE_WIDTH,
  parameter int unsigned         WB_WIDTH    = wakeup_pkg::WB_WIDTH,
  parameter int unsigned         NUM_LREGS   = wakeup_pkg::NUM_LREGS,
  parameter int unsigned         NUM_PREGS   = wakeup_pkg::NUM_PREGS,
  parameter int unsigned         NUM_CKPT    = wakeup_pkg::NUM_CKPT,
  parameter int unsigned         OP_W        = wakeup_pkg::OP_W,
  parameter wakeup_pkg::scheme_e SCHEME      = wakeup_pkg::HYBRID_SNOOP,
  parameter bit                  BCAST_STALL = 1'b0,
  localparam int unsigned        IDX_W       = $clog2(WIN_ENTRIES),
  localparam int unsigned        TAG_W       = $clog2(NUM_PREGS),
  localparam int unsigned        LREG_W      = $clog2(NUM_LREGS),
  localparam int unsigned        CK_W        = (NUM_CKPT > 1) ? $clog2(NUM_CKPT) : 1,
  localparam int unsigned        CNT_W       = $clog2(WIN_ENTRIES + 1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // decoded instruction in
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic [OP_W-1:0]                     in_op,
  input  logic [1:0]                          in_src_valid,
  input  logic [1:0][LREG_W-1:0]              in_src_lreg,
  input  logic                                in_has_dest,
  input  logic [LREG_W-1:0]                   in_dest_lreg,
  input  logic [TAG_W-1:0]                    in_dest_preg,
  input  logic                                in_is_branch,
  output logic [IDX_W-1:0]                    in_entry,
  output logic [CK_W-1:0]                     in_ckpt,
  output logic [TAG_W-1:0]                    in_old_preg,
  // issue to the execution units
  output logic [ISSUE_WIDTH-1:0]              iss_valid,
  output logic [ISSUE_WIDTH-1:0][IDX_W-1:0]   iss_idx,
  output logic [ISSUE_WIDTH-1:0][OP_W-1:0]    iss_op,
  output logic [ISSUE_WIDTH-1:0]              iss_has_dest,
  output logic [ISSUE_WIDTH-1:0][TAG_W-1:0]   iss_dest_tag,
  output logic [ISSUE_WIDTH-1:0][1:0][TAG_W-1:0] iss_src_tag,
  output logic [ISSUE_WIDTH-1:0][NUM_CKPT-1:0] iss_mask,
  // completions from the execution units
  input  logic [WB_WIDTH-1:0]                 wb_valid,
  input  logic [WB_WIDTH-1:0][IDX_W-1:0]      wb_idx,
  // branch resolution
  input  logic                                br_valid,
  input  logic [CK_W-1:0]                     br_id,
  input  logic                                br_mispredict,
  // per-cycle event outputs (energy accounting)
  output logic [WB_WIDTH-1:0][CNT_W-1:0]      stat_wb_cmp,    // comparisons per completion
  output logic [WB_WIDTH-1:0]                 stat_wb_bcast,  // completion broadcast its tag
  output logic [WB_WIDTH-1:0]                 stat_wb_dest,   // completion had a destination
  output logic                                stat_full,
  output logic                                stat_ckpt_stall,
  output logic                                stat_dep_stall,
  output logic [1:0]                          stat_links,
  output logic [1:0]                          stat_bcast_set,
  output logic [1:0]                          stat_bypass,    // source made ready by a same-cycle completion
  output logic                                stat_bc_stall   // held a cycle before setting Broadcast
);
  logic [1:0][TAG_W-1:0] src_preg;
  logic [1:0][IDX_W-1:0] src_pie;
  logic [1:0]            src_ready;
  logic                  ckpt_avail;
  logic [NUM_CKPT-1:0]   live_mask;
  logic                  win_ready, accept, ckpt_ok;
  logic [WB_WIDTH-1:0]   wb_has_dest;
  logic [WB_WIDTH-1:0][TAG_W-1:0] wb_tag;

  assign ckpt_ok  = !in_is_branch || ckpt_avail;
  assign in_ready = win_ready && ckpt_ok;
  assign accept   = in_valid && in_ready;
  assign stat_ckpt_stall = in_valid && in_is_branch && !ckpt_avail;

  rat_pie #(
    .NUM_LREGS(NUM_LREGS), .NUM_PREGS(NUM_PREGS),
    .WIN_ENTRIES(WIN_ENTRIES), .NUM_CKPT(NUM_CKPT)
  ) u_rat (
    .clk, .rst_n,
    .src_lreg      (in_src_lreg),
    .src_preg      (src_preg),
    .src_pie       (src_pie),
    .ren_valid     (accept && in_has_dest),
    .ren_lreg      (in_dest_lreg),
    .ren_preg      (in_dest_preg),
    .ren_pie       (in_entry),
    .ren_old_preg  (in_old_preg),
    .ckpt_take     (accept && in_is_branch),
    .ckpt_avail    (ckpt_avail),
    .ckpt_id       (in_ckpt),
    .live_mask     (live_mask),
    .br_valid, .br_id, .br_mispredict
  );

  preg_ready #(.NUM_PREGS(NUM_PREGS), .WB_WIDTH(WB_WIDTH)) u_ready (
    .clk, .rst_n,
    .rd_tag      (src_preg),
    .rd_ready    (src_ready),
    .alloc_valid (accept && in_has_dest),
    .alloc_tag   (in_dest_preg),
    .wb_valid    (wb_valid & wb_has_dest),
    .wb_tag      (wb_tag)
  );

  // Sources that only became ready through a completion in this cycle.
  logic [1:0] src_bypass;
  always_comb
    for (int s = 0; s < 2; s++) begin
      src_bypass[s] = 1'b0;
      for (int k = 0; k < WB_WIDTH; k++)
        if (wb_valid[k] && wb_has_dest[k] && wb_tag[k] == src_preg[s] && in_src_valid[s])
          src_bypass[s] = 1'b1;
    end
  assign stat_bypass = accept ? src_bypass : 2'b00;

  issue_window #(
    .WIN_ENTRIES(WIN_ENTRIES), .ISSUE_WIDTH(ISSUE_WIDTH), .WB_WIDTH(WB_WIDTH),
    .NUM_PREGS(NUM_PREGS), .NUM_CKPT(NUM_CKPT), .OP_W(OP_W), .SCHEME(SCHEME),
    .BCAST_STALL(BCAST_STALL)
  ) u_win (
    .clk, .rst_n,
    .disp_valid     (in_valid && ckpt_ok),
    .disp_ready     (win_ready),
    .disp_idx       (in_entry),
    .disp_op        (in_op),
    .disp_src_valid (in_src_valid),
    .disp_src_tag   (src_preg),
    .disp_src_ready (src_ready),
    .disp_src_pie   (src_pie),
    .disp_has_dest  (in_has_dest),
    .disp_dest_tag  (in_dest_preg),
    .disp_mask      (live_mask),
    .iss_valid, .iss_idx, .iss_op, .iss_has_dest, .iss_dest_tag, .iss_src_tag, .iss_mask,
    .wb_valid, .wb_idx,
    .wb_has_dest    (wb_has_dest),
    .wb_tag         (wb_tag),
    .wb_n_cmp       (stat_wb_cmp),
    .wb_bcast       (stat_wb_bcast),
    .br_valid, .br_id, .br_mispredict,
    .stat_full, .stat_dep_stall, .stat_links, .stat_bcast_set, .stat_bc_stall
  );

  assign stat_wb_dest = wb_valid & wb_has_dest;

  // A branch has no destination register.
  always_ff @(posedge clk)
    if (rst_n && accept)
      assert (!(in_is_branch && in_has_dest)) else $error("branch with a destination");
endmodule
