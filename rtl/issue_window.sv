// issue_window: centralized instruction window with hybrid (indexed plus
// occasional broadcast) wakeup.
//
// Each entry holds the usual fields (opcode, two source tags with their
// ready bits, destination tag, branch mask) and the fields the scheme adds:
//   DIE       - index of the one dependent instruction recorded so far,
//   Empty     - set while no dependent has been recorded (DIE unused),
//   Broadcast - set when a second dependent arrived: wake by broadcast,
//   Snoop     - this entry takes part in broadcast comparisons.
//
// Insertion (one instruction per cycle). The caller supplies, per source,
// its tag, whether it is ready (register ready bit, with same-cycle
// completions forwarded) and the PIE of its producer. For each source that
// is not ready, the producer entry is updated:
//   - producer Empty set: DIE <= new entry, Empty <= 0 (the common case);
//   - otherwise, INDEXING_ONLY: insertion stalls (disp_ready low) until the
//     producer completes and the source becomes ready;
//   - otherwise, Hybrid: Broadcast <= 1. In HYBRID_SNOOP the new entry's
//     Snoop bit is set, and if Broadcast was still clear also the Snoop bit
//     of the entry DIE points to.
// Two sources from the same producer count as one dependence.
//
// Wakeup. For every completing entry (wb_valid/wb_idx) the window reads its
// destination tag and added fields, and wakeup_enable turns them into
// comparator enables: DIE decoded to one entry, or a broadcast to all
// entries (HYBRID_PLAIN) or to the snooping ones (HYBRID_SNOOP). Only
// enabled entries compare the tag with their source tags and set the
// matching ready bits. The completing entry is freed in the same cycle.
// wb_n_cmp reports the comparisons each completion cost.
//
// Issue. Valid, not yet issued entries whose sources are all ready request
// the issue_arbiter; granted entries are marked issued and stay in the
// window until they complete, since consumers may still link to them.
//
// Branches. Every entry carries the mask of unresolved branch checkpoints
// it follows. A misprediction of checkpoint br_id frees every entry whose
// mask has that bit; a correct resolution clears the bit everywhere. DIE
// pointers left dangling by squashed consumers are kept: they can only
// cause a useless comparison or an unneeded broadcast, never a missed
// wakeup. No insertion is accepted in a misprediction cycle.
//
// Optional one-cycle hold (BCAST_STALL, off by default): an instruction that
// would set a producer's Broadcast bit is refused for one cycle, so that a
// producer completing in that cycle needs no broadcast. It trades issue
// bandwidth for fewer broadcasts.
//
// Timing: all outputs are combinational from the current state and inputs;
// insertion, wakeup, issue marking, freeing and squash take effect at the
// next rising edge. Reset is synchronous, active low, and empties the window.
//
// The added fields and their update and wakeup rules follow the scheme.
// This design's own choices: one insertion per cycle, entries freed at
// completion rather than at issue, lowest free entry allocated, Snoop bits
// cleared when an entry issues, is freed or is allocated, and one comparison counted per
// enabled entry (its comparator checks both source tags).
module issue_window #(
  parameter int unsigned         WIN_ENTRIES = wakeup_pkg::WIN_ENTRIES,
  parameter int unsigned         ISSUE_WIDTH = wakeup_pkg::ISSUE_WIDTH,
  parameter int unsigned         WB_WIDTH    = wakeup_pkg::WB_WIDTH,
  parameter int unsigned         NUM_PREGS   = wakeup_pkg::NUM_PREGS,
  parameter int unsigned         NUM_CKPT    = wakeup_pkg::NUM_CKPT,
  parameter int unsigned         OP_W        = wakeup_pkg::OP_W,
  parameter wakeup_pkg::scheme_e SCHEME      = wakeup_pkg::HYBRID_SNOOP,
  parameter bit                  BCAST_STALL = 1'b0,
  localparam int unsigned        IDX_W       = $clog2(WIN_ENTRIES),
  localparam int unsigned        TAG_W       = $clog2(NUM_PREGS),
  localparam int unsigned        CK_W        = (NUM_CKPT > 1) ? $clog2(NUM_CKPT) : 1,
  localparam int unsigned        CNT_W       = $clog2(WIN_ENTRIES + 1)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // insertion
  input  logic                                disp_valid,
  output logic                                disp_ready,
  output logic [IDX_W-1:0]                    disp_idx,
  input  logic [OP_W-1:0]                     disp_op,
  input  logic [1:0]                          disp_src_valid,
  input  logic [1:0][TAG_W-1:0]               disp_src_tag,
  input  logic [1:0]                          disp_src_ready,
  input  logic [1:0][IDX_W-1:0]               disp_src_pie,
  input  logic                                disp_has_dest,
  input  logic [TAG_W-1:0]                    disp_dest_tag,
  input  logic [NUM_CKPT-1:0]                 disp_mask,
  // issue
  output logic [ISSUE_WIDTH-1:0]              iss_valid,
  output logic [ISSUE_WIDTH-1:0][IDX_W-1:0]   iss_idx,
  output logic [ISSUE_WIDTH-1:0][OP_W-1:0]    iss_op,
  output logic [ISSUE_WIDTH-1:0]              iss_has_dest,
  output logic [ISSUE_WIDTH-1:0][TAG_W-1:0]   iss_dest_tag,
  output logic [ISSUE_WIDTH-1:0][1:0][TAG_W-1:0] iss_src_tag,
  output logic [ISSUE_WIDTH-1:0][NUM_CKPT-1:0] iss_mask,
  // completion
  input  logic [WB_WIDTH-1:0]                 wb_valid,
  input  logic [WB_WIDTH-1:0][IDX_W-1:0]      wb_idx,
  output logic [WB_WIDTH-1:0]                 wb_has_dest,
  output logic [WB_WIDTH-1:0][TAG_W-1:0]      wb_tag,
  output logic [WB_WIDTH-1:0][CNT_W-1:0]      wb_n_cmp,
  output logic [WB_WIDTH-1:0]                 wb_bcast,
  // branch resolution
  input  logic                                br_valid,
  input  logic [CK_W-1:0]                     br_id,
  input  logic                                br_mispredict,
  // per-cycle events
  output logic                                stat_full,      // no free entry
  output logic                                stat_dep_stall, // Indexing-Only stall
  output logic [1:0]                          stat_links,     // DIE pointers written
  output logic [1:0]                          stat_bcast_set, // Broadcast bits set
  output logic                                stat_bc_stall   // held a cycle before setting Broadcast
);
  localparam logic IS_SNOOP = (SCHEME == wakeup_pkg::HYBRID_SNOOP);
  localparam logic IS_INDEX = (SCHEME == wakeup_pkg::INDEXING_ONLY);

  // existing fields
  logic [WIN_ENTRIES-1:0]                 valid_q, issued_q;
  logic [WIN_ENTRIES-1:0][OP_W-1:0]       op_q;
  logic [WIN_ENTRIES-1:0][1:0]            sv_q, rdy_q;
  logic [WIN_ENTRIES-1:0][1:0][TAG_W-1:0] stag_q;
  logic [WIN_ENTRIES-1:0]                 hd_q;
  logic [WIN_ENTRIES-1:0][TAG_W-1:0]      dtag_q;
  logic [WIN_ENTRIES-1:0][NUM_CKPT-1:0]   mask_q;
  // added fields
  logic [WIN_ENTRIES-1:0][IDX_W-1:0]      die_q;
  logic [WIN_ENTRIES-1:0]                 empty_q, bcast_q, snoop_q;

  // ---------------------------------------------------------------- insert
  logic                 free_found;
  logic [IDX_W-1:0]     free_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int e = WIN_ENTRIES - 1; e >= 0; e--)
      if (!valid_q[e]) begin
        free_found = 1'b1;
        free_idx   = IDX_W'(e);
      end
  end

  logic [1:0] need;        // source waits on an in-window producer
  logic [1:0] link;        // record the new entry in the producer's DIE
  logic [1:0] second;      // producer already has a dependent
  logic [1:0] set_bc;      // producer's Broadcast bit gets set now
  always_comb begin
    for (int s = 0; s < 2; s++) need[s] = disp_src_valid[s] && !disp_src_ready[s];
    if (need[0] && need[1] && disp_src_pie[0] == disp_src_pie[1]) need[1] = 1'b0;
    for (int s = 0; s < 2; s++) begin
      link[s]   = need[s] &&  empty_q[disp_src_pie[s]];
      second[s] = need[s] && !empty_q[disp_src_pie[s]];
      set_bc[s] = second[s] && !bcast_q[disp_src_pie[s]];
    end
  end

  logic squash;
  assign squash         = br_valid && br_mispredict;
  assign stat_full      = !free_found;
  assign stat_dep_stall = IS_INDEX && disp_valid && (second != 2'b00);
  // BCAST_STALL: an instruction that would set a Broadcast bit is held for
  // one cycle first, in case its producer completes meanwhile.
  logic would_bc, bc_hold, bc_waited_q;
  assign would_bc       = !IS_INDEX && (set_bc != 2'b00);
  assign bc_hold        = BCAST_STALL && would_bc && !bc_waited_q;
  assign stat_bc_stall  = disp_valid && free_found && !squash && bc_hold;
  assign disp_ready     = free_found && !squash && !(IS_INDEX && second != 2'b00) && !bc_hold;
  assign disp_idx       = free_idx;

  logic accept;
  assign accept         = disp_valid && disp_ready;
  assign stat_links     = accept ? 2'(link[0]) + 2'(link[1]) : 2'd0;
  assign stat_bcast_set = (accept && !IS_INDEX) ? 2'(set_bc[0]) + 2'(set_bc[1]) : 2'd0;

  // ---------------------------------------------------------------- wakeup
  logic [WB_WIDTH-1:0][WIN_ENTRIES-1:0] cmp_en;
  logic [WB_WIDTH-1:0]                  wb_wake;
  for (genvar k = 0; k < WB_WIDTH; k++) begin : g_wake
    assign wb_has_dest[k] = hd_q[wb_idx[k]];
    assign wb_tag[k]      = dtag_q[wb_idx[k]];
    assign wb_wake[k]     = wb_valid[k] && hd_q[wb_idx[k]];
    assign wb_bcast[k]    = wb_wake[k] && bcast_q[wb_idx[k]] && !IS_INDEX;
    wakeup_enable #(.WIN_ENTRIES(WIN_ENTRIES), .SCHEME(SCHEME)) u_en (
      .valid     (wb_wake[k]),
      .die       (die_q[wb_idx[k]]),
      .empty     (empty_q[wb_idx[k]]),
      .broadcast (bcast_q[wb_idx[k]]),
      .snoop     (snoop_q),
      .enable    (cmp_en[k]),
      .n_cmp     (wb_n_cmp[k])
    );
  end

  // tag match in the enabled entries only
  logic [WIN_ENTRIES-1:0][1:0] wake;
  always_comb begin
    for (int e = 0; e < WIN_ENTRIES; e++)
      for (int s = 0; s < 2; s++) begin
        wake[e][s] = 1'b0;
        for (int k = 0; k < WB_WIDTH; k++)
          if (cmp_en[k][e] && stag_q[e][s] == wb_tag[k]) wake[e][s] = 1'b1;
      end
  end

  // ----------------------------------------------------------------- issue
  logic [WIN_ENTRIES-1:0] req, gnt_vec;
  always_comb
    for (int e = 0; e < WIN_ENTRIES; e++)
      req[e] = valid_q[e] && !issued_q[e] && ((rdy_q[e] | ~sv_q[e]) == 2'b11);

  issue_arbiter #(.WIN_ENTRIES(WIN_ENTRIES), .ISSUE_WIDTH(ISSUE_WIDTH)) u_arb (
    .req       (req),
    .gnt_valid (iss_valid),
    .gnt_idx   (iss_idx),
    .gnt_vec   (gnt_vec)
  );

  always_comb
    for (int i = 0; i < ISSUE_WIDTH; i++) begin
      iss_op[i]       = op_q[iss_idx[i]];
      iss_has_dest[i] = hd_q[iss_idx[i]];
      iss_dest_tag[i] = dtag_q[iss_idx[i]];
      iss_src_tag[i]  = stag_q[iss_idx[i]];
      iss_mask[i]     = mask_q[iss_idx[i]];
    end

  // ----------------------------------------------------------------- state
  logic [NUM_CKPT-1:0] br_bit;
  assign br_bit = br_valid ? (NUM_CKPT'(1) << br_id) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q  <= '0;
      issued_q <= '0;
      empty_q  <= '1;
      bcast_q  <= '0;
      snoop_q  <= '0;
      bc_waited_q <= 1'b0;
    end else begin
      // the held instruction waits once, until it is taken or squashed
      bc_waited_q <= !accept && !squash && (bc_waited_q || stat_bc_stall);
      // wakeup of waiting sources
      for (int e = 0; e < WIN_ENTRIES; e++)
        rdy_q[e] <= rdy_q[e] | wake[e];
      issued_q <= issued_q | gnt_vec;
      snoop_q  <= snoop_q & ~gnt_vec;   // an issued entry has nothing to compare
      for (int k = 0; k < WB_WIDTH; k++)
        if (wb_valid[k]) begin
          valid_q[wb_idx[k]] <= 1'b0;
          snoop_q[wb_idx[k]] <= 1'b0;
        end

      if (squash) begin
        for (int e = 0; e < WIN_ENTRIES; e++)
          if (mask_q[e][br_id]) begin
            valid_q[e] <= 1'b0;
            snoop_q[e] <= 1'b0;
          end
      end else begin
        for (int e = 0; e < WIN_ENTRIES; e++) mask_q[e] <= mask_q[e] & ~br_bit;
      end

      if (accept) begin
        valid_q[free_idx]  <= 1'b1;
        issued_q[free_idx] <= 1'b0;
        op_q[free_idx]     <= disp_op;
        sv_q[free_idx]     <= disp_src_valid;
        rdy_q[free_idx]    <= disp_src_ready;
        stag_q[free_idx]   <= disp_src_tag;
        hd_q[free_idx]     <= disp_has_dest;
        dtag_q[free_idx]   <= disp_dest_tag;
        mask_q[free_idx]   <= disp_mask & ~br_bit;
        empty_q[free_idx]  <= 1'b1;
        bcast_q[free_idx]  <= 1'b0;
        snoop_q[free_idx]  <= 1'b0;
        // link the new entry to its producers
        for (int s = 0; s < 2; s++) begin
          if (link[s]) begin
            die_q[disp_src_pie[s]]   <= free_idx;
            empty_q[disp_src_pie[s]] <= 1'b0;
          end
          if (second[s] && !IS_INDEX) begin
            bcast_q[disp_src_pie[s]] <= 1'b1;
            if (IS_SNOOP) begin
              snoop_q[free_idx] <= 1'b1;
              if (set_bc[s]) snoop_q[die_q[disp_src_pie[s]]] <= 1'b1;
            end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ interface
  // Completions must name issued entries, and a link must find its producer
  // still in the window.
  always_ff @(posedge clk)
    if (rst_n) begin
      for (int k = 0; k < WB_WIDTH; k++)
        if (wb_valid[k])
          assert (valid_q[wb_idx[k]] && issued_q[wb_idx[k]])
            else $error("completion of entry %0d that is not in flight", wb_idx[k]);
      if (accept)
        for (int s = 0; s < 2; s++)
          if (need[s])
            assert (valid_q[disp_src_pie[s]])
              else $error("producer entry %0d of a waiting source is not valid", disp_src_pie[s]);
    end
endmodule
