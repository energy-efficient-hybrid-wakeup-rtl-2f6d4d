// rat_pie: Register Alias Table extended with the PIE field, with branch
// checkpoints.
//
// For every logical register the table holds the physical register that
// currently names it and the PIE (Producer Instruction-window Entry): the
// window entry of the instruction that will write that physical register.
// A dispatching instruction reads both fields for its two sources; if a
// source is not ready yet, its PIE tells the window which producer entry
// must record the new consumer. The instruction's own destination is then
// renamed: the new physical register and the entry it was inserted into are
// written at the next clock edge, and ren_old_preg returns the previous
// mapping (for the free list).
//
// Checkpoints: a branch takes a checkpoint of both fields (ckpt_take, only
// when ckpt_avail). Each checkpoint remembers which checkpoints were live
// when it was taken. On a misprediction (br_valid with br_mispredict) the
// table is restored from checkpoint br_id and that checkpoint and all
// younger ones are freed; a correctly predicted branch frees only its own.
// live_mask is the set of unresolved checkpoints: it is the branch mask that
// a newly dispatched instruction carries. A misprediction takes priority
// over a rename or a checkpoint in the same cycle, which are then dropped;
// the caller must not dispatch then.
//
// Including the PIE field in the RAT checkpoint is the scheme's rule; the
// checkpoint count, the live-mask bookkeeping and the identity mapping at
// reset (logical r in physical r) are this design's choices.
module rat_pie #(
  parameter int unsigned  NUM_LREGS   = wakeup_pkg::NUM_LREGS,
  parameter int unsigned  NUM_PREGS   = wakeup_pkg::NUM_PREGS,
  parameter int unsigned  WIN_ENTRIES = wakeup_pkg::WIN_ENTRIES,
  parameter int unsigned  NUM_CKPT    = wakeup_pkg::NUM_CKPT,
  localparam int unsigned LREG_W      = $clog2(NUM_LREGS),
  localparam int unsigned TAG_W       = $clog2(NUM_PREGS),
  localparam int unsigned IDX_W       = $clog2(WIN_ENTRIES),
  localparam int unsigned CK_W        = (NUM_CKPT > 1) ? $clog2(NUM_CKPT) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // source lookup
  input  logic [1:0][LREG_W-1:0]     src_lreg,
  output logic [1:0][TAG_W-1:0]      src_preg,
  output logic [1:0][IDX_W-1:0]      src_pie,
  // destination rename
  input  logic                       ren_valid,
  input  logic [LREG_W-1:0]          ren_lreg,
  input  logic [TAG_W-1:0]           ren_preg,
  input  logic [IDX_W-1:0]           ren_pie,
  output logic [TAG_W-1:0]           ren_old_preg,
  // checkpoints
  input  logic                       ckpt_take,
  output logic                       ckpt_avail,
  output logic [CK_W-1:0]            ckpt_id,
  output logic [NUM_CKPT-1:0]        live_mask,
  // branch resolution
  input  logic                       br_valid,
  input  logic [CK_W-1:0]            br_id,
  input  logic                       br_mispredict
);
  logic [NUM_LREGS-1:0][TAG_W-1:0] map_q;
  logic [NUM_LREGS-1:0][IDX_W-1:0] pie_q;
  logic [NUM_CKPT-1:0][NUM_LREGS-1:0][TAG_W-1:0] ck_map_q;
  logic [NUM_CKPT-1:0][NUM_LREGS-1:0][IDX_W-1:0] ck_pie_q;
  logic [NUM_CKPT-1:0][NUM_CKPT-1:0] ck_older_q;   // live checkpoints when taken
  logic [NUM_CKPT-1:0] live_q;

  assign live_mask = live_q;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      src_preg[s] = map_q[src_lreg[s]];
      src_pie[s]  = pie_q[src_lreg[s]];
    end
    ren_old_preg = map_q[ren_lreg];
  end

  // lowest free checkpoint
  always_comb begin
    ckpt_avail = 1'b0;
    ckpt_id    = '0;
    for (int c = NUM_CKPT - 1; c >= 0; c--)
      if (!live_q[c]) begin
        ckpt_avail = 1'b1;
        ckpt_id    = CK_W'(c);
      end
  end

  logic squash;
  assign squash = br_valid && br_mispredict;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_LREGS; r++) begin
        map_q[r] <= TAG_W'(r);
        pie_q[r] <= '0;
      end
      live_q     <= '0;
      ck_older_q <= '0;
    end else if (squash) begin
      map_q <= ck_map_q[br_id];
      pie_q <= ck_pie_q[br_id];
      for (int c = 0; c < NUM_CKPT; c++)
        if (c == int'(br_id) || ck_older_q[c][br_id]) live_q[c] <= 1'b0;
    end else begin
      if (ren_valid) begin
        map_q[ren_lreg] <= ren_preg;
        pie_q[ren_lreg] <= ren_pie;
      end
      if (br_valid) begin
        live_q[br_id] <= 1'b0;
        for (int c = 0; c < NUM_CKPT; c++) ck_older_q[c][br_id] <= 1'b0;
      end
      if (ckpt_take && ckpt_avail) begin
        live_q[ckpt_id]     <= 1'b1;
        ck_older_q[ckpt_id] <= live_q & ~((br_valid) ? (NUM_CKPT'(1) << br_id) : '0);
      end
    end
  end

  // Checkpoint storage. The snapshot is the table as it stands after this
  // cycle's rename (a branch has no destination, so none is pending then).
  always_ff @(posedge clk) begin
    if (!squash && ckpt_take && ckpt_avail) begin
      ck_map_q[ckpt_id] <= map_q;
      ck_pie_q[ckpt_id] <= pie_q;
    end
  end
endmodule
