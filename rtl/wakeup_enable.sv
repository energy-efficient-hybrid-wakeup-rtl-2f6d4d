// wakeup_enable: comparator enables for one completing producer.
//
// This is the heart of the hybrid wakeup. A producer whose Empty bit is
// cleared has recorded exactly one dependent in its DIE (Dependent
// Instruction-window Entry) field; the DIE pointer is decoded to a one-hot
// vector so that only that entry's comparator is powered. If a second
// dependent arrived while the producer was in the window, its Broadcast bit
// is set, and the tag is broadcast instead: to every entry in HYBRID_PLAIN,
// or only to entries whose Snoop bit is set in HYBRID_SNOOP. In
// INDEXING_ONLY the Broadcast bit is never set, so only the decoder is used.
// A producer with no dependent (Empty set, Broadcast clear) enables nothing.
//
// Interface: valid says a producer with a destination register completes
// this cycle; enable is the per-entry comparator enable, n_cmp its
// population count (the number of tag comparisons this completion costs).
// Purely combinational.
//
// The decode/broadcast/snoop rules are those of the scheme; counting an
// entry's comparator as one comparison is this design's convention.
module wakeup_enable #(
  parameter int unsigned         WIN_ENTRIES = wakeup_pkg::WIN_ENTRIES,
  parameter wakeup_pkg::scheme_e SCHEME      = wakeup_pkg::HYBRID_SNOOP,
  localparam int unsigned        IDX_W       = $clog2(WIN_ENTRIES),
  localparam int unsigned        CNT_W       = $clog2(WIN_ENTRIES + 1)
) (
  input  logic                   valid,
  input  logic [IDX_W-1:0]       die,
  input  logic                   empty,
  input  logic                   broadcast,
  input  logic [WIN_ENTRIES-1:0] snoop,
  output logic [WIN_ENTRIES-1:0] enable,
  output logic [CNT_W-1:0]       n_cmp
);
  logic [WIN_ENTRIES-1:0] die_onehot;

  always_comb begin
    die_onehot = '0;
    for (int e = 0; e < WIN_ENTRIES; e++)
      if (die == IDX_W'(e)) die_onehot[e] = 1'b1;
  end

  always_comb begin
    enable = '0;
    if (valid) begin
      if (broadcast && SCHEME == wakeup_pkg::HYBRID_PLAIN)
        enable = '1;
      else if (broadcast && SCHEME == wakeup_pkg::HYBRID_SNOOP)
        enable = snoop;
      else if (!empty)
        enable = die_onehot;
    end
  end

  always_comb begin
    n_cmp = '0;
    for (int e = 0; e < WIN_ENTRIES; e++)
      n_cmp = n_cmp + CNT_W'(enable[e]);
  end
endmodule
