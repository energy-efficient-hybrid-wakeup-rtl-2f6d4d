// issue_arbiter: selects up to ISSUE_WIDTH ready window entries per cycle.
//
// Grant slot 0 goes to the lowest-numbered requesting entry, slot 1 to the
// next one, and so on; unused slots have gnt_valid low. The arbiter only
// picks entries; which functional unit executes an instruction is left to
// the execution side. Purely combinational.
//
// That the arbiter selects ready instructions for the functional units
// follows the instruction-window organization; the fixed lowest-index
// priority and the absence of functional-unit classes are this design's
// choices.
module issue_arbiter #(
  parameter int unsigned  WIN_ENTRIES = wakeup_pkg::WIN_ENTRIES,
  parameter int unsigned  ISSUE_WIDTH = wakeup_pkg::ISSUE_WIDTH,
  localparam int unsigned IDX_W       = $clog2(WIN_ENTRIES)
) (
  input  logic [WIN_ENTRIES-1:0]             req,
  output logic [ISSUE_WIDTH-1:0]             gnt_valid,
  output logic [ISSUE_WIDTH-1:0][IDX_W-1:0]  gnt_idx,
  output logic [WIN_ENTRIES-1:0]             gnt_vec
);
  always_comb begin
    logic [WIN_ENTRIES-1:0] left;
    left      = req;
    gnt_valid = '0;
    gnt_idx   = '0;
    gnt_vec   = '0;
    for (int s = 0; s < ISSUE_WIDTH; s++) begin
      for (int e = WIN_ENTRIES - 1; e >= 0; e--) begin
        if (left[e]) begin
          gnt_valid[s] = 1'b1;
          gnt_idx[s]   = IDX_W'(e);
        end
      end
      if (gnt_valid[s]) begin
        left[gnt_idx[s]]    = 1'b0;
        gnt_vec[gnt_idx[s]] = 1'b1;
      end
    end
  end
endmodule
