// preg_ready: one ready bit per physical register.
//
// A dispatching instruction looks up both of its source registers here to
// decide whether it must wait in the window. The bit of a destination is
// cleared when that physical register is allocated at dispatch and set when
// the producing instruction completes. Completions of the current cycle are
// forwarded into the lookup, so a consumer dispatched in the very cycle its
// producer completes is treated as ready (the producer's window entry is
// freed in that cycle and could no longer record the consumer).
//
// Timing: lookups are combinational; updates take effect at the next rising
// clock edge. An allocation of a tag overrides a completion of the same tag
// in the same cycle. Reset (synchronous, active low) marks every register
// ready, the state of the committed architectural registers.
//
// Keeping the ready bits with the register file follows the organization of
// the wakeup scheme; the forwarding and the reset value are this design's
// choices.
module preg_ready #(
  parameter int unsigned NUM_PREGS = wakeup_pkg::NUM_PREGS,
  parameter int unsigned WB_WIDTH  = wakeup_pkg::WB_WIDTH,
  localparam int unsigned TAG_W    = $clog2(NUM_PREGS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [1:0][TAG_W-1:0]         rd_tag,
  output logic [1:0]                    rd_ready,
  input  logic                          alloc_valid,
  input  logic [TAG_W-1:0]              alloc_tag,
  input  logic [WB_WIDTH-1:0]           wb_valid,
  input  logic [WB_WIDTH-1:0][TAG_W-1:0] wb_tag
);
  logic [NUM_PREGS-1:0] ready_q;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      rd_ready[s] = ready_q[rd_tag[s]];
      for (int k = 0; k < WB_WIDTH; k++)
        if (wb_valid[k] && wb_tag[k] == rd_tag[s]) rd_ready[s] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready_q <= '1;
    end else begin
      for (int k = 0; k < WB_WIDTH; k++)
        if (wb_valid[k]) ready_q[wb_tag[k]] <= 1'b1;
      if (alloc_valid) ready_q[alloc_tag] <= 1'b0;
    end
  end
endmodule
