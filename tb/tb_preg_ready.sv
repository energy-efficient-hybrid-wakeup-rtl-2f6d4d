// tb_preg_ready: self-checking test of the physical-register ready bits.
//
// Random allocations (clear) and completions (set) are applied every cycle
// against a reference bit array kept here, and both lookup ports are checked
// each cycle, including the forwarding of same-cycle completions and the
// priority of an allocation over a completion of the same tag.
module tb_preg_ready;
  localparam int NP = wakeup_pkg::NUM_PREGS;
  localparam int WB = 6;
  localparam int TW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  logic [1:0][TW-1:0]  rd_tag;
  logic [1:0]          rd_ready;
  logic                alloc_valid;
  logic [TW-1:0]       alloc_tag;
  logic [WB-1:0]       wb_valid;
  logic [WB-1:0][TW-1:0] wb_tag;
  logic [NP-1:0] model;
  int checks = 0, failures = 0, fwd = 0;

  preg_ready dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_valid = 0; wb_valid = '0; rd_tag = '0; alloc_tag = '0; wb_tag = '0;
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    model = '1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      alloc_valid = ($urandom_range(0, 1) == 1);
      alloc_tag   = TW'($urandom_range(0, NP - 1));
      for (int k = 0; k < WB; k++) begin
        wb_valid[k] = ($urandom_range(0, 3) == 0);
        wb_tag[k]   = TW'($urandom_range(0, NP - 1));
      end
      for (int s = 0; s < 2; s++)
        rd_tag[s] = ($urandom_range(0, 1) == 1 && wb_valid[0]) ? wb_tag[0] : TW'($urandom_range(0, NP - 1));
      #1;
      for (int s = 0; s < 2; s++) begin
        automatic logic e = model[rd_tag[s]];
        for (int k = 0; k < WB; k++) if (wb_valid[k] && wb_tag[k] == rd_tag[s]) begin
          if (!model[rd_tag[s]]) fwd++;
          e = 1'b1;
        end
        checks++;
        if (rd_ready[s] !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d port %0d tag %0d: got %0b expected %0b", cyc, s, rd_tag[s], rd_ready[s], e);
        end
      end
      @(posedge clk);
      for (int k = 0; k < WB; k++) if (wb_valid[k]) model[wb_tag[k]] = 1'b1;
      if (alloc_valid) model[alloc_tag] = 1'b0;
    end
    checks++;
    if (fwd == 0) begin failures++; $display("forwarding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
