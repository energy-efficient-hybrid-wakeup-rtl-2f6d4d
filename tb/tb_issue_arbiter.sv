// tb_issue_arbiter: self-checking test of the issue selection.
//
// Random request vectors of varying density are applied; the reference is
// the list of requesting entries in ascending order, of which the first
// ISSUE_WIDTH must appear in the grant slots in that order, with the
// remaining slots empty and gnt_vec the set of granted entries.
module tb_issue_arbiter;
  localparam int N  = 96;
  localparam int W  = 6;
  localparam int IW = $clog2(N);

  logic [N-1:0]         req, gnt_vec;
  logic [W-1:0]         gnt_valid;
  logic [W-1:0][IW-1:0] gnt_idx;
  int checks = 0, failures = 0;

  issue_arbiter dut (.req, .gnt_valid, .gnt_idx, .gnt_vec);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int list[$];
    logic [N-1:0] exp_vec;
    for (int it = 0; it < 3000; it++) begin
      automatic int dens = $urandom_range(0, 40);
      for (int i = 0; i < N; i++) req[i] = ($urandom_range(0, 99) < dens);
      if (it == 0) req = '0;
      if (it == 1) req = '1;
      #1;
      list.delete();
      for (int i = 0; i < N; i++) if (req[i]) list.push_back(i);
      exp_vec = '0;
      for (int s = 0; s < W; s++) begin
        checks++;
        if (s < list.size()) begin
          exp_vec[list[s]] = 1'b1;
          if (!gnt_valid[s] || int'(gnt_idx[s]) != list[s]) begin
            failures++;
            if (failures < 10) $display("slot %0d: got %0b/%0d expected %0d", s, gnt_valid[s], gnt_idx[s], list[s]);
          end
        end else if (gnt_valid[s]) begin
          failures++;
          if (failures < 10) $display("slot %0d should be empty", s);
        end
      end
      checks++;
      if (gnt_vec !== exp_vec) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
