// final_selection_tb: nine random tracks with labels drawn from small sets
// so that tracks of different streams often share segments. The expected
// cancellations and the three best survivors are worked out here; outputs
// are one clock later. Also a directed case: one four-station muon found
// by both endcap streams must come out once.
module final_selection_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0;
  track_t [N_TRK-1:0] trk = '0;
  logic [2:0] thresh = 3'd1;
  logic [N_BEST-1:0][3:0] win_idx;
  logic [N_BEST-1:0] win_vld;
  logic [N_TRK-1:0] cancelled;
  int checks = 0, failures = 0, n_cancel = 0;

  final_selection dut (.*);
  always #5 clk = ~clk;

  function automatic int common(track_t x, track_t y);
    int n = 0;
    for (int s = 0; s < N_STATION; s++) if (x.id[s] != 0 && x.id[s] == y.id[s]) n++;
    return n;
  endfunction

  task automatic run_check(input string what);
    logic [N_TRK-1:0] kill = '0, alive;
    int order [$];
    logic [N_BEST-1:0][3:0] ei = '0;
    logic [N_BEST-1:0] ev = '0;
    for (int i = 0; i < N_TRK; i++)
      for (int j = 0; j < N_TRK; j++)
        if (i/3 != j/3 && trk[i].valid && trk[j].valid && common(trk[i], trk[j]) > int'(thresh) &&
            (trk[j].rank > trk[i].rank || (trk[j].rank == trk[i].rank && j/3 < i/3)))
          kill[i] = 1;
    for (int i = 0; i < N_TRK; i++) alive[i] = trk[i].valid && !kill[i];
    // selection by repeated maximum search
    for (int k = 0; k < N_BEST; k++) begin
      int b = -1;
      for (int i = 0; i < N_TRK; i++) begin
        bit taken = 0;
        foreach (order[m]) if (order[m] == i) taken = 1;
        if (alive[i] && !taken && (b < 0 || trk[i].rank > trk[b].rank)) b = i;
      end
      if (b >= 0) begin order.push_back(b); ei[k] = 4'(b); ev[k] = 1; end
    end
    @(posedge clk); #1;
    checks++;
    if (cancelled !== kill || win_vld !== ev || win_idx !== ei) begin
      failures++;
      $display("FAIL %s: cancel %b/%b vld %b/%b idx %h/%h", what, cancelled, kill, win_vld, ev, win_idx, ei);
    end
    n_cancel += $countones(cancelled);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // directed: 4-station muon in stream 0 (key ME2) and stream 1 (key ME3)
    @(negedge clk);
    trk = '0;
    trk[1] = '{valid: 1, rank: 4'b1001, id: '{4'd0, 4'd1, 4'd3, 4'd2, 4'd4}};
    trk[3] = '{valid: 1, rank: 4'b1001, id: '{4'd0, 4'd1, 4'd3, 4'd2, 4'd4}};
    run_check("dup");
    checks++;
    if (!(win_vld == 3'b001 && win_idx[0] == 4'd1 && cancelled == 9'b000001000)) begin
      failures++; $display("FAIL directed dup");
    end
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      thresh = 3'($urandom % 3);
      for (int i = 0; i < N_TRK; i++) begin
        trk[i] = '0;
        if ($urandom % 4 != 0) begin
          trk[i].valid = 1;
          trk[i].rank = 4'($urandom);
          for (int s = 0; s < N_STATION; s++) trk[i].id[s] = 4'($urandom % 3);
        end
      end
      run_check("random");
    end
    checks++; if (n_cancel < 100) begin failures++; $display("FAIL few cancellations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
