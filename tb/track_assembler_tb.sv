// track_assembler_tb: a key-station-2 unit (partners stations 1, 3, 4)
// gets random extrapolation results and qualities. The expected track is
// worked out here: per partner the highest-quality match (lowest index on
// ties), station labels, validity (key plus one partner) and quality word
// {stations, station-1 present}. Output one clock later.
module track_assembler_tb;
  import tf_pkg::*;
  localparam int NP = 3, MAXC = 8;
  logic clk = 0, rst_n = 0, key_valid = 0;
  logic [NP-1:0][MAXC-1:0]          match = '0;
  logic [NP-1:0][MAXC-1:0][Q_W-1:0] qual = '0;
  track_t trk, e;
  int checks = 0, failures = 0, n_valid = 0, n_four = 0;
  localparam int PS [3] = '{0, 2, 3};

  track_assembler #(.NP(NP), .MAXC(MAXC), .KEY_ST(1), .KEY_IDX(2),
                    .PART_ST('{0, 2, 3})) dut (.*);
  always #5 clk = ~clk;

  function automatic track_t model(logic kv, logic [NP-1:0][MAXC-1:0] m,
                                   logic [NP-1:0][MAXC-1:0][Q_W-1:0] q);
    track_t t = '0;
    int nst = 1;
    for (int p = 0; p < NP; p++) begin
      int best = -1;
      for (int c = 0; c < MAXC; c++)
        if (m[p][c] && (best < 0 || q[p][c] > q[p][best])) best = c;
      if (best >= 0) begin t.id[PS[p]] = 4'(best + 1); nst++; end
    end
    t.id[1] = 4'd3;
    if (!kv || nst < 2) return '0;
    t.valid = 1;
    t.rank = {3'(nst), t.id[0] != 0};
    return t;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      key_valid = ($urandom % 6) != 0;
      for (int p = 0; p < NP; p++)
        for (int c = 0; c < MAXC; c++) begin
          match[p][c] = ($urandom % 7) == 0;
          qual[p][c]  = Q_W'($urandom % 4);
        end
      e = model(key_valid, match, qual);
      @(posedge clk); #1;
      checks++;
      if (trk !== e) begin failures++; $display("FAIL n=%0d got %h exp %h", n, trk, e); end
      if (trk.valid) n_valid++;
      if (trk.rank[3:1] == 3'd4) n_four++;
    end
    checks++; if (n_valid < 200 || n_four < 5) begin failures++; $display("FAIL coverage %0d %0d", n_valid, n_four); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
