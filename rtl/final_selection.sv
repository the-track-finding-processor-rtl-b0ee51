// final_selection: sorter with cancellation, 3 best of 9 tracks.
//
// A muon crossing all four endcap stations is assembled in both endcap key
// streams (and may also appear in the overlap stream). For every pair of
// tracks from different streams the unit counts the stations in which both
// carry the same segment label; when that count exceeds the programmable
// threshold the two are the same muon and the one with the lower quality
// word is cancelled (on equal quality, the one of the later stream). The
// surviving tracks are ranked by quality word, lower index first on ties,
// and the three best are reported by index. The tie rules are this
// design's choices. Everything is combinational behind one output
// register: results are valid one clock after trk.
module final_selection
  import tf_pkg::*;
#(
  parameter int N_IN   = N_TRK,
  parameter int N_OUT  = N_BEST,
  parameter int PER_ST = N_ME      // tracks per stream
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  track_t [N_IN-1:0]           trk,
  input  logic [2:0]                  thresh,
  output logic [N_OUT-1:0][3:0]       win_idx,
  output logic [N_OUT-1:0]            win_vld,
  output logic [N_IN-1:0]             cancelled
);
  logic [N_IN-1:0]            kill, alive;
  logic [N_OUT-1:0][3:0]      idx_c;
  logic [N_OUT-1:0]           vld_c;

  function automatic logic [2:0] n_common(track_t x, track_t y);
    logic [2:0] n = '0;
    for (int s = 0; s < N_STATION; s++)
      if (x.id[s] != '0 && x.id[s] == y.id[s]) n = n + 3'd1;
    return n;
  endfunction

  always_comb begin
    logic [4:0] cnt;
    kill  = '0;
    idx_c = '0;
    vld_c = '0;
    for (int i = 0; i < N_IN; i++) begin
      for (int j = 0; j < N_IN; j++) begin
        if ((i / PER_ST) != (j / PER_ST) && trk[i].valid && trk[j].valid &&
            n_common(trk[i], trk[j]) > thresh &&
            (trk[j].rank > trk[i].rank ||
             (trk[j].rank == trk[i].rank && (j / PER_ST) < (i / PER_ST))))
          kill[i] = 1'b1;
      end
    end
    for (int i = 0; i < N_IN; i++) alive[i] = trk[i].valid && !kill[i];
    for (int i = 0; i < N_IN; i++) begin
      cnt = '0;
      for (int j = 0; j < N_IN; j++)
        if (alive[j] && (trk[j].rank > trk[i].rank ||
                         (trk[j].rank == trk[i].rank && j < i)))
          cnt = cnt + 5'd1;
      for (int k = 0; k < N_OUT; k++)
        if (alive[i] && cnt == 5'(k)) begin
          idx_c[k] = 4'(i);
          vld_c[k] = 1'b1;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_idx   <= '0;
      win_vld   <= '0;
      cancelled <= '0;
    end else begin
      win_idx   <= idx_c;
      win_vld   <= vld_c;
      cancelled <= kill;
    end
  end
endmodule
