// muon_sorter: picks the best N_OUT of the N_IN muons sent by the Sector
// Processors (36 = 12 sectors x 3) for the Global Level-1 Trigger.
//
// Candidates are ranked by {valid, quality, pt} (tf_pkg::mu_rank); on equal
// rank the lower input index wins. Each candidate counts how many others
// beat it; a valid candidate beaten by exactly k others goes to output k.
// The sector number attached to each output is input index / PER_SECT. The
// ranking key and the single clock of latency are this design's choices.
module muon_sorter
  import tf_pkg::*;
#(
  parameter int N_IN     = N_SECT*N_BEST,
  parameter int N_OUT    = N_GMT,
  parameter int PER_SECT = N_BEST
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  muon_t     [N_IN-1:0]     cand,
  output gmt_cand_t [N_OUT-1:0]    best
);
  gmt_cand_t [N_OUT-1:0] best_c;

  always_comb begin
    int cnt;
    best_c = '0;
    for (int i = 0; i < N_IN; i++) begin
      cnt = 0;
      for (int j = 0; j < N_IN; j++)
        if (mu_rank(cand[j]) > mu_rank(cand[i]) ||
            (mu_rank(cand[j]) == mu_rank(cand[i]) && j < i))
          cnt++;
      for (int k = 0; k < N_OUT; k++)
        if (cand[i].valid && cnt == k)
          best_c[k] = '{mu: cand[i], sector: 4'(i / PER_SECT)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) best <= '0;
    else        best <= best_c;
  end
endmodule
