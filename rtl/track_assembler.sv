// track_assembler: builds the best track around one key-station segment.
//
// Station 2 and station 3 are key stations: every track has a segment in
// one of them. One unit serves one key segment. For each partner station
// (NP of them, listed in PART_ST) it receives the extrapolation results
// between the key segment and every candidate segment of that station
// (match) and those candidates' qualities. It keeps, per partner station,
// the matching candidate of highest quality (lowest index on a tie), and
// labels the track with the segment chosen in each station (track_t.id:
// 0 = none, else index+1). A track needs the key segment plus at least one
// partner. The quality word (rank) is {number of stations, station-1
// present}; that encoding and the tie rule are this design's choices.
// Output registered: one clock.
module track_assembler
  import tf_pkg::*;
#(
  parameter int NP            = 3,
  parameter int MAXC          = 8,
  parameter int KEY_ST        = 1,             // station of the key segment
  parameter int KEY_IDX       = 0,             // its index within the station
  parameter int PART_ST [3]   = '{0, 2, 3}     // partner stations (first NP used)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              key_valid,
  input  logic [NP-1:0][MAXC-1:0]           match,
  input  logic [NP-1:0][MAXC-1:0][Q_W-1:0]  qual,
  output track_t                            trk
);
  track_t t;

  always_comb begin
    logic [2:0]     nst;
    logic [3:0]     best_id;
    logic [Q_W-1:0] best_q;
    t   = '0;
    nst = 3'd1;
    for (int p = 0; p < NP; p++) begin
      best_id = '0;
      best_q  = '0;
      for (int c = 0; c < MAXC; c++) begin
        if (match[p][c] && (best_id == '0 || qual[p][c] > best_q)) begin
          best_id = 4'(c + 1);
          best_q  = qual[p][c];
        end
      end
      t.id[PART_ST[p]] = best_id;
      if (best_id != '0) nst = nst + 3'd1;
    end
    t.id[KEY_ST] = 4'(KEY_IDX + 1);
    if (key_valid && nst >= 3'd2) begin
      t.valid = 1'b1;
      t.rank  = {nst, t.id[ST_ME1] != '0};
    end else begin
      t = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trk <= '0;
    else        trk <= t;
  end
endmodule
