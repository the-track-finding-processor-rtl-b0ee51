// pt_precalc: Pt memory address of one assembled track.
//
// Nine of these run in parallel with final selection, one per assembled
// track, so that the address for the Pt assignment memory is ready the
// moment the three best tracks are known. The unit gathers the phi of the
// segment the track uses in each station and forms phi differences: from
// three stations when available (dphi_A between the first two, dphi_B
// between the next two), else from two. The address layout is this
// design's choice:
//   addr = {mode[2:0], sign(dphi_A), min(|dphi_A|,63)[5:0],
//           min(|dphi_B|>>3,7)[2:0], eta[5:3]}
//   mode 1: ME1-ME2-ME3   2: ME1-ME2(-ME4)   3: ME1-ME3(-ME4)
//        4: ME2-ME3(-ME4) 5: ME2-ME4  6: ME3-ME4  7: MB-ME2(-ME1)
// eta and the reported phi (its 6 upper bits) are those of the key
// segment (station 2 if present, else station 3). Output registered: one
// clock.
module pt_precalc
  import tf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  track_t                trk,
  input  seg_ang_t [N_SEG-1:0]  seg,
  output logic [PT_AW-1:0]      addr,
  output logic [5:0]            phi,
  output logic [5:0]            eta,
  output logic                  vld
);
  localparam int OFS [N_STATION] = '{OFS_ME1, OFS_ME2, OFS_ME3, OFS_ME4, OFS_MB};

  logic [N_STATION-1:0]             has;
  logic [N_STATION-1:0][PHI_W-1:0]  ph;
  logic [N_STATION-1:0][ETA_W-1:0]  et;
  logic [2:0]                       mode;
  logic signed [PHI_W:0]            da, db;
  logic [PHI_W:0]                   ma, mb;
  logic [5:0]                       qa;
  logic [2:0]                       qb;
  logic [PT_AW-1:0]                 addr_c;
  logic [PHI_W-1:0]                 kphi;
  logic [ETA_W-1:0]                 keta;

  function automatic logic signed [PHI_W:0] diff(logic [PHI_W-1:0] x, logic [PHI_W-1:0] y);
    return $signed({1'b0, x}) - $signed({1'b0, y});
  endfunction

  always_comb begin
    for (int s = 0; s < N_STATION; s++) begin
      has[s] = trk.valid && trk.id[s] != '0;
      ph[s]  = '0;
      et[s]  = '0;
      for (int c = 0; c < N_MB; c++)
        if (OFS[s] + c < N_SEG && trk.id[s] == 4'(c + 1)) begin
          ph[s] = seg[OFS[s] + c].phi;
          et[s] = seg[OFS[s] + c].eta;
        end
    end

    da = '0; db = '0; mode = 3'd0;
    if (has[ST_ME1] && has[ST_ME2] && has[ST_ME3]) begin
      mode = 3'd1; da = diff(ph[ST_ME1], ph[ST_ME2]); db = diff(ph[ST_ME2], ph[ST_ME3]);
    end else if (has[ST_MB] && has[ST_ME2]) begin
      mode = 3'd7; da = diff(ph[ST_MB], ph[ST_ME2]);
      if (has[ST_ME1]) db = diff(ph[ST_ME1], ph[ST_ME2]);
    end else if (has[ST_ME1] && has[ST_ME2]) begin
      mode = 3'd2; da = diff(ph[ST_ME1], ph[ST_ME2]);
      if (has[ST_ME4]) db = diff(ph[ST_ME2], ph[ST_ME4]);
    end else if (has[ST_ME1] && has[ST_ME3]) begin
      mode = 3'd3; da = diff(ph[ST_ME1], ph[ST_ME3]);
      if (has[ST_ME4]) db = diff(ph[ST_ME3], ph[ST_ME4]);
    end else if (has[ST_ME2] && has[ST_ME3]) begin
      mode = 3'd4; da = diff(ph[ST_ME2], ph[ST_ME3]);
      if (has[ST_ME4]) db = diff(ph[ST_ME3], ph[ST_ME4]);
    end else if (has[ST_ME2] && has[ST_ME4]) begin
      mode = 3'd5; da = diff(ph[ST_ME2], ph[ST_ME4]);
    end else if (has[ST_ME3] && has[ST_ME4]) begin
      mode = 3'd6; da = diff(ph[ST_ME3], ph[ST_ME4]);
    end

    ma = (da < 0) ? -da : da;
    mb = (db < 0) ? -db : db;
    qa = (ma > 63) ? 6'd63 : ma[5:0];
    qb = ((mb >> 3) > 7) ? 3'd7 : mb[5:3];

    kphi = has[ST_ME2] ? ph[ST_ME2] : ph[ST_ME3];
    keta = has[ST_ME2] ? et[ST_ME2] : et[ST_ME3];
    addr_c = {mode, da < 0, qa, qb, keta[5:3]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0; phi <= '0; eta <= '0; vld <= 1'b0;
    end else begin
      addr <= addr_c;
      phi  <= kphi[PHI_W-1 -: 6];
      eta  <= keta;
      vld  <= trk.valid;
    end
  end
endmodule
