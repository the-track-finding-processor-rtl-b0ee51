// sp_fpga: the Sector Processor algorithm of one 60-degree sector.
//
// Input: the 23 angular segments of one crossing (6 from station 1, 3 each
// from stations 2-4, 8 barrel), index layout as in tf_pkg. Four register
// stages, one clock each:
//   1. extrapolation: 63 CSC pair tests (all pairs of stations except
//      1-4: 18 for 1-2, 18 for 1-3, 9 each for 2-3, 2-4, 3-4) plus 24
//      barrel-to-station-2 tests for the overlap region;
//   2. nine track assemblers: key station 2 with partners 1,3,4; key
//      station 3 with partners 1,2,4; key station 2 (overlap) with
//      partners 1 and barrel;
//   3. final selection (3 best of 9 with cancellation) and, in parallel,
//      Pt address precalculation for all nine tracks;
//   4. output multiplexer: addresses, phi and eta of the three winners.
// The Pt assignment memory outside adds the fifth clock. The stage
// structure and latencies follow the Track-Finder design; the barrel
// extrapolations and all windows and encodings are this design's choices.
// Segment data are delayed alongside the pipeline so every stage sees the
// crossing it is working on. ta_trk and fs_cancel are brought out for
// monitoring.
module sp_fpga
  import tf_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  seg_ang_t [N_SEG-1:0]         seg,
  input  tf_cfg_t                      cfg,
  output logic [N_BEST-1:0][PT_AW-1:0] pt_addr,
  output logic [N_BEST-1:0][5:0]       phi,
  output logic [N_BEST-1:0][5:0]       eta,
  output logic [N_BEST-1:0]            vld,
  output track_t [N_TRK-1:0]           ta_trk,
  output logic [N_TRK-1:0]             fs_cancel
);
  // ---------------- stage 1: extrapolation ----------------
  logic [N_ME1-1:0][N_ME-1:0] m12, m13;
  logic [N_ME-1:0][N_ME-1:0]  m23, m24, m34;
  logic [N_MB-1:0][N_ME-1:0]  mmb;
  seg_ang_t [N_SEG-1:0]       seg_d1, seg_d2;

  for (genvar i = 0; i < N_ME1; i++) begin : g_st1
    for (genvar j = 0; j < N_ME; j++) begin : g_j
      extrap_unit u12 (.clk, .rst_n, .a(seg[OFS_ME1+i]), .b(seg[OFS_ME2+j]),
        .dphi_win(cfg.dphi_win[P12]), .deta_win(cfg.deta_win[P12]), .use_eta(1'b1), .match(m12[i][j]));
      extrap_unit u13 (.clk, .rst_n, .a(seg[OFS_ME1+i]), .b(seg[OFS_ME3+j]),
        .dphi_win(cfg.dphi_win[P13]), .deta_win(cfg.deta_win[P13]), .use_eta(1'b1), .match(m13[i][j]));
    end
  end
  for (genvar i = 0; i < N_ME; i++) begin : g_st234
    for (genvar j = 0; j < N_ME; j++) begin : g_j
      extrap_unit u23 (.clk, .rst_n, .a(seg[OFS_ME2+i]), .b(seg[OFS_ME3+j]),
        .dphi_win(cfg.dphi_win[P23]), .deta_win(cfg.deta_win[P23]), .use_eta(1'b1), .match(m23[i][j]));
      extrap_unit u24 (.clk, .rst_n, .a(seg[OFS_ME2+i]), .b(seg[OFS_ME4+j]),
        .dphi_win(cfg.dphi_win[P24]), .deta_win(cfg.deta_win[P24]), .use_eta(1'b1), .match(m24[i][j]));
      extrap_unit u34 (.clk, .rst_n, .a(seg[OFS_ME3+i]), .b(seg[OFS_ME4+j]),
        .dphi_win(cfg.dphi_win[P34]), .deta_win(cfg.deta_win[P34]), .use_eta(1'b1), .match(m34[i][j]));
    end
  end
  for (genvar i = 0; i < N_MB; i++) begin : g_mb
    for (genvar j = 0; j < N_ME; j++) begin : g_j
      extrap_unit umb (.clk, .rst_n, .a(seg[OFS_MB+i]), .b(seg[OFS_ME2+j]),
        .dphi_win(cfg.dphi_win[PMB2]), .deta_win(cfg.deta_win[PMB2]), .use_eta(1'b0), .match(mmb[i][j]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_d1 <= '0;
      seg_d2 <= '0;
    end else begin
      seg_d1 <= seg;
      seg_d2 <= seg_d1;
    end
  end

  // ---------------- stage 2: track assembly ----------------
  localparam int MAXC = N_MB;

  for (genvar k = 0; k < N_ME; k++) begin : g_ta
    logic [2:0][MAXC-1:0]          ma, mb3;
    logic [2:0][MAXC-1:0][Q_W-1:0] qa, qb3;
    logic [1:0][MAXC-1:0]          mo;
    logic [1:0][MAXC-1:0][Q_W-1:0] qo;
    always_comb begin
      ma = '0; qa = '0; mb3 = '0; qb3 = '0; mo = '0; qo = '0;
      for (int c = 0; c < N_ME1; c++) begin
        ma[0][c] = m12[c][k];  qa[0][c] = seg_d1[OFS_ME1+c].quality;
        mb3[0][c] = m13[c][k]; qb3[0][c] = seg_d1[OFS_ME1+c].quality;
        mo[0][c] = m12[c][k];  qo[0][c] = seg_d1[OFS_ME1+c].quality;
      end
      for (int c = 0; c < N_ME; c++) begin
        ma[1][c]  = m23[k][c]; qa[1][c]  = seg_d1[OFS_ME3+c].quality;
        ma[2][c]  = m24[k][c]; qa[2][c]  = seg_d1[OFS_ME4+c].quality;
        mb3[1][c] = m23[c][k]; qb3[1][c] = seg_d1[OFS_ME2+c].quality;
        mb3[2][c] = m34[k][c]; qb3[2][c] = seg_d1[OFS_ME4+c].quality;
      end
      for (int c = 0; c < N_MB; c++) begin
        mo[1][c] = mmb[c][k]; qo[1][c] = seg_d1[OFS_MB+c].quality;
      end
    end

    track_assembler #(.NP(3), .MAXC(MAXC), .KEY_ST(int'(ST_ME2)), .KEY_IDX(k),
                      .PART_ST('{int'(ST_ME1), int'(ST_ME3), int'(ST_ME4)})) u_ta2 (
      .clk, .rst_n, .key_valid(seg_d1[OFS_ME2+k].valid), .match(ma), .qual(qa),
      .trk(ta_trk[k]));
    track_assembler #(.NP(3), .MAXC(MAXC), .KEY_ST(int'(ST_ME3)), .KEY_IDX(k),
                      .PART_ST('{int'(ST_ME1), int'(ST_ME2), int'(ST_ME4)})) u_ta3 (
      .clk, .rst_n, .key_valid(seg_d1[OFS_ME3+k].valid), .match(mb3), .qual(qb3),
      .trk(ta_trk[N_ME+k]));
    track_assembler #(.NP(2), .MAXC(MAXC), .KEY_ST(int'(ST_ME2)), .KEY_IDX(k),
                      .PART_ST('{int'(ST_ME1), int'(ST_MB), 0})) u_tao (
      .clk, .rst_n, .key_valid(seg_d1[OFS_ME2+k].valid), .match(mo), .qual(qo),
      .trk(ta_trk[2*N_ME+k]));
  end

  // ---------------- stage 3: final selection + Pt precalculation ----------
  logic [N_BEST-1:0][3:0]       win_idx;
  logic [N_BEST-1:0]            win_vld;
  logic [N_TRK-1:0][PT_AW-1:0]  pc_addr;
  logic [N_TRK-1:0][5:0]        pc_phi, pc_eta;
  logic [N_TRK-1:0]             pc_vld;

  final_selection u_fs (.clk, .rst_n, .trk(ta_trk), .thresh(cfg.fs_thresh),
    .win_idx, .win_vld, .cancelled(fs_cancel));

  for (genvar t = 0; t < N_TRK; t++) begin : g_pc
    pt_precalc u_pc (.clk, .rst_n, .trk(ta_trk[t]), .seg(seg_d2),
      .addr(pc_addr[t]), .phi(pc_phi[t]), .eta(pc_eta[t]), .vld(pc_vld[t]));
  end

  // ---------------- stage 4: output multiplexer ----------------
  output_mux u_mux (.clk, .rst_n, .win_idx, .win_vld, .pc_addr, .pc_phi, .pc_eta,
    .addr(pt_addr), .phi, .eta, .vld);
endmodule
