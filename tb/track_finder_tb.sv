// track_finder_tb: the whole Track-Finder at its default size (12 sectors)
// end to end.
//
// 1. All lookup tables of all sectors are loaded with broadcast writes:
//      phi = 16 * strip, eta = wire group / 2, Pt word = addr[15:8]^addr[7:0]
//    and a few words are read back from different sectors.
// 2. Every link and barrel input gets a random alignment delay; the bench
//    drives each input that many clocks early, so data only line up if the
//    alignment works.
// 3. 300 crossings back to back. In each, every sector gets up to four
//    muons, well separated in phi, of seven station patterns:
//      T0 ME1-2-3-4   T1 ME1-2-3   T2 ME2-3-4   T3 ME3-4
//      T4 MB-ME2      T5 MB-ME1-ME2             T6 ME1-ME2
//    For each muon the bench knows which assembled track survives the
//    cancellation, its quality word and its Pt address (worked out here
//    from the segment angles), so it predicts each sector's three muons
//    (7 clocks later) and, after the GTLP link and the sorter, the four
//    muons to the Global Trigger (9 clocks later).
// Counted mechanisms, each must occur: duplicate cancellation, overlap
// (barrel) muon selected, three-station Pt address, a sector with more
// than three muons, a crossing with more than four muons, a realigned
// input carrying data, table read-back.
module track_finder_tb;
  import tf_pkg::*;
  localparam int NC = 300;
  logic clk = 0, clk80 = 1, rst_n = 0;
  seg_raw_t [N_SECT-1:0][N_LINK-1:0] link_in = '0;
  mb_raw_t  [N_SECT-1:0][N_MB-1:0]   mb_in = '0;
  tf_cfg_t cfg;
  lut_req_t lut_req = '0;
  logic [LUT_DW-1:0] lut_rdata;
  muon_t    [N_SECT-1:0][N_BEST-1:0] sp_out;
  gmt_cand_t [N_GMT-1:0]             gmt_out;
  track_t   [N_SECT-1:0][N_TRK-1:0]  ta_trk;
  logic     [N_SECT-1:0][N_TRK-1:0]  fs_cancel;
  logic     [N_SECT-1:0][31:0]       gtlp_bus;

  track_finder dut (.*);
  always #10  clk = ~clk;
  always #5   clk80 = ~clk80;   // rising edges in phase with clk

  int checks = 0, failures = 0;
  int n_cancel = 0, n_overlap = 0, n_three = 0, n_sect_full = 0, n_gmt_full = 0,
      n_aligned = 0, n_readback = 0;

  // crossing data and expectations
  seg_raw_t  ev_link [NC][N_SECT][N_LINK];
  mb_raw_t   ev_mb   [NC][N_SECT][N_MB];
  muon_t     exp_sp  [NC][N_SECT][N_BEST];
  gmt_cand_t exp_gmt [NC][N_GMT];

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic seg_raw_t R(int strip);
    return '{valid: 1'b1, quality: 4'd5, pattern: PAT_W'($urandom), lr: 1'($urandom),
             strip: STRIP_W'(strip), wg: WG_W'(60)};
  endfunction

  function automatic logic [PT_AW-1:0] paddr(int mode, int da, int db);
    int qa = da < 0 ? -da : da;
    int qb = (db < 0 ? -db : db) / 8;
    if (qa > 63) qa = 63;
    if (qb > 7) qb = 7;
    return {3'(mode), da < 0, 6'(qa), 3'(qb), 3'd3};   // eta 30 -> eta[5:3] = 3
  endfunction

  function automatic muon_t mk_mu(logic [PT_AW-1:0] a, int kphi);
    logic [7:0] w = a[15:8] ^ a[7:0];
    return '{valid: 1'b1, quality: w[1:0], pt: w[7:3], sign: w[2], phi: 6'(kphi >> 6), eta: 6'd30};
  endfunction

  // build crossing c
  task automatic make_crossing(int c);
    int nmu_all = 0;
    for (int s = 0; s < N_SECT; s++) begin
      int used1 = 0, used2 = 0, used3 = 0, used4 = 0, usedb = 0;
      int rk [$], ix [$];
      muon_t mu [$];
      int md [$];
      int nm = $urandom % 5;
      for (int l = 0; l < N_LINK; l++) ev_link[c][s][l] = '0;
      for (int m = 0; m < N_MB; m++) ev_mb[c][s][m] = '0;
      for (int n = 0; n < nm; n++) begin
        int t = $urandom % 7;
        int b = 10 + 24 * n + $urandom % 8;          // base strip, muons >= 16 strips apart
        int o2 = $urandom % 2, o3 = $urandom % 2;     // bending, cumulative <= 2 strips
        int s1 = b, s2 = b + o2, s3 = b + o2 + o3, s4 = s3;
        int p1 = 16*s1, p2 = 16*s2, p3 = 16*s3, p4 = 16*s4, pm = 16*b - 8;
        bit need1 = (t == 0 || t == 1 || t == 5 || t == 6);
        bit need2 = (t != 3);
        bit need3 = (t <= 3);
        bit need4 = (t == 0 || t == 2 || t == 3);
        bit needb = (t == 4 || t == 5);
        int j, k, rank, idx, mode, da, db, kp;
        if ((need1 && used1 >= N_ME1) || (need2 && used2 >= N_ME) || (need3 && used3 >= N_ME) ||
            (need4 && used4 >= N_ME) || (needb && usedb >= N_MB)) continue;
        j = used2; k = used3;
        if (need1) begin ev_link[c][s][OFS_ME1+used1] = R(s1); used1++; end
        if (need2) begin ev_link[c][s][OFS_ME2+used2] = R(s2); used2++; end
        if (need3) begin ev_link[c][s][OFS_ME3+used3] = R(s3); used3++; end
        if (need4) begin ev_link[c][s][OFS_ME4+used4] = R(s4); used4++; end
        if (needb) begin ev_mb[c][s][usedb] = '{valid: 1'b1, quality: 4'd3, phi: PHI_W'(pm)}; usedb++; end
        db = 0; kp = p2;
        case (t)
          0: begin rank = 9; idx = j;     mode = 1; da = p1 - p2; db = p2 - p3; end
          1: begin rank = 7; idx = j;     mode = 1; da = p1 - p2; db = p2 - p3; end
          2: begin rank = 6; idx = j;     mode = 4; da = p2 - p3; db = p3 - p4; end
          3: begin rank = 4; idx = 3 + k; mode = 6; da = p3 - p4; kp = p3; end
          4: begin rank = 4; idx = 6 + j; mode = 7; da = pm - p2; end
          5: begin rank = 7; idx = 6 + j; mode = 7; da = pm - p2; db = p1 - p2; end
          default: begin rank = 5; idx = j; mode = 2; da = p1 - p2; end
        endcase
        // insert sorted by rank desc, index asc
        begin
          int pos = 0;
          while (pos < rk.size() && (rk[pos] > rank || (rk[pos] == rank && ix[pos] < idx))) pos++;
          rk.insert(pos, rank); ix.insert(pos, idx); md.insert(pos, mode); mu.insert(pos, mk_mu(paddr(mode, da, db), kp));
        end
      end
      if (mu.size() > N_BEST) n_sect_full++;
      for (int q = 0; q < N_BEST && q < mu.size(); q++) begin
        if (md[q] == 1) n_three++;
        if (md[q] == 7) n_overlap++;
      end
      for (int q = 0; q < N_BEST; q++) exp_sp[c][s][q] = (q < mu.size()) ? mu[q] : '0;
    end
    // sorter expectation
    begin
      bit used [N_SECT*N_BEST];
      for (int i = 0; i < N_SECT*N_BEST; i++) begin
        used[i] = 0;
        if (exp_sp[c][i/3][i%3].valid) nmu_all++;
      end
      if (nmu_all > N_GMT) n_gmt_full++;
      for (int g = 0; g < N_GMT; g++) begin
        int b;
        b = -1;
        for (int i = 0; i < N_SECT*N_BEST; i++) begin
          muon_t m = exp_sp[c][i/3][i%3];
          if (m.valid && !used[i] && (b < 0 || mu_rank(m) > mu_rank(exp_sp[c][b/3][b%3]))) b = i;
        end
        exp_gmt[c][g] = '0;
        if (b >= 0) begin used[b] = 1; exp_gmt[c][g] = '{mu: exp_sp[c][b/3][b%3], sector: 4'(b/3)}; end
      end
    end
  endtask

  task automatic wr_all(lut_tgt_e t, int a, int d);
    @(negedge clk);
    lut_req = '0; lut_req.en = 1; lut_req.we = 1; lut_req.all_sect = 1; lut_req.all_unit = 1;
    lut_req.tgt = t; lut_req.addr = PT_AW'(a); lut_req.wdata = LUT_DW'(d);
  endtask

  task automatic rd(int sect, lut_tgt_e t, int unit, int a, int exp_d);
    @(negedge clk);
    lut_req = '0; lut_req.en = 1; lut_req.sector = 4'(sect); lut_req.tgt = t;
    lut_req.unit = 4'(unit); lut_req.addr = PT_AW'(a);
    @(negedge clk); lut_req = '0;
    chk(lut_rdata == LUT_DW'(exp_d), "read-back");
    if (lut_rdata == LUT_DW'(exp_d)) n_readback++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg = '0;
    for (int p = 0; p < N_PAIRTYPE; p++) begin cfg.dphi_win[p] = 12'd40; cfg.deta_win[p] = 6'd4; end
    cfg.fs_thresh = 3'd1;
    for (int i = 0; i < N_SEG; i++) cfg.align_dly[i] = 2'($urandom);
    for (int c = 0; c < NC; c++) make_crossing(c);

    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 2**(STRIP_W+PAT_W+1); a++) wr_all(T_PHI, a, (a >> 5) * 16);
    for (int a = 0; a < 2**(WG_W+Q_W); a++)        wr_all(T_ETA, a, (a >> 4) / 2);
    for (int a = 0; a < 2**PT_AW; a++)             wr_all(T_PT, a, (a >> 8) ^ (a & 255));
    @(negedge clk); lut_req = '0;
    rd(0, T_PHI, 0, (100 << 5) | 3, 1600);
    rd(7, T_ETA, 14, (33 << 4) | 2, 16);
    rd(11, T_PT, 2, 16'h1234, 16'h26);

    // stream the crossings; input i is driven align_dly[i] clocks early
    for (int n = 0; n < NC + 12; n++) begin
      @(negedge clk);
      for (int s = 0; s < N_SECT; s++) begin
        for (int l = 0; l < N_LINK; l++) begin
          automatic int c = n + int'(cfg.align_dly[l]) - 3;
          link_in[s][l] = (c >= 0 && c < NC) ? ev_link[c][s][l] : '0;
          if (link_in[s][l].valid && cfg.align_dly[l] != 0) n_aligned++;
        end
        for (int m = 0; m < N_MB; m++) begin
          automatic int c = n + int'(cfg.align_dly[N_LINK+m]) - 3;
          mb_in[s][m] = (c >= 0 && c < NC) ? ev_mb[c][s][m] : '0;
        end
      end
      // crossing c is on the aligned links at n = c + 3; sp_out 7 clocks later
      begin
        automatic int c = n - 3 - 7;
        if (c >= 0 && c < NC) begin
          for (int s = 0; s < N_SECT; s++)
            for (int q = 0; q < N_BEST; q++) begin
              chk(sp_out[s][q] == exp_sp[c][s][q], $sformatf("sp_out c%0d s%0d q%0d", c, s, q));
            end
        end
        c = n - 3 - 9;
        if (c >= 0 && c < NC)
          for (int g = 0; g < N_GMT; g++)
            chk(gmt_out[g] == exp_gmt[c][g], $sformatf("gmt_out c%0d g%0d", c, g));
        c = n - 3 - 5;   // cancellation register of crossing c
        if (c >= 0 && c < NC) n_cancel += $countones(fs_cancel);
      end
    end
    $display("mechanisms: cancel=%0d overlap_muons=%0d three_station_pt=%0d sector_over_3=%0d crossing_over_4=%0d aligned=%0d readback=%0d",
             n_cancel, n_overlap, n_three, n_sect_full, n_gmt_full, n_aligned, n_readback);
    checks++; if (n_cancel == 0)    begin failures++; $display("FAIL no cancellation"); end
    checks++; if (n_overlap == 0)   begin failures++; $display("FAIL no overlap muon"); end
    checks++; if (n_three == 0)     begin failures++; $display("FAIL no three-station Pt address"); end
    checks++; if (n_sect_full == 0) begin failures++; $display("FAIL no sector with more than 3 muons"); end
    checks++; if (n_gmt_full == 0)  begin failures++; $display("FAIL no crossing with more than 4 muons"); end
    checks++; if (n_aligned == 0)   begin failures++; $display("FAIL no realigned input"); end
    checks++; if (n_readback != 3)  begin failures++; $display("FAIL read-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
