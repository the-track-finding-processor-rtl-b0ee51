// sr_sp_tb: one SR/SP board end to end. Loads every table through the
// access port with known formulas,
//   phi table:  phi = 16 * strip            (address {strip, pattern, sign})
//   eta table:  eta = wire group / 2        (address {wire group, quality})
//   Pt memory:  word = addr[15:8] ^ addr[7:0]  -> {pt, sign, quality}
// checks read-back (and that a read for another sector returns zero), then
// sends a four-station muon whose station-3 link is two clocks early and is
// realigned by a programmed delay. The muon must appear exactly 7 clocks
// after the other links' data, with the Pt word of the address computed
// here from the segment angles.
module sr_sp_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0;
  seg_raw_t [N_LINK-1:0] link_in = '0;
  mb_raw_t [N_MB-1:0] mb_in = '0;
  tf_cfg_t cfg;
  lut_req_t lut_req = '0;
  logic [LUT_DW-1:0] lut_rdata;
  muon_t [N_BEST-1:0] mu_out;
  track_t [N_TRK-1:0] ta_trk;
  logic [N_TRK-1:0] fs_cancel;
  int checks = 0, failures = 0;

  sr_sp #(.SECTOR(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic wr_all(lut_tgt_e t, int a, int d);
    @(negedge clk);
    lut_req = '0; lut_req.en = 1; lut_req.we = 1; lut_req.all_sect = 1; lut_req.all_unit = 1;
    lut_req.tgt = t; lut_req.addr = PT_AW'(a); lut_req.wdata = LUT_DW'(d);
  endtask

  task automatic rd(int sect, lut_tgt_e t, int unit, int a, int exp_d, string what);
    @(negedge clk);
    lut_req = '0; lut_req.en = 1; lut_req.sector = 4'(sect); lut_req.tgt = t;
    lut_req.unit = 4'(unit); lut_req.addr = PT_AW'(a);
    @(negedge clk); lut_req = '0;
    chk(lut_rdata == LUT_DW'(exp_d), what);
  endtask

  function automatic seg_raw_t R(int strip, int wg = 60, int q = 5);
    return '{valid: 1'b1, quality: Q_W'(q), pattern: 4'd7, lr: 1'b0, strip: STRIP_W'(strip), wg: WG_W'(wg)};
  endfunction

  localparam logic [PT_AW-1:0] ADDR = {3'd1, 1'b1, 6'd16, 3'd2, 3'd3};
  localparam logic [7:0] PTW = ADDR[15:8] ^ ADDR[7:0];

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg = '0;
    for (int p = 0; p < N_PAIRTYPE; p++) begin cfg.dphi_win[p] = 12'd40; cfg.deta_win[p] = 6'd4; end
    cfg.fs_thresh = 3'd1;
    cfg.align_dly[OFS_ME3+2] = 2'd2;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 2**(STRIP_W+PAT_W+1); a++) wr_all(T_PHI, a, (a >> 5) * 16);
    for (int a = 0; a < 2**(WG_W+Q_W); a++)        wr_all(T_ETA, a, (a >> 4) / 2);
    for (int a = 0; a < 2**PT_AW; a++)             wr_all(T_PT, a, (a >> 8) ^ (a & 255));
    @(negedge clk); lut_req = '0;
    rd(2, T_PHI, 9, (100 << 5) | 3, 1600, "read-back phi");
    rd(2, T_ETA, 14, (33 << 4) | 2, 16, "read-back eta");
    rd(2, T_PT, 1, 16'h1234, 16'h26, "read-back pt");
    rd(5, T_PT, 1, 16'h1234, 0, "read-back other sector");

    // station-3 segment arrives two clocks early on its link
    @(negedge clk); link_in[OFS_ME3+2] = R(64);
    @(negedge clk); link_in[OFS_ME3+2] = '0;
    @(negedge clk);
    link_in[OFS_ME1+0] = R(62); link_in[OFS_ME2+1] = R(63); link_in[OFS_ME4+0] = R(64);
    for (int c = 1; c <= 9; c++) begin
      @(negedge clk);
      link_in = '0;
      if (c == 6) chk(!mu_out[0].valid, "no muon before 7 clocks");
      if (c == 7) chk(mu_out[0].valid && mu_out[0].pt == PTW[7:3] && mu_out[0].sign == PTW[2] &&
                      mu_out[0].quality == PTW[1:0] && mu_out[0].phi == 6'(1008 >> 6) &&
                      mu_out[0].eta == 6'd30 && !mu_out[1].valid, "muon after 7 clocks");
      if (c == 8) chk(!mu_out[0].valid, "single crossing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
