// sr_sp: one SR/SP board, the three Sector Receivers and the Sector
// Processor of one 60-degree sector.
//
// Data path, one register stage per step, 7 clocks from link_in to mu_out:
//   front_fpga (1)  bunch-crossing alignment of the 15 links and 8 barrel
//                   inputs, programmable per input (cfg.align_dly);
//   seg_lut    (1)  15 conversion tables to phi/eta; barrel segments, which
//                   already carry phi, are only registered;
//   sp_fpga    (4)  extrapolation, track assembly, final selection with Pt
//                   precalculation, output multiplexer;
//   lut_sram   (1)  three Pt assignment memories, one per best muon.
// The stage latencies follow the Track-Finder design. Lookup memory access
// (lut_req) reaches this board when lut_req.sector == SECTOR, or for writes
// with lut_req.all_sect; tgt/unit select the table. Read-back data appear
// on lut_rdata one clock after the request and are zero when this board
// was not addressed. Memory accesses are for configuration time: while one
// is in progress the lookups of the addressed tables are not valid.
module sr_sp
  import tf_pkg::*;
#(
  parameter int SECTOR = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  seg_raw_t [N_LINK-1:0]    link_in,
  input  mb_raw_t  [N_MB-1:0]      mb_in,
  input  tf_cfg_t                  cfg,
  input  lut_req_t                 lut_req,
  output logic [LUT_DW-1:0]        lut_rdata,
  output muon_t    [N_BEST-1:0]    mu_out,
  output track_t   [N_TRK-1:0]     ta_trk,
  output logic     [N_TRK-1:0]     fs_cancel
);
  lut_req_t req;
  assign req = '{en: lut_req.en && ((lut_req.we && lut_req.all_sect) ||
                                    lut_req.sector == 4'(SECTOR)),
                 we: lut_req.we, all_sect: lut_req.all_sect, sector: lut_req.sector,
                 tgt: lut_req.tgt, all_unit: lut_req.all_unit, unit: lut_req.unit,
                 addr: lut_req.addr, wdata: lut_req.wdata};

  // ---------------- front FPGAs: alignment ----------------
  seg_raw_t [N_LINK-1:0] link_al;
  mb_raw_t  [N_MB-1:0]   mb_al;
  logic [N_LINK-1:0][1:0] dly_link;
  logic [N_MB-1:0][1:0]   dly_mb;

  always_comb begin
    for (int i = 0; i < N_LINK; i++) dly_link[i] = cfg.align_dly[i];
    for (int i = 0; i < N_MB; i++)   dly_mb[i]   = cfg.align_dly[N_LINK+i];
  end

  front_fpga #(.N(N_LINK), .W($bits(seg_raw_t))) u_front (
    .clk, .rst_n, .din(link_in), .dly(dly_link), .dout(link_al));
  front_fpga #(.N(N_MB), .W($bits(mb_raw_t))) u_front_mb (
    .clk, .rst_n, .din(mb_in), .dly(dly_mb), .dout(mb_al));

  // ---------------- lookup tables ----------------
  seg_ang_t [N_SEG-1:0]              seg;
  logic     [N_LINK-1:0][PHI_W-1:0]  phi_rd;
  logic     [N_LINK-1:0][ETA_W-1:0]  eta_rd;

  for (genvar l = 0; l < N_LINK; l++) begin : g_lut
    seg_lut #(.LINK(l)) u_lut (.clk, .rst_n, .seg_in(link_al[l]), .req,
      .seg_out(seg[l]), .phi_rdata(phi_rd[l]), .eta_rdata(eta_rd[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_MB; m++) seg[N_LINK+m] <= '0;
    end else begin
      for (int m = 0; m < N_MB; m++)
        seg[N_LINK+m] <= '{valid: mb_al[m].valid, quality: mb_al[m].quality,
                           phi: mb_al[m].phi, eta: '0};
    end
  end

  // ---------------- Sector Processor FPGA ----------------
  logic [N_BEST-1:0][PT_AW-1:0] pt_addr;
  logic [N_BEST-1:0][5:0]       sp_phi, sp_eta, phi_q, eta_q;
  logic [N_BEST-1:0]            sp_vld, vld_q;

  sp_fpga u_sp (.clk, .rst_n, .seg, .cfg, .pt_addr, .phi(sp_phi), .eta(sp_eta),
    .vld(sp_vld), .ta_trk, .fs_cancel);

  // ---------------- Pt assignment memories ----------------
  logic [N_BEST-1:0][PT_DW-1:0] pt_rd;

  for (genvar k = 0; k < N_BEST; k++) begin : g_pt
    logic acc;
    assign acc = req.en && req.tgt == T_PT &&
                 ((req.we && req.all_unit) || req.unit == 4'(k));
    lut_sram #(.AW(PT_AW), .DW(PT_DW)) u_ptmem (.clk, .addr(pt_addr[k]),
      .cfg_en(acc), .cfg_we(req.we), .cfg_addr(req.addr),
      .cfg_wdata(req.wdata[PT_DW-1:0]), .rdata(pt_rd[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi_q <= '0; eta_q <= '0; vld_q <= '0;
    end else begin
      phi_q <= sp_phi; eta_q <= sp_eta; vld_q <= sp_vld;
    end
  end

  for (genvar k = 0; k < N_BEST; k++) begin : g_out
    assign mu_out[k] = '{valid: vld_q[k], pt: pt_rd[k][7:3], sign: pt_rd[k][2],
                         quality: pt_rd[k][1:0], phi: phi_q[k], eta: eta_q[k]};
  end

  // ---------------- read-back ----------------
  logic       rd_q;
  lut_tgt_e   rd_tgt;
  logic [3:0] rd_unit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= 1'b0; rd_tgt <= T_PHI; rd_unit <= '0;
    end else begin
      rd_q <= req.en && !req.we; rd_tgt <= req.tgt; rd_unit <= req.unit;
    end
  end

  always_comb begin
    lut_rdata = '0;
    if (rd_q) begin
      for (int l = 0; l < N_LINK; l++) if (rd_unit == 4'(l)) begin
        if (rd_tgt == T_PHI) lut_rdata = LUT_DW'(phi_rd[l]);
        if (rd_tgt == T_ETA) lut_rdata = LUT_DW'(eta_rd[l]);
      end
      for (int k = 0; k < N_BEST; k++)
        if (rd_tgt == T_PT && rd_unit == 4'(k)) lut_rdata = LUT_DW'(pt_rd[k]);
    end
  end
endmodule
