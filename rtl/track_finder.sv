// track_finder: the CSC endcap muon Track-Finder crate.
//
// N_SECT SR/SP boards, one per 60-degree sector, each finding up to three
// muons from its 15 optical links and 8 barrel inputs, and one Muon Sorter
// that picks the best four of the 3*N_SECT muons for the Global Level-1
// Trigger. Each board's muons reach the sorter over its own GTLP backplane
// link (gtlp_link), two frames per crossing on clk80, the doubled crossing
// clock with rising edges in phase with clk. sp_out is 7 clocks after
// link_in; the link adds one clock and the sorter one, so gmt_out is 9
// clocks after link_in.
// All boards share the static settings (cfg) and one lookup-memory access
// port (lut_req, lut_rdata), which stands in for the crate's VME access:
// writes may go to all sectors at once (all_sect) and all tables of a kind
// at once (all_unit); read-back selects one sector and table, data one
// clock later. ta_trk and fs_cancel expose the assembled tracks and the
// final-selection cancellations of every sector for monitoring, gtlp_bus
// the frames on each backplane link.
module track_finder
  import tf_pkg::*;
#(
  parameter int N_SECTORS = N_SECT
) (
  input  logic                                 clk,
  input  logic                                 clk80,
  input  logic                                 rst_n,
  input  seg_raw_t [N_SECTORS-1:0][N_LINK-1:0] link_in,
  input  mb_raw_t  [N_SECTORS-1:0][N_MB-1:0]   mb_in,
  input  tf_cfg_t                              cfg,
  input  lut_req_t                             lut_req,
  output logic [LUT_DW-1:0]                    lut_rdata,
  output muon_t    [N_SECTORS-1:0][N_BEST-1:0] sp_out,
  output gmt_cand_t [N_GMT-1:0]                gmt_out,
  output track_t   [N_SECTORS-1:0][N_TRK-1:0]  ta_trk,
  output logic     [N_SECTORS-1:0][N_TRK-1:0]  fs_cancel,
  output logic     [N_SECTORS-1:0][31:0]       gtlp_bus
);
  logic [N_SECTORS-1:0][LUT_DW-1:0] rd;
  muon_t [N_SECTORS-1:0][N_BEST-1:0] ms_in;

  for (genvar s = 0; s < N_SECTORS; s++) begin : g_sect
    sr_sp #(.SECTOR(s)) u_srsp (.clk, .rst_n, .link_in(link_in[s]), .mb_in(mb_in[s]),
      .cfg, .lut_req, .lut_rdata(rd[s]), .mu_out(sp_out[s]), .ta_trk(ta_trk[s]),
      .fs_cancel(fs_cancel[s]));
    gtlp_link #(.N_MU(N_BEST)) u_gtlp (.clk, .clk80, .rst_n, .mu_in(sp_out[s]),
      .bus(gtlp_bus[s]), .mu_out(ms_in[s]));
  end

  always_comb begin
    lut_rdata = '0;
    for (int s = 0; s < N_SECTORS; s++) lut_rdata |= rd[s];
  end

  muon_sorter #(.N_IN(N_SECTORS*N_BEST), .N_OUT(N_GMT), .PER_SECT(N_BEST)) u_ms (
    .clk, .rst_n, .cand(ms_in), .best(gmt_out));
endmodule
