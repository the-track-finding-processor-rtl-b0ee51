// seg_lut: converts one CSC track segment into angular values.
//
// The sector receiver turns the cathode LCT pattern number, bend sign,
// quality and wire-group number of each segment into phi and eta with
// lookup tables. Here the phi table is addressed by {strip, pattern, sign}
// (8K x 12 bits) and the eta table by {wire group, quality} (2K x 6 bits);
// that split and the widths are this design's choice. Both tables are
// lut_sram instances loaded through the memory access request (req); the
// request is addressed to this link when req.unit == LINK (or req.all_unit
// for writes). valid and quality travel alongside the table reads, so
// seg_out is one clock after seg_in. A read access returns its word on
// phi_rdata / eta_rdata one clock after the request; during any access to a
// table the pipeline's lookups through that table are not valid.
module seg_lut
  import tf_pkg::*;
#(
  parameter int LINK   = 0,
  parameter int PHI_AW = STRIP_W + PAT_W + 1,
  parameter int ETA_AW = WG_W + Q_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  seg_raw_t             seg_in,
  input  lut_req_t             req,      // already qualified by sector
  output seg_ang_t             seg_out,
  output logic [PHI_W-1:0]     phi_rdata,
  output logic [ETA_W-1:0]     eta_rdata
);
  logic unit_hit, phi_acc, eta_acc;
  logic [PHI_W-1:0] phi_q;
  logic [ETA_W-1:0] eta_q;
  logic             vld_q;
  logic [Q_W-1:0]   qual_q;

  assign unit_hit = req.en && ((req.we && req.all_unit) || (req.unit == 4'(LINK)));
  assign phi_acc  = unit_hit && (req.tgt == T_PHI);
  assign eta_acc  = unit_hit && (req.tgt == T_ETA);

  lut_sram #(.AW(PHI_AW), .DW(PHI_W)) u_phi (
    .clk, .addr({seg_in.strip, seg_in.pattern, seg_in.lr}),
    .cfg_en(phi_acc), .cfg_we(req.we), .cfg_addr(req.addr[PHI_AW-1:0]),
    .cfg_wdata(req.wdata[PHI_W-1:0]), .rdata(phi_q));

  lut_sram #(.AW(ETA_AW), .DW(ETA_W)) u_eta (
    .clk, .addr({seg_in.wg, seg_in.quality}),
    .cfg_en(eta_acc), .cfg_we(req.we), .cfg_addr(req.addr[ETA_AW-1:0]),
    .cfg_wdata(req.wdata[ETA_W-1:0]), .rdata(eta_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q  <= 1'b0;
      qual_q <= '0;
    end else begin
      vld_q  <= seg_in.valid;
      qual_q <= seg_in.quality;
    end
  end

  assign seg_out   = '{valid: vld_q, quality: qual_q, phi: phi_q, eta: eta_q};
  assign phi_rdata = phi_q;
  assign eta_rdata = eta_q;
endmodule
