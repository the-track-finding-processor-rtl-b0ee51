// extrap_unit: one extrapolation unit of the Sector Processor.
//
// Tests whether two track segments in different stations can belong to one
// muon coming from the collision vertex: both must be valid, their phi
// difference must lie within the programmable window dphi_win (the allowed
// magnetic bending between those stations) and, when use_eta is set, their
// eta difference within deta_win. The windowed comparison is this design's
// reading of the compatibility test. The result is registered: match is
// valid one clock after the segments, so all units of a sector finish in
// one clock.
module extrap_unit
  import tf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  seg_ang_t         a,
  input  seg_ang_t         b,
  input  logic [PHI_W-1:0] dphi_win,
  input  logic [ETA_W-1:0] deta_win,
  input  logic             use_eta,
  output logic             match
);
  logic [PHI_W-1:0] dphi;
  logic [ETA_W-1:0] deta;
  logic             ok;

  always_comb begin
    dphi = (a.phi >= b.phi) ? a.phi - b.phi : b.phi - a.phi;
    deta = (a.eta >= b.eta) ? a.eta - b.eta : b.eta - a.eta;
    ok   = a.valid && b.valid && (dphi <= dphi_win) &&
           (!use_eta || (deta <= deta_win));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match <= 1'b0;
    else        match <= ok;
  end
endmodule
