// gtlp_link: point-to-point GTLP backplane transfer of one Sector
// Processor's muons to the Muon Sorter, two frames per bunch crossing.
//
// The backplane runs at twice the crossing clock (clk80, rising edges in
// phase with clk). Each crossing's N_MU muons (63 bits for three) are sent
// as two FW-bit frames so the bus is half as wide. The fields the sorter
// ranks on ({valid, quality, pt} of every muon) lead the first frame; sign,
// phi and eta fill the rest of the first frame and the second.
//   word   = {key[N_MU-1..0], rest[N_MU-1..0]}, key = {valid, quality, pt},
//            rest = {sign, phi, eta}
//   frame0 = word[top -: FW], frame1 = remaining bits, zero padded
// Two-frame transfer at 80 MHz and the first-frame priority follow the
// Track-Finder design; the frame layout and bus width are this design's.
// Timing: mu_in must be stable for one clk cycle. The transmitter drives
// frame 0 from the middle of that crossing and frame 1 from its end; the
// receiver registers both and presents the rebuilt muons on mu_out, which
// the clk domain can sample one clk cycle after mu_in (a crossing's muons
// given to mu_in at clk edge T are sampled from mu_out at edge T+2). The
// half of the crossing is found by comparing a toggle flip-flop of the clk
// domain with its copy taken on clk80.
module gtlp_link
  import tf_pkg::*;
#(
  parameter int N_MU = N_BEST,
  parameter int FW   = 32
) (
  input  logic                 clk,
  input  logic                 clk80,
  input  logic                 rst_n,
  input  muon_t [N_MU-1:0]     mu_in,
  output logic  [FW-1:0]       bus,
  output muon_t [N_MU-1:0]     mu_out
);
  localparam int KW = 8;                          // {valid, quality, pt}
  localparam int RW = $bits(muon_t) - KW;         // {sign, phi, eta}
  localparam int WW = N_MU * (KW + RW);

  logic [WW-1:0]   word_tx, word_rx;
  logic [2*FW-1:0] frames;
  logic            t40, t40_s, first_half;
  logic [FW-1:0]   hi_rx;

  // --- transmitter: pack the crossing into two frames ---
  always_comb begin
    for (int k = 0; k < N_MU; k++) begin
      word_tx[WW-1-k*KW -: KW]        = mu_in[k][$bits(muon_t)-1 -: KW];
      word_tx[N_MU*RW-1-k*RW -: RW]   = mu_in[k][RW-1:0];
    end
    frames = {word_tx, {(2*FW-WW){1'b0}}};
  end

  // crossing-half detection: t40 toggles on every clk edge
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) t40 <= 1'b0;
    else        t40 <= ~t40;

  always_ff @(posedge clk80 or negedge rst_n)
    if (!rst_n) t40_s <= 1'b0;
    else        t40_s <= t40;

  assign first_half = (t40 != t40_s);   // between a clk edge and the next clk80 edge

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) bus <= '0;
    else        bus <= first_half ? frames[2*FW-1 -: FW] : frames[FW-1:0];
  end

  // --- receiver: frame 0 is on the bus in the second half, frame 1 in the first ---
  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      hi_rx   <= '0;
      word_rx <= '0;
    end else if (!first_half) begin
      hi_rx <= bus;
    end else begin
      word_rx <= WW'({hi_rx, bus} >> (2*FW-WW));
    end
  end

  always_comb begin
    for (int k = 0; k < N_MU; k++)
      mu_out[k] = muon_t'({word_rx[WW-1-k*KW -: KW], word_rx[N_MU*RW-1-k*RW -: RW]});
  end
endmodule
