// lut_sram: loadable lookup memory (models an on-board static RAM).
//
// Used for the segment conversion tables of the sector receivers and for
// the Pt assignment memories. It behaves as a single-port synchronous RAM:
// the pipeline normally owns the address port (addr) and gets the word one
// clock later on rdata. While cfg_en is high the configuration access owns
// the port: cfg_we=1 writes cfg_wdata at cfg_addr, cfg_we=0 reads cfg_addr
// and the word appears on rdata one clock later, which is how the tables
// are written and checked. The contents are never reset; they must be
// loaded before use. Depth and width are this design's choices.
module lut_sram #(
  parameter int AW = 16,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          cfg_en,
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  logic [DW-1:0] cfg_wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] a;

  assign a = cfg_en ? cfg_addr : addr;

  always_ff @(posedge clk) begin
    if (cfg_en && cfg_we) mem[a] <= cfg_wdata;
    rdata <= mem[a];
  end
endmodule
