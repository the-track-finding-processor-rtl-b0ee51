// output_mux: routes the three winners to the Pt assignment memories.
//
// Final selection names the three best tracks by index (win_idx, win_vld);
// the Pt precalculation has already produced an address, phi and eta for
// each of the nine tracks. For each output slot this unit selects the
// winner's precalculated values and registers them, one clock, so the Pt
// memories are addressed without further arithmetic. An empty slot gives
// vld = 0 and zero values.
module output_mux
  import tf_pkg::*;
#(
  parameter int N_IN  = N_TRK,
  parameter int N_OUT = N_BEST
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_OUT-1:0][3:0]         win_idx,
  input  logic [N_OUT-1:0]              win_vld,
  input  logic [N_IN-1:0][PT_AW-1:0]    pc_addr,
  input  logic [N_IN-1:0][5:0]          pc_phi,
  input  logic [N_IN-1:0][5:0]          pc_eta,
  output logic [N_OUT-1:0][PT_AW-1:0]   addr,
  output logic [N_OUT-1:0][5:0]         phi,
  output logic [N_OUT-1:0][5:0]         eta,
  output logic [N_OUT-1:0]              vld
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0; phi <= '0; eta <= '0; vld <= '0;
    end else begin
      for (int k = 0; k < N_OUT; k++) begin
        addr[k] <= '0; phi[k] <= '0; eta[k] <= '0;
        for (int i = 0; i < N_IN; i++)
          if (win_vld[k] && win_idx[k] == 4'(i)) begin
            addr[k] <= pc_addr[i];
            phi[k]  <= pc_phi[i];
            eta[k]  <= pc_eta[i];
          end
        vld[k] <= win_vld[k];
      end
    end
  end
endmodule
