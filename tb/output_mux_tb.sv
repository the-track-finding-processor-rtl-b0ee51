// output_mux_tb: random precalculated values for nine tracks and random
// winner indices; each output slot must carry its winner's values one
// clock later, or zeros when the slot is empty.
module output_mux_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_BEST-1:0][3:0] win_idx = '0;
  logic [N_BEST-1:0] win_vld = '0;
  logic [N_TRK-1:0][PT_AW-1:0] pc_addr = '0;
  logic [N_TRK-1:0][5:0] pc_phi = '0, pc_eta = '0;
  logic [N_BEST-1:0][PT_AW-1:0] addr;
  logic [N_BEST-1:0][5:0] phi, eta;
  logic [N_BEST-1:0] vld;
  int checks = 0, failures = 0;

  output_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N_TRK; i++) begin
        pc_addr[i] = PT_AW'($urandom); pc_phi[i] = 6'($urandom); pc_eta[i] = 6'($urandom);
      end
      for (int k = 0; k < N_BEST; k++) begin
        win_idx[k] = 4'($urandom % N_TRK); win_vld[k] = ($urandom % 4) != 0;
      end
      @(posedge clk); #1;
      for (int k = 0; k < N_BEST; k++) begin
        checks++;
        if (win_vld[k] ? (addr[k] !== pc_addr[win_idx[k]] || phi[k] !== pc_phi[win_idx[k]] ||
                          eta[k] !== pc_eta[win_idx[k]] || !vld[k])
                       : (addr[k] !== '0 || vld[k])) begin
          failures++; $display("FAIL n=%0d slot %0d", n, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
