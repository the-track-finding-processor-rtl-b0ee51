// sp_fpga_tb: four crossings in consecutive clocks (the unit is fully
// pipelined): a four-station muon, the same muon plus a two-station muon,
// a barrel/station-2 overlap muon, and an empty crossing. Checked four
// clocks later: number and order of winners, the Pt addresses worked out
// by hand from the address layout, phi, eta, and (one clock earlier) that
// the duplicate tracks were cancelled. Latency must be exactly 4 clocks.
module sp_fpga_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0;
  seg_ang_t [N_SEG-1:0] seg = '0;
  tf_cfg_t cfg;
  logic [N_BEST-1:0][PT_AW-1:0] pt_addr;
  logic [N_BEST-1:0][5:0] phi, eta;
  logic [N_BEST-1:0] vld;
  track_t [N_TRK-1:0] ta_trk;
  logic [N_TRK-1:0] fs_cancel;
  int checks = 0, failures = 0;

  sp_fpga dut (.*);
  always #5 clk = ~clk;

  function automatic seg_ang_t S(int p, int e = 30, int q = 5);
    return '{valid: 1'b1, quality: Q_W'(q), phi: PHI_W'(p), eta: ETA_W'(e)};
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  seg_ang_t [N_SEG-1:0] ev [4];
  localparam logic [PT_AW-1:0] A_MU1 = {3'd1, 1'b1, 6'd10, 3'd1, 3'd3};
  localparam logic [PT_AW-1:0] A_MU2 = {3'd4, 1'b1, 6'd10, 3'd0, 3'd3};
  localparam logic [PT_AW-1:0] A_OVL = {3'd7, 1'b1, 6'd10, 3'd0, 3'd3};

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg = '0;
    for (int p = 0; p < N_PAIRTYPE; p++) begin cfg.dphi_win[p] = 12'd40; cfg.deta_win[p] = 6'd4; end
    cfg.fs_thresh = 3'd1;
    ev[0] = '0;
    ev[0][OFS_ME1+2] = S(1000); ev[0][OFS_ME2+1] = S(1010);
    ev[0][OFS_ME3+0] = S(1020); ev[0][OFS_ME4+2] = S(1025);
    ev[1] = ev[0];
    ev[1][OFS_ME2+2] = S(3000); ev[1][OFS_ME3+2] = S(3010);
    ev[2] = '0;
    ev[2][OFS_MB+5] = S(500, 0); ev[2][OFS_ME2+0] = S(510);
    ev[3] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 12; c++) begin
      @(negedge clk);
      seg = (c < 4) ? ev[c] : '0;
      // results of crossing c-4 are now at the outputs
      if (c == 4) begin
        chk(vld == 3'b001 && pt_addr[0] == A_MU1 && phi[0] == 6'(1010 >> 6) && eta[0] == 6'd30, "4-station muon");
      end
      if (c == 3) chk(fs_cancel == 9'b010_001_000, "duplicates cancelled (crossing 0)");
      if (c == 5) chk(vld == 3'b011 && pt_addr[0] == A_MU1 && pt_addr[1] == A_MU2 &&
                      phi[1] == 6'(3000 >> 6), "two muons");
      if (c == 6) chk(vld == 3'b001 && pt_addr[0] == A_OVL && phi[0] == 6'(510 >> 6), "overlap muon");
      if (c == 7) chk(vld == 3'b000, "empty crossing");
      if (c == 3) chk(vld == 3'b000, "nothing before 4 clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
