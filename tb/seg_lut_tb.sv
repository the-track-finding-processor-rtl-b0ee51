// seg_lut_tb: loads the phi and eta tables of link 3 with known formulas
// (and link 5's with different ones, which link 3 must ignore), then feeds
// random segments and checks phi, eta, valid and quality one clock later,
// and the read-back path.
//   phi table: phi = (addr * 37 + 5) mod 4096, addr = {strip, pattern, sign}
//   eta table: eta = (addr * 11 + 3) mod 64,   addr = {wire group, quality}
module seg_lut_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0;
  seg_raw_t seg_in = '0;
  lut_req_t req = '0;
  seg_ang_t seg_out;
  logic [PHI_W-1:0] phi_rdata;
  logic [ETA_W-1:0] eta_rdata;
  int checks = 0, failures = 0;

  seg_lut #(.LINK(3)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [PHI_W-1:0] fphi(int a); return PHI_W'(a * 37 + 5); endfunction
  function automatic logic [ETA_W-1:0] feta(int a); return ETA_W'(a * 11 + 3); endfunction

  task automatic wr(lut_tgt_e t, int unit, int a, int d);
    @(negedge clk);
    req = '0; req.en = 1; req.we = 1; req.tgt = t; req.unit = 4'(unit);
    req.addr = PT_AW'(a); req.wdata = LUT_DW'(d);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 8192; a++) wr(T_PHI, 3, a, int'(fphi(a)));
    for (int a = 0; a < 2048; a++) wr(T_ETA, 3, a, int'(feta(a)));
    for (int a = 0; a < 300; a++)  wr(T_PHI, 5, a, 0);      // other link
    for (int a = 0; a < 300; a++)  wr(T_ETA, 5, a, 0);
    @(negedge clk); req = '0;
    for (int n = 0; n < 1000; n++) begin
      seg_raw_t s;
      @(negedge clk);
      s = seg_raw_t'($urandom);
      seg_in = s;
      @(posedge clk); #1;
      checks++;
      if (seg_out.valid !== s.valid || seg_out.quality !== s.quality ||
          seg_out.phi !== fphi(int'({s.strip, s.pattern, s.lr})) ||
          seg_out.eta !== feta(int'({s.wg, s.quality}))) begin
        failures++; $display("FAIL n=%0d got %h", n, seg_out);
      end
    end
    // read-back through the access port
    for (int n = 0; n < 50; n++) begin
      automatic int a = $urandom % 2048;
      @(negedge clk); req = '0; req.en = 1; req.tgt = (n % 2) ? T_ETA : T_PHI; req.unit = 4'd3; req.addr = PT_AW'(a);
      @(negedge clk); req.en = 0;
      checks++;
      if ((n % 2) ? (eta_rdata !== feta(a)) : (phi_rdata !== fphi(a))) begin
        failures++; $display("FAIL read-back n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
