// pt_precalc_tb: random segments and random tracks over every station
// combination; the Pt address, phi and eta are recomputed here from the
// address layout {mode, sign A, |dphi A| sat 63, |dphi B|/8 sat 7, eta[5:3]}
// and compared one clock later. Each of the seven modes must occur.
module pt_precalc_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0;
  track_t trk = '0;
  seg_ang_t [N_SEG-1:0] seg = '0;
  logic [PT_AW-1:0] addr;
  logic [5:0] phi, eta;
  logic vld;
  int checks = 0, failures = 0;
  int mode_seen [8];
  localparam int OFS [5] = '{0, 6, 9, 12, 15};
  localparam int NC [5]  = '{6, 3, 3, 3, 8};

  pt_precalc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int p [5];
      int e [5];
      bit h [5];
      int mode, da, db, qa, qb, ke, kp;
      logic [PT_AW-1:0] ea;
      @(negedge clk);
      for (int i = 0; i < N_SEG; i++) seg[i] = seg_ang_t'($urandom);
      // nearby phis for small differences half of the time
      if (n % 2 == 0) for (int i = 0; i < N_SEG; i++) seg[i].phi = PHI_W'(2000 + $urandom % 300);
      trk = '0;
      trk.valid = ($urandom % 10) != 0;
      trk.rank = 4'($urandom);
      for (int s = 0; s < 5; s++) begin
        h[s] = ($urandom % 2) == 1;
        if (s == 4 && ($urandom % 3) != 0) h[s] = 0;
        trk.id[s] = h[s] ? 4'(1 + $urandom % NC[s]) : 4'd0;
        p[s] = h[s] ? int'(seg[OFS[s] + trk.id[s] - 1].phi) : 0;
        e[s] = h[s] ? int'(seg[OFS[s] + trk.id[s] - 1].eta) : 0;
        h[s] = h[s] && trk.valid;
      end
      da = 0; db = 0; mode = 0;
      if (h[0] && h[1] && h[2])      begin mode = 1; da = p[0]-p[1]; db = p[1]-p[2]; end
      else if (h[4] && h[1])         begin mode = 7; da = p[4]-p[1]; if (h[0]) db = p[0]-p[1]; end
      else if (h[0] && h[1])         begin mode = 2; da = p[0]-p[1]; if (h[3]) db = p[1]-p[3]; end
      else if (h[0] && h[2])         begin mode = 3; da = p[0]-p[2]; if (h[3]) db = p[2]-p[3]; end
      else if (h[1] && h[2])         begin mode = 4; da = p[1]-p[2]; if (h[3]) db = p[2]-p[3]; end
      else if (h[1] && h[3])         begin mode = 5; da = p[1]-p[3]; end
      else if (h[2] && h[3])         begin mode = 6; da = p[2]-p[3]; end
      qa = (da < 0 ? -da : da); if (qa > 63) qa = 63;
      qb = (db < 0 ? -db : db) / 8; if (qb > 7) qb = 7;
      ke = h[1] ? e[1] : e[2];
      kp = h[1] ? p[1] : p[2];
      ea = {3'(mode), da < 0, 6'(qa), 3'(qb), 3'(ke >> 3)};
      @(posedge clk); #1;
      checks++;
      if (addr !== ea || eta !== 6'(ke) || phi !== 6'(kp >> 6) || vld !== trk.valid) begin
        failures++; $display("FAIL n=%0d addr %h/%h eta %0d/%0d phi %0d/%0d", n, addr, ea, eta, ke, phi, kp >> 6);
      end
      mode_seen[mode]++;
    end
    for (int m = 1; m < 8; m++) begin
      checks++; if (mode_seen[m] == 0) begin failures++; $display("FAIL mode %0d never seen", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
