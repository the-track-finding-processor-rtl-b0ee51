// muon_sorter_tb: 36 random candidates (many invalid, many equal ranks);
// the four best by {valid, quality, pt}, lower index first on ties, with
// their sector numbers, must appear one clock later.
module muon_sorter_tb;
  import tf_pkg::*;
  localparam int N_IN = N_SECT*N_BEST;
  logic clk = 0, rst_n = 0;
  muon_t [N_IN-1:0] cand = '0;
  gmt_cand_t [N_GMT-1:0] best, exp_b;
  int checks = 0, failures = 0;

  muon_sorter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      bit used [N_IN];
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) begin
        cand[i] = muon_t'($urandom);
        cand[i].valid = ($urandom % (1 + n % 20)) == 0;
        cand[i].pt = 5'($urandom % 4);
        used[i] = 0;
      end
      exp_b = '0;
      for (int k = 0; k < N_GMT; k++) begin
        int b;
        b = -1;
        for (int i = 0; i < N_IN; i++)
          if (cand[i].valid && !used[i] &&
              (b < 0 || {cand[i].quality, cand[i].pt} > {cand[b].quality, cand[b].pt})) b = i;
        if (b >= 0) begin used[b] = 1; exp_b[k].mu = cand[b]; exp_b[k].sector = 4'(b / 3); end
      end
      @(posedge clk); #1;
      checks++;
      if (best !== exp_b) begin failures++; $display("FAIL n=%0d got %h exp %h", n, best, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
