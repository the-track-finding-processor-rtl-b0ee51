// gtlp_link_tb: random muons handed over at every crossing clock edge; the
// rebuilt muons must be sampled in the crossing clock domain exactly one
// clock later than they would be without the link (edge T+2 for muons given
// at edge T), and the first frame on the bus must lead with the sort keys
// {valid, quality, pt} of all three muons.
module gtlp_link_tb;
  import tf_pkg::*;
  logic clk = 0, clk80 = 1, rst_n = 0;
  muon_t [N_BEST-1:0] mu_in = '0, mu_out;
  logic [31:0] bus;
  muon_t [N_BEST-1:0] hist [$];
  int checks = 0, failures = 0, n_key = 0;

  gtlp_link dut (.*);
  always #10  clk = ~clk;
  always #5   clk80 = ~clk80;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // first frame: on the bus just after the middle of the crossing it belongs to
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      #16;
      if (hist.size() > 2) begin
        automatic logic [23:0] keys = {mu_in[0][20:13], mu_in[1][20:13], mu_in[2][20:13]};
        checks++; n_key++;
        if (bus[31:8] !== keys) begin failures++; $display("FAIL frame0 keys %h exp %h", bus[31:8], keys); end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      // muons handed over at edge T-2 are sampled here, at edge T
      if (hist.size() > 3) begin
        checks++;
        if (mu_out !== hist[1]) begin failures++; $display("FAIL n=%0d got %h exp %h", n, mu_out, hist[1]); end
      end
      for (int k = 0; k < N_BEST; k++) mu_in[k] <= muon_t'($urandom);
      #1 hist.push_front(mu_in);
    end
    checks++; if (n_key < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
