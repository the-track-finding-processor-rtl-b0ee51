// extrap_unit_tb: random segment pairs and windows, plus pairs placed just
// inside and just outside the windows; the registered match must equal the
// window test worked out here.
module extrap_unit_tb;
  import tf_pkg::*;
  logic clk = 0, rst_n = 0, use_eta = 1, match;
  seg_ang_t a = '0, b = '0;
  logic [PHI_W-1:0] dphi_win = '0;
  logic [ETA_W-1:0] deta_win = '0;
  int checks = 0, failures = 0, n_match = 0;

  extrap_unit dut (.*);
  always #5 clk = ~clk;

  function automatic logic expect_m(seg_ang_t x, seg_ang_t y, int wp, int we, logic ue);
    int dp = int'(x.phi) - int'(y.phi);
    int de = int'(x.eta) - int'(y.eta);
    if (dp < 0) dp = -dp;
    if (de < 0) de = -de;
    return x.valid && y.valid && dp <= wp && (!ue || de <= we);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic e;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a = seg_ang_t'($urandom); b = seg_ang_t'($urandom);
      a.valid = ($urandom % 8) != 0; b.valid = ($urandom % 8) != 0;
      dphi_win = PHI_W'($urandom % 64); deta_win = ETA_W'($urandom % 8);
      use_eta = $urandom % 2;
      case (n % 4)
        0: begin b.phi = a.phi + dphi_win; b.eta = a.eta - deta_win; end  // edge, inside
        1: begin b.phi = a.phi - dphi_win - 1; end                         // just outside
        2: begin b.phi = a.phi + PHI_W'($urandom % 40); b.eta = a.eta + ETA_W'($urandom % 10); end
        default: ;
      endcase
      e = expect_m(a, b, int'(dphi_win), int'(deta_win), use_eta);
      @(posedge clk); #1;
      checks++;
      if (match !== e) begin failures++; $display("FAIL n=%0d got %b exp %b", n, match, e); end
      if (match) n_match++;
    end
    checks++; if (n_match < 100) begin failures++; $display("FAIL too few matches %0d", n_match); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
