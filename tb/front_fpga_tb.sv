// front_fpga_tb: random words on four inputs with different programmed
// delays; every output word must equal its input from 1+dly clocks earlier.
module front_fpga_tb;
  localparam int N = 4, W = 8, MAXDLY = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][W-1:0] din = '0, dout;
  logic [N-1:0][1:0]   dly;
  logic [W-1:0] hist [N][$];
  int checks = 0, failures = 0;

  front_fpga #(.N(N), .W(W), .MAXDLY(MAXDLY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dly = '{2'd3, 2'd0, 2'd2, 2'd1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        din[i] = W'($urandom);
        hist[i].push_front(din[i]);
      end
      if (cyc == 200) dly = '{2'd0, 2'd3, 2'd1, 2'd2};
      @(posedge clk); #1;
      if (cyc > 10 && cyc != 200 && cyc != 201 && cyc != 202 && cyc != 203) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (dout[i] !== hist[i][dly[i]]) begin
            failures++; $display("FAIL cyc %0d link %0d got %h exp %h", cyc, i, dout[i], hist[i][dly[i]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
