// lut_sram_tb: writes a small memory through the access port, then checks
// reads through the pipeline port and through the access port (which must
// take over the address), both one clock after the address, against a
// model array.
module lut_sram_tb;
  localparam int AW = 6, DW = 8;
  logic clk = 0, cfg_en = 0, cfg_we = 0;
  logic [AW-1:0] addr = '0, cfg_addr = '0;
  logic [DW-1:0] cfg_wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  lut_sram #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = DW'($urandom);
      @(negedge clk); cfg_en = 1; cfg_we = 1; cfg_addr = AW'(a); cfg_wdata = model[a];
    end
    @(negedge clk); cfg_en = 0; cfg_we = 0;
    // pipeline reads, one clock latency
    for (int n = 0; n < 100; n++) begin
      automatic logic [AW-1:0] a = AW'($urandom);
      @(negedge clk); addr = a;
      @(negedge clk); chk(rdata, model[a], "pipe read");
    end
    // access-port read overrides the pipeline address
    for (int n = 0; n < 50; n++) begin
      automatic logic [AW-1:0] a = AW'($urandom);
      @(negedge clk); addr = ~a; cfg_en = 1; cfg_we = 0; cfg_addr = a;
      @(negedge clk); cfg_en = 0; chk(rdata, model[a], "cfg read");
    end
    // overwrite one word while the pipeline reads it
    @(negedge clk); cfg_en = 1; cfg_we = 1; cfg_addr = 6'd9; cfg_wdata = 8'h5a; model[9] = 8'h5a;
    @(negedge clk); cfg_en = 0; addr = 6'd9;
    @(negedge clk); chk(rdata, 8'h5a, "rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
