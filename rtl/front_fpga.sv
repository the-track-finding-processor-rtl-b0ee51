// front_fpga: bunch-crossing alignment of the incoming links.
//
// The deserialisation time of each optical link differs, so the words of
// one bunch crossing arrive on different links in different clocks. Each
// of the N inputs is delayed by its own programmable number of extra clocks
// (dly, 0..MAXDLY-1) and then registered, so dout[i] is din[i] from 1+dly[i]
// clocks earlier and all links present the same crossing. The links are
// taken as already retimed to the common clock; the delay range and the
// reset-to-zero of the pipeline are this design's choices.
module front_fpga #(
  parameter int N      = 15,
  parameter int W      = 25,
  parameter int MAXDLY = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0][W-1:0]     din,
  input  logic [N-1:0][$clog2(MAXDLY)-1:0] dly,
  output logic [N-1:0][W-1:0]     dout
);
  // sh[i][k] holds din[i] delayed by k+1 clocks
  logic [N-1:0][MAXDLY-2:0][W-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      dout <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        sh[i][0] <= din[i];
        for (int k = 1; k < MAXDLY-1; k++) sh[i][k] <= sh[i][k-1];
        dout[i] <= (dly[i] == '0) ? din[i] : sh[i][dly[i]-1];
      end
    end
  end
endmodule
