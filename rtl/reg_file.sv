// reg_file: small register file that holds layer outputs on their way to
// the pooling unit, the intermediate memory or the comparator.
//
// DEPTH words of N bits, one synchronous write port, every word readable at
// once (q). In the convolution layers entry f*4+p holds filter f's result at
// pooling position p; in the last layer entries 0..9 hold the ten class
// scores. Reset clears every entry. Depth and port layout are this design's
// choice.
module reg_file #(
  parameter int N     = 16,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic signed [N-1:0]      wdata,
  output logic signed [N-1:0]      q [DEPTH]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (we) begin
      q[waddr] <= wdata;
    end
  end
endmodule
