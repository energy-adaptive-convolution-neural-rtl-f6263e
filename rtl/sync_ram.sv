// sync_ram: single-clock memory with one write port and one read port.
//
// Used twice in the accelerator: as the image memory (784 words, one 28x28
// MNIST image) and as the intermediate results memory (556 words: pooled
// conv1 maps, pooled conv2 maps, first fully connected layer outputs).
// Write: we/waddr/wdata stored at the clock edge. Read: raddr sampled at the
// clock edge, rdata valid in the next cycle (one cycle latency). A read and a
// write of the same address in one cycle return the old word. Contents are
// not reset. The two memories are those of the source architecture; the
// single read port with one cycle latency is this design's choice.
module sync_ram #(
  parameter int W     = 16,
  parameter int DEPTH = 784,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
