// weight_mem: parameter memory of the network (3170 trained parameters).
//
// Weights are stored as ROWS rows of nine N-bit words: one row is a 3x3
// kernel (conv layers) or nine consecutive weights of one neuron (fully
// connected layers), so a whole row feeds the nine multipliers at once.
// Biases live in a separate NBIAS-word array. Row layout (see cnn_pkg):
// conv1 rows 0-1, conv2 rows 2-5, fc1 rows 6-325 (neuron*16+group),
// fc2 rows 326-355 (neuron*3+group, the last group padded with zero weights).
// Loading is one word per clock through w_we (row, column) and b_we. Reads
// are asynchronous (LUT RAM style) so a row and a bias are available in the
// cycle they are addressed. The row organisation is this design's choice.
module weight_mem #(
  parameter int N     = 16,
  parameter int ROWS  = 356,
  parameter int NBIAS = 36
) (
  input  logic                     clk,
  input  logic                     w_we,
  input  logic [$clog2(ROWS)-1:0]  w_row,
  input  logic [3:0]               w_col,
  input  logic [N-1:0]             w_data,
  input  logic                     b_we,
  input  logic [$clog2(NBIAS)-1:0] b_addr,
  input  logic [N-1:0]             b_data,
  input  logic [$clog2(ROWS)-1:0]  rd_row,
  output logic [N-1:0]             rd_w [9],
  input  logic [$clog2(NBIAS)-1:0] rd_bias_addr,
  output logic [N-1:0]             rd_bias
);
  logic [9*N-1:0] wmem [ROWS];
  logic [N-1:0]   bmem [NBIAS];

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_row][w_col*N +: N] <= w_data;
    if (b_we) bmem[b_addr] <= b_data;
  end

  always_comb begin
    for (int k = 0; k < 9; k++) rd_w[k] = wmem[rd_row][k*N +: N];
    rd_bias = bmem[rd_bias_addr];
  end
endmodule
