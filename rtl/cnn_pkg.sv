// cnn_pkg: constants and helpers shared by the EEPS-CNN-1 accelerator.
//
// Network (two conv layers, two fully connected layers, MNIST 28x28 input):
//   conv1: 2 filters 3x3, zero padded, 28x28 -> ReLU -> 2x2 maxpool -> 14x14x2
//   conv2: 4 filters 3x3, unpadded, 14x14 -> 12x12 -> ReLU -> maxpool -> 6x6x4
//   fc1  : 144 -> 20, ReLU;   fc2: 20 -> 10;   comparator picks the class.
// Layer sizes and output integer widths (m = 4, 5, 6, 8) follow the source
// network. The grouped form of conv2 (filters 0,1 read map 0; filters 2,3 read
// map 1, one 3x3 kernel each, 40 parameters), the input format (m = 0) and the
// weight format (m = 1) are this design's choices.
//
// Every value is an n-bit signed fixed-point number with m integer bits and
// n-m-1 fraction bits. Sums are kept in 2n bits with 2n-m-1 fraction bits
// (m of the layer's output) and cut to n bits by dropping the low n bits.
package cnn_pkg;

  typedef enum logic [1:0] {L_CONV1 = 2'd0, L_CONV2 = 2'd1, L_FC1 = 2'd2, L_FC2 = 2'd3} layer_e;

  // geometry
  localparam int IMG_DIM   = 28;
  localparam int IMG_WORDS = IMG_DIM * IMG_DIM;       // 784
  localparam int P1_DIM    = 14;                      // pool1 output 14x14x2
  localparam int P2_DIM    = 6;                       // pool2 output 6x6x4
  localparam int C1_FILT   = 2;
  localparam int C2_FILT   = 4;
  localparam int FC1_IN    = P2_DIM * P2_DIM * C2_FILT; // 144
  localparam int FC1_OUT   = 20;
  localparam int FC2_OUT   = 10;
  localparam int FC1_GRP   = FC1_IN / 9;              // 16 windows of nine inputs
  localparam int FC2_GRP   = 3;                       // 20 inputs padded to 27

  // intermediate results memory map
  localparam int P1_BASE   = 0;                       // map*196 + r*14 + c
  localparam int P2_BASE   = P1_DIM * P1_DIM * C1_FILT; // 392: map*36 + r*6 + c
  localparam int F1_BASE   = P2_BASE + FC1_IN;         // 536: neuron index
  localparam int FM_WORDS  = F1_BASE + FC1_OUT;        // 556

  // weight memory map: rows of nine weights, one bias per output
  localparam int WROW_C1   = 0;                        // filter f
  localparam int WROW_C2   = 2;                        // filter f
  localparam int WROW_F1   = 6;                        // neuron*16 + group
  localparam int WROW_F2   = WROW_F1 + FC1_OUT * FC1_GRP; // 326: neuron*3 + group
  localparam int W_ROWS    = WROW_F2 + FC2_OUT * FC2_GRP; // 356
  localparam int BIAS_C1   = 0;
  localparam int BIAS_C2   = 2;
  localparam int BIAS_F1   = 6;
  localparam int BIAS_F2   = 26;
  localparam int N_BIAS    = 36;

  // product alignment: right shift (negative = left) that moves a product of
  // an input with m_in integer bits and a weight with m_w integer bits to the
  // 2n-bit accumulator format of a layer whose output has m_out integer bits.
  // (n-1-m_in) + (n-1-m_w) - (2n-1-m_out) does not depend on n.
  function automatic int prod_shift(int m_in, int m_w, int m_out);
    return m_out - m_in - m_w - 1;
  endfunction

  // bias alignment: right shift (negative = left) from the n-bit weight
  // format to the 2n-bit accumulator format.
  function automatic int bias_shift(int n, int m_w, int m_out);
    return (n - 1 - m_w) - (2 * n - 1 - m_out);
  endfunction

endpackage
