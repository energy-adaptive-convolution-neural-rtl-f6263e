// maxpool4: the MaxPool unit, the largest of four n-bit signed values.
//
// Implements a 2x2 max-pooling window with stride two: d[0..3] are the four
// neighbouring conv outputs (after ReLU). Two comparators pick the larger of
// each pair and a third compares the winners. Purely combinational.
module maxpool4 #(
  parameter int N = 16
) (
  input  logic signed [N-1:0] d [4],
  output logic signed [N-1:0] y
);
  logic signed [N-1:0] m01, m23;
  always_comb begin
    m01 = (d[1] > d[0]) ? d[1] : d[0];
    m23 = (d[3] > d[2]) ? d[3] : d[2];
    y   = (m23 > m01) ? m23 : m01;
  end
endmodule
