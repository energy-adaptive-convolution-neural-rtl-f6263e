// argmax10: the output comparator, index of the largest of ten n-bit values.
//
// d[0..9] are the outputs of the last fully connected layer; idx is the digit
// the network recognises. Softmax keeps the order of its inputs, so the
// largest raw output names the same class. On equal values the lower index
// wins (this design's choice). A linear chain of nine comparators, purely
// combinational.
module argmax10 #(
  parameter int N = 16
) (
  input  logic signed [N-1:0] d [10],
  output logic        [3:0]   idx,
  output logic signed [N-1:0] max_val
);
  always_comb begin
    idx     = 4'd0;
    max_val = d[0];
    for (int i = 1; i < 10; i++) begin
      if (d[i] > max_val) begin
        max_val = d[i];
        idx     = 4'(i);
      end
    end
  end
endmodule
