// relu: f(z) = max(0, z) on one n-bit signed fixed-point value.
//
// Used after both convolution layers and after the first fully connected
// layer. The format of the value is unchanged. Purely combinational.
module relu #(
  parameter int N = 16
) (
  input  logic signed [N-1:0] d,
  output logic signed [N-1:0] y
);
  always_comb y = d[N-1] ? '0 : d;
endmodule
