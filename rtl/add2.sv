// add2: two-input signed adder of the accumulator width (2n bits).
//
// The ADD2 unit of the accelerator: it builds the adder tree behind the nine
// multipliers and accumulates window sums of the fully connected layers. A sum
// that leaves the W-bit range is clamped to the largest or smallest W-bit
// value, so the result always stays representable in 2n bits. Clamping rather
// than wrapping is this design's choice. Purely combinational.
module add2 #(
  parameter int W = 32
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  logic signed [W:0] s;
  always_comb begin
    s = {a[W-1], a} + {b[W-1], b};
    if (s[W] != s[W-1]) y = s[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else                y = s[W-1:0];
  end
endmodule
