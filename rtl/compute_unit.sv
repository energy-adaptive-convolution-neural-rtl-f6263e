// compute_unit: nine multipliers and an ADD2 adder tree, the arithmetic core
// shared by every layer.
//
// Each cycle with en high it multiplies the nine operands x[k] of a window by
// the nine weights w[k] (n x n -> 2n bits, exact), moves every product to the
// layer's 2n-bit accumulator format with an arithmetic shift of pshift bits
// (right when positive, left with clamping when negative), and adds the nine
// aligned products with eight add2 units in the order
// ((p0+p1)+(p2+p3)) + ((p4+p5)+(p6+p7)) + p8. Dropping the low bits on the
// shift and clamping every addition keeps each partial sum in 2n bits, as the
// quantisation scheme requires. sum/valid are registered: the result of an
// operation issued in cycle t is visible in cycle t+1. The tree order and the
// single register stage are this design's choices.
module compute_unit #(
  parameter int N = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [N-1:0]   x [9],
  input  logic signed [N-1:0]   w [9],
  input  logic signed [5:0]     pshift,
  output logic signed [2*N-1:0] sum,
  output logic                  valid
);
  localparam int W = 2 * N;

  // arithmetic shift by s (right if s >= 0, left with clamping if s < 0)
  function automatic logic signed [W-1:0] align(logic signed [W-1:0] v, logic signed [5:0] s);
    logic signed [W-1:0] r;
    logic                sat;
    r   = v;
    sat = 1'b0;
    if (s >= 0) begin
      r = v >>> s;
    end else begin
      for (int i = 0; i < 32; i++) begin
        if (i < -int'(s)) begin
          if (r[W-1] != r[W-2]) sat = 1'b1;
          r = r <<< 1;
        end
      end
      if (sat) r = v[W-1] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    end
    return r;
  endfunction

  logic signed [W-1:0] p [9];
  logic signed [W-1:0] s1 [4];
  logic signed [W-1:0] s2 [2];
  logic signed [W-1:0] s3, s4;

  always_comb begin
    for (int k = 0; k < 9; k++) p[k] = align(W'(x[k]) * W'(w[k]), pshift);
  end

  for (genvar g = 0; g < 4; g++) begin : g_l1
    add2 #(.W(W)) u_add (.a(p[2*g]), .b(p[2*g+1]), .y(s1[g]));
  end
  add2 #(.W(W)) u_add_l2a (.a(s1[0]), .b(s1[1]), .y(s2[0]));
  add2 #(.W(W)) u_add_l2b (.a(s1[2]), .b(s1[3]), .y(s2[1]));
  add2 #(.W(W)) u_add_l3  (.a(s2[0]), .b(s2[1]), .y(s3));
  add2 #(.W(W)) u_add_l4  (.a(s3),    .b(p[8]),  .y(s4));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) sum <= s4;
    end
  end
endmodule
