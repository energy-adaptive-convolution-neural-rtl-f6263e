// cnn_core_check: drives one cnn_core of bitwidth N through NIMG complete
// images and compares it with the reference model of tb_cnn_ref_pkg.
//
// For each image: draw an image and a parameter set, load them through the
// core's load ports, pulse start, wait for done, then compare the class, the
// ten class scores (which depend on every earlier layer) and the start-to-done cycle count (EXP_CYCLES).
// Reports its totals on checks/failures and raises finished at the end.
module cnn_core_check #(
  parameter int N          = 16,
  parameter int NIMG       = 2,
  parameter int EXP_CYCLES = 14239
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import tb_cnn_ref_pkg::*;

  logic               rst_n = 1'b0;
  logic               img_we = 1'b0, w_we = 1'b0, b_we = 1'b0, start = 1'b0;
  logic [9:0]         img_waddr = '0;
  logic [N-1:0]       img_wdata = '0, w_data = '0, b_data = '0;
  logic [8:0]         w_row = '0;
  logic [3:0]         w_col = '0;
  logic [5:0]         b_addr = '0;
  logic               busy, done;
  logic [3:0]         class_idx;
  logic signed [N-1:0] scores [10];
  logic [15:0]        cycles;

  cnn_core #(.N(N)) u_dut (.*);

  cnn_model m;
  int classes_seen = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("N=%0d FAIL %s", N, what);
    end
  endtask

  task automatic wr_w(int row, int col, int v);
    @(negedge clk);
    w_we = 1'b1; w_row = 9'(row); w_col = 4'(col); w_data = N'(v);
  endtask

  task automatic wr_b(int a, int v);
    @(negedge clk);
    b_we = 1'b1; b_addr = 6'(a); b_data = N'(v);
  endtask

  task automatic load();
    for (int r = 0; r < 28; r++)
      for (int c = 0; c < 28; c++) begin
        @(negedge clk);
        img_we = 1'b1; img_waddr = 10'(r * 28 + c); img_wdata = N'(m.img[r][c]);
      end
    @(negedge clk) img_we = 1'b0;
    for (int f = 0; f < 2; f++) for (int k = 0; k < 9; k++) wr_w(f, k, m.c1w[f][k]);
    for (int f = 0; f < 4; f++) for (int k = 0; k < 9; k++) wr_w(2 + f, k, m.c2w[f][k]);
    for (int j = 0; j < 20; j++)
      for (int g = 0; g < 16; g++)
        for (int k = 0; k < 9; k++) wr_w(6 + j * 16 + g, k, m.f1w[j][9 * g + k]);
    for (int j = 0; j < 10; j++)
      for (int g = 0; g < 3; g++)
        for (int k = 0; k < 9; k++) wr_w(326 + j * 3 + g, k, (9 * g + k < 20) ? m.f2w[j][9 * g + k] : 0);
    @(negedge clk) w_we = 1'b0;
    for (int f = 0; f < 2; f++)  wr_b(f, m.c1b[f]);
    for (int f = 0; f < 4; f++)  wr_b(2 + f, m.c2b[f]);
    for (int j = 0; j < 20; j++) wr_b(6 + j, m.f1b[j]);
    for (int j = 0; j < 10; j++) wr_b(26 + j, m.f2b[j]);
    @(negedge clk) b_we = 1'b0;
  endtask

  function automatic int sx(logic [N-1:0] v);
    return int'(signed'(v));
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    m = new(N);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NIMG; t++) begin
      m.randomize_all();
      m.run();
      load();
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      chk(busy, "busy after start");
      while (!done) @(negedge clk);
      chk(!busy, "busy low at done");
      chk(int'(class_idx) == m.cls, $sformatf("class %0d expected %0d", class_idx, m.cls));
      chk(int'(cycles) == EXP_CYCLES, $sformatf("cycles %0d expected %0d", cycles, EXP_CYCLES));
      for (int j = 0; j < 10; j++)
        chk(sx(scores[j]) == m.fc2[j], $sformatf("score %0d: %0d expected %0d", j, sx(scores[j]), m.fc2[j]));
      $display("N=%0d image %0d: class %0d, %0d cycles", N, t, class_idx, cycles);
    end
    finished = 1'b1;
  end
endmodule
