// tb_weight_mem: writes all 356 rows word by word and all 36 biases, then
// reads random rows and biases back in the same cycle they are addressed.
module tb_weight_mem;
  localparam int N = 16, ROWS = 356, NBIAS = 36;
  logic clk = 1'b0, w_we = 1'b0, b_we = 1'b0;
  logic [8:0]   w_row = '0, rd_row = '0;
  logic [3:0]   w_col = '0;
  logic [N-1:0] w_data = '0, b_data = '0, rd_bias;
  logic [5:0]   b_addr = '0, rd_bias_addr = '0;
  logic [N-1:0] rd_w [9];
  logic [N-1:0] ws [ROWS][9];
  logic [N-1:0] bs [NBIAS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  weight_mem #(.N(N), .ROWS(ROWS), .NBIAS(NBIAS)) dut (.*);

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < 9; k++) begin
        @(negedge clk);
        w_we = 1'b1; w_row = 9'(r); w_col = 4'(k); w_data = N'($urandom); ws[r][k] = w_data;
      end
    @(negedge clk) w_we = 1'b0;
    for (int i = 0; i < NBIAS; i++) begin
      @(negedge clk);
      b_we = 1'b1; b_addr = 6'(i); b_data = N'($urandom); bs[i] = b_data;
    end
    @(negedge clk) b_we = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int r, b;
      r = (t < ROWS) ? t : int'($urandom % ROWS);
      b = int'($urandom % NBIAS);
      rd_row = 9'(r); rd_bias_addr = 6'(b);
      #1;
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (rd_w[k] != ws[r][k]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d word %0d", r, k);
        end
      end
      checks++;
      if (rd_bias != bs[b]) begin
        failures++;
        if (failures < 10) $display("FAIL bias %0d", b);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
