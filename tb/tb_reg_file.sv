// tb_reg_file: reset clears all 16 entries; random writes land in the
// addressed entry only, visible on the next cycle.
module tb_reg_file;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0] waddr = '0;
  logic signed [N-1:0] wdata = '0;
  logic signed [N-1:0] q [16];
  logic signed [N-1:0] shadow [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  reg_file #(.N(N), .DEPTH(16)) dut (.clk, .rst_n, .we, .waddr, .wdata, .q);

  task automatic compare(string when);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (q[i] != shadow[i]) begin
        failures++;
        $display("FAIL %s entry %0d = %0d expected %0d", when, i, q[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    compare("after reset");
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      we    = ($urandom % 3) != 0;
      waddr = 4'($urandom);
      wdata = N'($urandom);
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
      compare("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
