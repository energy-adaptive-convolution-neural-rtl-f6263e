// tb_relu: ReLU on random and boundary 16-bit values against max(0, z).
module tb_relu;
  localparam int N = 16;
  logic signed [N-1:0] d, y;
  int checks = 0, failures = 0;

  relu #(.N(N)) dut (.d, .y);

  task automatic try(logic signed [N-1:0] v);
    d = v;
    #1;
    checks++;
    if (y != ((v < 0) ? 16'sd0 : v)) begin
      failures++;
      $display("FAIL relu(%0d) = %0d", v, y);
    end
  endtask

  initial begin
    try(16'sh8000); try(-16'sd1); try(16'sd0); try(16'sd1); try(16'sh7fff);
    for (int i = 0; i < 1000; i++) try(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
