// tb_argmax10: index and value of the largest of ten signed scores, random,
// with ties (the lower index must win) and with all scores negative.
module tb_argmax10;
  localparam int N = 16;
  logic signed [N-1:0] d [10];
  logic [3:0]          idx;
  logic signed [N-1:0] max_val;
  int checks = 0, failures = 0;

  argmax10 #(.N(N)) dut (.d, .idx, .max_val);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int bi;
      for (int k = 0; k < 10; k++) begin
        if (i < 1000)      d[k] = N'($urandom);
        else if (i < 2000) d[k] = N'($urandom % 8);          // many ties
        else               d[k] = -16'sd1 - N'($urandom % 500); // all negative
      end
      bi = 0;
      for (int k = 1; k < 10; k++) if (d[k] > d[bi]) bi = k;
      #1;
      checks++;
      if (int'(idx) != bi || max_val != d[bi]) begin
        failures++;
        $display("FAIL idx %0d expected %0d", idx, bi);
      end
    end
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
