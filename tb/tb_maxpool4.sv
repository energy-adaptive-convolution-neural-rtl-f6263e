// tb_maxpool4: the maximum of four signed values, random and with the
// largest value in every position, against a sort-free reference.
module tb_maxpool4;
  localparam int N = 16;
  logic signed [N-1:0] d [4];
  logic signed [N-1:0] y;
  int checks = 0, failures = 0;

  maxpool4 #(.N(N)) dut (.d, .y);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int best;
      for (int k = 0; k < 4; k++) d[k] = (i < 1000) ? N'($urandom) : N'($urandom % 64) - 16'sd32;
      if (i % 4 == 0) d[i % 16 / 4] = 16'sh7ff0;   // known winner in each slot
      best = -100000;
      for (int k = 0; k < 4; k++) if (int'(d[k]) > best) best = int'(d[k]);
      #1;
      checks++;
      if (int'(y) != best) begin
        failures++;
        $display("FAIL max(%0d %0d %0d %0d) = %0d", d[0], d[1], d[2], d[3], y);
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
