// tb_compute_unit: nine-term multiply-add with product alignment and
// clamped additions, checked against 64-bit integer arithmetic. Covers
// right and left alignment shifts, clamping of shifted products and of sums,
// the one-cycle latency of sum/valid, and a held sum while en is low.
module tb_compute_unit;
  localparam int N = 16, W = 32;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [N-1:0]   x [9];
  logic signed [N-1:0]   w [9];
  logic signed [5:0]     pshift = '0;
  logic signed [W-1:0]   sum;
  logic                  valid;
  int checks = 0, failures = 0, saturations = 0;

  always #5 clk = ~clk;
  compute_unit #(.N(N)) dut (.clk, .rst_n, .en, .x, .w, .pshift, .sum, .valid);

  function automatic longint cl(longint v);
    if (v > 64'sd2147483647) begin saturations++; return 64'sd2147483647; end
    if (v < -64'sd2147483648) begin saturations++; return -64'sd2147483648; end
    return v;
  endfunction

  function automatic longint expected(int s);
    longint p [9];
    for (int k = 0; k < 9; k++) begin
      p[k] = longint'(x[k]) * longint'(w[k]);
      p[k] = (s >= 0) ? (p[k] >>> s) : cl(p[k] * (longint'(1) <<< (-s)));
    end
    return cl(cl(cl(cl(p[0] + p[1]) + cl(p[2] + p[3])) + cl(cl(p[4] + p[5]) + cl(p[6] + p[7]))) + p[8]);
  endfunction

  function automatic int pick_shift(int i);
    int tbl [5] = '{2, -1, 0, -3, 5};
    return tbl[i % 5];
  endfunction

  initial begin
    for (int k = 0; k < 9; k++) begin x[k] = '0; w[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint e;
      int s;
      s = pick_shift(i);
      for (int k = 0; k < 9; k++) begin
        x[k] = (i % 3 == 0) ? N'($urandom) : N'($urandom % 2048);
        w[k] = (i % 7 == 0) ? 16'sh7fff    : N'($urandom);
      end
      pshift = 6'(s);
      en = 1'b1;
      e = expected(s);
      @(negedge clk);
      checks++;
      if (!valid || longint'(sum) != e) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d shift %0d: %0d expected %0d", i, s, sum, e);
      end
      if (i % 10 == 0) begin        // idle cycle: valid drops, sum is held
        en = 1'b0;
        for (int k = 0; k < 9; k++) x[k] = N'($urandom);
        @(negedge clk);
        checks++;
        if (valid || longint'(sum) != e) begin
          failures++;
          $display("FAIL idle cycle");
        end
      end
    end
    checks++;
    if (saturations == 0) begin
      failures++;
      $display("FAIL no clamping exercised");
    end
    $display("clamped additions or shifts in reference: %0d", saturations);
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
