// tb_add2: random and corner-case additions of the 32-bit saturating adder,
// compared with a 64-bit sum clamped to the 32-bit range.
module tb_add2;
  localparam int W = 32;
  logic signed [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  add2 #(.W(W)) dut (.a, .b, .y);

  function automatic longint ref_sum(longint x, longint z);
    longint s;
    s = x + z;
    if (s > 64'sd2147483647) s = 64'sd2147483647;
    if (s < -64'sd2147483648) s = -64'sd2147483648;
    return s;
  endfunction

  task automatic try(logic signed [W-1:0] x, logic signed [W-1:0] z);
    a = x; b = z;
    #1;
    checks++;
    if (longint'(y) != ref_sum(longint'(x), longint'(z))) begin
      failures++;
      $display("FAIL %0d + %0d = %0d", x, z, y);
    end
  endtask

  initial begin
    try(32'sd5, -32'sd7);
    try(32'sh7fff_fff0, 32'sd100);        // positive overflow
    try(-32'sh7fff_fff0, -32'sd100);      // negative overflow
    try(32'sh7fff_ffff, 32'sh8000_0000);
    for (int i = 0; i < 2000; i++) begin
      logic signed [W-1:0] x, z;
      x = $urandom;
      z = (i % 2) ? $urandom : W'($urandom % 4096) - 2048;
      try(x, z);
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
