// tb_sync_ram: fills the 784-word memory, reads every word back with one
// cycle of latency, and checks that a read of the word being written returns
// the old contents.
module tb_sync_ram;
  localparam int W = 16, DEPTH = 784, AW = 10;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sync_ram #(.W(W), .DEPTH(DEPTH), .AW(AW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic expect_eq(logic [W-1:0] v, string what);
    checks++;
    if (rdata != v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, rdata, v);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = W'($urandom); shadow[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 37) % DEPTH;
      raddr = AW'(a);
      @(negedge clk);
      expect_eq(shadow[a], $sformatf("read %0d", a));
    end
    // read and write of the same word in one cycle
    raddr = 10'd5; waddr = 10'd5; wdata = ~shadow[5]; we = 1'b1;
    @(negedge clk);
    we = 1'b0;
    expect_eq(shadow[5], "read during write");
    shadow[5] = wdata;
    @(negedge clk);
    expect_eq(shadow[5], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
