// tb_dpr_controller: battery levels across all seven bands, with a model of
// the processing system that answers a bit-stream request after a random
// delay. Checks the module picked for each level, that nothing is requested
// while the accelerator is busy, the decouple / request / reset order, the
// reset length, rp_ready, cur_bits and the reconfiguration count.
module tb_dpr_controller;
  logic clk = 1'b0, rst_n = 1'b0, cnn_busy = 1'b0, cfg_done = 1'b0;
  logic [7:0]  battery_level = 8'd255;
  logic        cfg_req, rp_decouple, rp_rst_n, rp_ready;
  logic [2:0]  cfg_rm, cur_rm;
  logic [4:0]  cur_bits;
  logic [15:0] n_reconfig;
  int checks = 0, failures = 0, reconfigs = 0, busy_waits = 0;

  always #5 clk = ~clk;
  dpr_controller dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int band(int level);
    if (level >= 224) return 0;
    if (level >= 192) return 1;
    if (level >= 160) return 2;
    if (level >= 128) return 3;
    if (level >= 96)  return 4;
    if (level >= 64)  return 5;
    return 6;
  endfunction

  function automatic int bits_of(int rm);
    int b [7] = '{16, 12, 10, 8, 7, 6, 5};
    return b[rm];
  endfunction

  // processing system + configuration port model
  initial begin
    forever begin
      @(negedge clk);
      if (cfg_req) begin
        chk(rp_decouple, "request with partition isolated");
        repeat (5 + $urandom % 40) begin
          @(negedge clk);
          chk(cfg_req && rp_decouple && rp_rst_n, "request held, partition isolated");
        end
        cfg_done = 1'b1;
        @(negedge clk);
        cfg_done = 1'b0;
      end
    end
  end

  // reset pulse length
  int low_run = 0;
  always @(posedge clk) begin
    if (rst_n && !rp_rst_n) low_run++;
    else if (low_run != 0) begin
      chk(low_run == 4, $sformatf("partition reset %0d cycles", low_run));
      low_run = 0;
    end
  end

  task automatic go_to(int level, bit hold_busy);
    int want, n0, t;
    want = band(level);
    n0 = int'(n_reconfig);
    battery_level = 8'(level);
    if (hold_busy) begin
      cnn_busy = 1'b1;
      repeat (30) begin
        @(negedge clk);
        chk(!cfg_req && !rp_decouple, "no reconfiguration while busy");
      end
      if (want != int'(cur_rm)) begin
        chk(!rp_ready, "rp_ready low while a reconfiguration is due");
        busy_waits++;
      end
      cnn_busy = 1'b0;
    end
    t = 0;
    do begin @(negedge clk); t++; end while (!rp_ready && t < 1000);
    repeat (3) @(negedge clk);
    chk(int'(cur_rm) == want, $sformatf("level %0d: module %0d expected %0d", level, cur_rm, want));
    chk(int'(cur_bits) == bits_of(want), $sformatf("level %0d: %0d bits", level, cur_bits));
    chk(rp_ready && rp_rst_n && !rp_decouple && !cfg_req, "settled");
    reconfigs += int'(n_reconfig) - n0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(int'(cur_rm) == 0 && cur_bits == 5'd16 && rp_ready, "after reset: 16-bit module, ready");
    go_to(150, 1'b1);   // 8 bits, first held off by a busy accelerator
    chk(n_reconfig == 16'd1, "one reconfiguration");
    go_to(140, 1'b0);   // same band: nothing to do
    chk(n_reconfig == 16'd1, "no reconfiguration inside a band");
    for (int lv = 255; lv >= 0; lv -= 23) go_to(lv, lv % 2 == 0);
    for (int i = 0; i < 20; i++) go_to(int'($urandom % 256), 1'b0);
    go_to(255, 1'b1);
    chk(reconfigs > 7 && busy_waits > 0, "bands crossed and busy hold exercised");
    $display("reconfigurations %0d, held off by busy %0d", reconfigs, busy_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
