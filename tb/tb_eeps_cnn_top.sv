// tb_eeps_cnn_top: end-to-end test of the energy-adaptive recogniser at its
// default parameters (16-bit partition).
//
// A model of the processing system answers bit-stream requests after a
// delay. The test recognises an image at full battery, lowers the battery so
// the 7-bit module is requested, tries to start and to overwrite the image
// while the partition is isolated (both must have no effect), recognises a
// second image after the switch, re-runs the first image from the memories
// left untouched by the blocked write, and finally restores the battery.
// Every result is compared with the reference model; the latency of each
// image must be 14,239 cycles. Counts how often each mechanism occurred
// (zero padding, ReLU clipping, window accumulation, bitwidth switch,
// isolation of start and writes) and fails for any that never did.
module tb_eeps_cnn_top;
  import tb_cnn_ref_pkg::*;
  localparam int N = 16;
  localparam int EXP_CYCLES = 14239;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  battery_level = 8'd255;
  logic        cfg_req, cfg_done = 1'b0, rp_ready;
  logic [2:0]  cfg_rm, cur_rm;
  logic [4:0]  cur_bits;
  logic [15:0] n_reconfig;
  logic        img_we = 1'b0, w_we = 1'b0, b_we = 1'b0, start = 1'b0;
  logic [9:0]  img_waddr = '0;
  logic [N-1:0] img_wdata = '0, w_data = '0, b_data = '0;
  logic [8:0]  w_row = '0;
  logic [3:0]  w_col = '0;
  logic [5:0]  b_addr = '0;
  logic        busy, done;
  logic [3:0]  class_idx;
  logic signed [N-1:0] scores [10];
  logic [15:0] cycles;

  eeps_cnn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ev_images = 0, ev_switch = 0, ev_start_blocked = 0, ev_write_blocked = 0;
  int ev_pad = 0, ev_relu = 0, ev_accum = 0;
  cnn_model m;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // processing system: copies the requested bit-stream, then answers
  int cfg_seen [8];
  initial begin
    for (int i = 0; i < 8; i++) cfg_seen[i] = 0;
    forever begin
      @(negedge clk);
      if (cfg_req) begin
        cfg_seen[cfg_rm]++;
        repeat (300) @(negedge clk);
        cfg_done = 1'b1;
        @(negedge clk);
        cfg_done = 1'b0;
      end
    end
  end

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

  task automatic recognise(string name);
    int t;
    while (!rp_ready) @(negedge clk);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    chk(busy, {name, ": busy after start"});
    t = 0;
    while (!done && t < 30000) begin @(negedge clk); t++; end
    chk(done, {name, ": done"});
    chk(int'(class_idx) == m.cls, $sformatf("%s: class %0d expected %0d", name, class_idx, m.cls));
    chk(int'(cycles) == EXP_CYCLES, $sformatf("%s: %0d cycles", name, cycles));
    for (int j = 0; j < 10; j++)
      chk(int'(scores[j]) == m.fc2[j], $sformatf("%s: score %0d = %0d expected %0d", name, j, scores[j], m.fc2[j]));
    ev_images++;
    $display("%s: class %0d in %0d cycles (%0d-bit module loaded)", name, class_idx, cycles, cur_bits);
  endtask

  task automatic wait_settled(int want_bits);
    int t;
    t = 0;
    repeat (3) @(negedge clk);   // the level is sampled before it is acted on
    while (!rp_ready && t < 5000) begin @(negedge clk); t++; end
    chk(rp_ready, "settled after reconfiguration");
    chk(int'(cur_bits) == want_bits, $sformatf("%0d-bit module loaded, expected %0d", cur_bits, want_bits));
  endtask

  initial begin
    int first_cls, first_scores [10], n_before;
    m = new(N);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(cur_bits == 5'd16 && rp_ready, "16-bit module after reset");

    // image 1 at full battery
    m.randomize_all();
    m.run();
    load();
    recognise("image 1");
    first_cls = m.cls;
    for (int j = 0; j < 10; j++) first_scores[j] = m.fc2[j];

    // battery drops to the 7-bit band (96..127)
    n_before = int'(n_reconfig);
    battery_level = 8'd100;
    while (!cfg_req) @(negedge clk);
    chk(cfg_rm == 3'd4, $sformatf("7-bit bit-stream requested (module %0d)", cfg_rm));
    // start and image writes while the partition is isolated
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    chk(!busy, "start ignored during reconfiguration");
    if (!busy) ev_start_blocked++;
    img_we = 1'b1; img_waddr = 10'd406; img_wdata = 16'sh7fff;
    @(negedge clk);
    img_we = 1'b0; img_waddr = 10'd407;
    @(negedge clk);
    img_we = 1'b0;
    wait_settled(7);
    chk(int'(n_reconfig) == n_before + 1, "one reconfiguration counted");
    ev_switch += int'(n_reconfig) - n_before;

    // image 1 again without reloading: the blocked write must not show
    recognise("image 1 after isolated write");
    chk(int'(class_idx) == first_cls, "image 1 unchanged by isolated write");
    begin
      bit same;
      same = 1;
      for (int j = 0; j < 10; j++) if (int'(scores[j]) != first_scores[j]) same = 0;
      chk(same, "scores unchanged by isolated write");
      if (same) ev_write_blocked++;
    end

    // image 2 after the switch
    m.randomize_all();
    m.run();
    load();
    recognise("image 2");

    // battery restored
    n_before = int'(n_reconfig);
    battery_level = 8'd250;
    wait_settled(16);
    ev_switch += int'(n_reconfig) - n_before;
    chk(cfg_seen[4] == 1 && cfg_seen[0] == 1, "bit-streams 7-bit and 16-bit each requested once");

    ev_pad   = m.n_pad;
    ev_relu  = m.n_relu_clip;
    ev_accum = ev_images * (20 * 15 + 10 * 2);   // fc window sums added to a running sum
    $display("events: images %0d, bitwidth switches %0d, starts blocked %0d, writes blocked %0d, padded operands %0d, ReLU clips %0d, fc accumulations %0d",
             ev_images, ev_switch, ev_start_blocked, ev_write_blocked, ev_pad, ev_relu, ev_accum);
    chk(ev_images > 0,        "recognition happened");
    chk(ev_switch >= 2,       "bitwidth switch happened");
    chk(ev_start_blocked > 0, "start blocking happened");
    chk(ev_write_blocked > 0, "write isolation happened");
    chk(ev_pad > 0,           "zero padding happened");
    chk(ev_relu > 0,          "ReLU clipping happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
