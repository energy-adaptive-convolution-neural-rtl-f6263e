// tb_mem_access: runs the memory access unit through all four layers
// against memory models with one cycle read latency and checks every window
// (order, zero padding, the map each conv2 window reads, fc2 zero fill),
// win_last on the last one, the done pulse, and the 10-cycle window period
// when the consumer never stalls. Conv2 and fc2 are also run with a consumer
// that stalls at random, which must not change the windows.
module tb_mem_access;
  import cnn_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, win_ready = 1'b0;
  layer_e layer = L_CONV1;
  logic [9:0]   img_raddr, fm_raddr;
  logic [N-1:0] img_rdata, fm_rdata;
  logic [N-1:0] win [9];
  logic         win_valid, win_last, busy, done;
  logic [N-1:0] img [784];
  logic [N-1:0] fm  [556];
  int checks = 0, failures = 0, pads = 0, stalls = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    img_rdata <= img[img_raddr];
    fm_rdata  <= fm[fm_raddr];
  end

  mem_access #(.N(N)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // expected operand k of window number w of a layer
  function automatic logic [N-1:0] expect_op(layer_e l, int w, int k);
    int pr, pc, q, mp, r, c, j, g, i;
    case (l)
      L_CONV1: begin
        q = w % 4; pc = (w / 4) % 14; pr = w / 56;
        r = 2 * pr + q / 2 + k / 3 - 1; c = 2 * pc + q % 2 + k % 3 - 1;
        if (r < 0 || r > 27 || c < 0 || c > 27) return '0;
        return img[r * 28 + c];
      end
      L_CONV2: begin
        mp = w % 2; q = (w / 2) % 4; pc = (w / 8) % 6; pr = w / 48;
        r = 2 * pr + q / 2 + k / 3; c = 2 * pc + q % 2 + k % 3;
        return fm[mp * 196 + r * 14 + c];
      end
      L_FC1: begin
        g = w % 16; return fm[392 + 9 * g + k];
      end
      default: begin
        g = w % 3; i = 9 * g + k;
        return (i < 20) ? fm[536 + i] : '0;
      end
    endcase
  endfunction

  task automatic run_layer(layer_e l, int nwin, bit stall);
    int w, t0, last_t, t, errs;
    bit got_done;
    @(negedge clk);
    layer = l; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    w = 0; t = 0; last_t = -1; errs = 0; got_done = 0;
    while (!got_done && t < 20000) begin
      win_ready = stall ? (($urandom % 4) == 0) : 1'b1;
      #1;
      if (win_valid && !win_ready) stalls++;
      if (win_valid && win_ready) begin
        for (int k = 0; k < 9; k++) begin
          if (win[k] != expect_op(l, w, k)) errs++;
          if (l == L_CONV1 && win[k] == '0 && expect_op(l, w, k) == '0) pads++;
        end
        if (!stall && last_t >= 0) chk(t - last_t == 10, $sformatf("layer %0d window %0d period %0d", l, w, t - last_t));
        chk(win_last == (w == nwin - 1), $sformatf("win_last at window %0d", w));
        last_t = t;
        w++;
      end
      @(negedge clk);
      t++;
      if (done) got_done = 1;
    end
    win_ready = 1'b0;
    chk(errs == 0, $sformatf("layer %0d: %0d wrong operands", l, errs));
    chk(w == nwin, $sformatf("layer %0d: %0d windows, expected %0d", l, w, nwin));
    chk(got_done && !busy, $sformatf("layer %0d: done/busy", l));
  endtask

  initial begin
    for (int i = 0; i < 784; i++) img[i] = N'($urandom % 65535 + 1);   // never zero
    for (int i = 0; i < 556; i++) fm[i]  = N'($urandom % 65535 + 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer(L_CONV1, 784, 1'b0);
    run_layer(L_CONV2, 288, 1'b0);
    run_layer(L_FC1,   320, 1'b0);
    run_layer(L_FC2,    30, 1'b0);
    run_layer(L_CONV2, 288, 1'b1);
    run_layer(L_FC2,    30, 1'b1);
    chk(pads == 332, $sformatf("padded operands %0d, expected 332", pads));
    chk(stalls > 0, "consumer stall exercised");
    $display("padded operands %0d, stalled cycles %0d", pads, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
