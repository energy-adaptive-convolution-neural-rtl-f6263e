// tb_cnn_core: runs complete images through cnn_core at each of the seven
// bitwidths of the energy-adaptive system (16, 12, 10, 8, 7, 6, 5 bits) and
// compares class and scores with the bit-accurate reference model, plus the
// 14,239-cycle latency of one image.
module tb_cnn_core;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 7;
  int   ck [NB];
  int   fl [NB];
  logic fin [NB];

  localparam int WIDTHS [NB] = '{16, 12, 10, 8, 7, 6, 5};
  for (genvar i = 0; i < NB; i++) begin : g_bits
    cnn_core_check #(.N(WIDTHS[i])) u_chk (.clk, .checks(ck[i]), .failures(fl[i]), .finished(fin[i]));
  end

  task automatic report(int extra_fail);
    int checks, failures;
    checks = 0;
    failures = extra_fail;
    for (int i = 0; i < NB; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5] && fin[6]);
    report(0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
