// eeps_cnn_top: energy-adaptive digit recogniser, the static control logic
// of a partially reconfigurable FPGA plus the accelerator in its
// reconfigurable partition.
//
// The partition holds cnn_core built at one bitwidth N; a system offers one
// partial bit-stream per bitwidth (16, 12, 10, 8, 7, 6, 5), each a build of
// this RTL with another N. dpr_controller watches battery_level and, between
// images, has the processing system load the bit-stream that fits the
// remaining energy (cfg_req / cfg_rm / cfg_done). While it does, the
// partition is isolated: its load, start and done signals are gated off,
// and it is held in reset afterwards. cur_bits tells the host which
// bitwidth is loaded, so it can load parameters quantised to match.
//
// Host sequence: wait for rp_ready, load image and parameters (load ports
// as in cnn_core), pulse start, wait for done, read class_idx / scores.
// A start while rp_ready is low is ignored. Timing of one image is that of
// cnn_core (14,239 cycles).
module eeps_cnn_top #(
  parameter int N = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // battery and reconfiguration handshake with the processing system
  input  logic [7:0]          battery_level,
  output logic                cfg_req,
  output logic [2:0]          cfg_rm,
  input  logic                cfg_done,
  output logic                rp_ready,
  output logic [2:0]          cur_rm,
  output logic [4:0]          cur_bits,
  output logic [15:0]         n_reconfig,
  // image and parameter load
  input  logic                img_we,
  input  logic [9:0]          img_waddr,
  input  logic [N-1:0]        img_wdata,
  input  logic                w_we,
  input  logic [8:0]          w_row,
  input  logic [3:0]          w_col,
  input  logic [N-1:0]        w_data,
  input  logic                b_we,
  input  logic [5:0]          b_addr,
  input  logic [N-1:0]        b_data,
  // recognition
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [3:0]          class_idx,
  output logic signed [N-1:0] scores [10],
  output logic [15:0]         cycles
);
  logic rp_decouple, rp_rst_n, cnn_busy, cnn_done;

  dpr_controller #(.NUM_RM(7), .LW(8)) u_dpr (
    .clk, .rst_n, .battery_level, .cnn_busy,
    .cfg_req, .cfg_rm, .cfg_done,
    .rp_decouple, .rp_rst_n, .rp_ready, .cur_rm, .cur_bits, .n_reconfig);

  // decoupler: nothing crosses the partition boundary while it is rewritten
  logic iso;
  assign iso = rp_decouple;

  cnn_core #(.N(N)) u_rp_cnn (
    .clk,
    .rst_n     (rst_n && rp_rst_n),
    .img_we    (img_we && !iso),
    .img_waddr,
    .img_wdata,
    .w_we      (w_we && !iso),
    .w_row, .w_col, .w_data,
    .b_we      (b_we && !iso),
    .b_addr, .b_data,
    .start     (start && rp_ready),
    .busy      (cnn_busy),
    .done      (cnn_done),
    .class_idx, .scores, .cycles);

  assign busy = cnn_busy && !iso;
  assign done = cnn_done && !iso;

  // reconfiguration never starts under a running image
  a_no_cfg_busy: assert property (@(posedge clk) disable iff (!rst_n) rp_decouple |-> !cnn_busy);
endmodule
