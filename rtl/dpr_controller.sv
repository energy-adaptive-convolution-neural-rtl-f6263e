// dpr_controller: picks the bitwidth design that the battery can afford and
// drives the partial reconfiguration of the accelerator's partition.
//
// The accelerator exists as NUM_RM reconfigurable modules, one per bitwidth
// (16, 12, 10, 8, 7, 6, 5 bits); lower bitwidths need less energy per image
// at a small loss of accuracy. The battery level (an LW-bit code) is compared
// with THRESH: module i is wanted when THRESH[i] is the first threshold the
// level reaches, so a full battery runs 16 bits and an almost empty one
// 5 bits. When the wanted module differs from the loaded one and the
// accelerator is idle, the controller
//   1. raises rp_decouple, isolating the partition from the static logic,
//   2. asks the processing system for partial bit-stream cfg_rm (cfg_req
//      held high until cfg_done; the processor copies the bit-stream from
//      DDR to the configuration port),
//   3. holds the partition in reset (rp_rst_n low) for RST_CYCLES cycles,
//   4. records the new module in cur_rm and releases the partition.
// rp_ready is high only while no reconfiguration is due or running; the top
// accepts a new image only then. Module selection by battery level follows
// the source system; the thresholds, the decoupling and the reset step are
// this design's choices. After reset the module loaded with the full
// bit-stream, INIT_RM, is assumed present.
module dpr_controller #(
  parameter int NUM_RM     = 7,
  parameter int LW         = 8,
  parameter int RST_CYCLES = 4,
  parameter int INIT_RM    = 0,
  parameter logic [LW-1:0] THRESH [NUM_RM] = '{8'd224, 8'd192, 8'd160, 8'd128, 8'd96, 8'd64, 8'd0},
  parameter logic [4:0]    BITS   [NUM_RM] = '{5'd16, 5'd12, 5'd10, 5'd8, 5'd7, 5'd6, 5'd5}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LW-1:0]             battery_level,
  input  logic                      cnn_busy,
  output logic                      cfg_req,
  output logic [$clog2(NUM_RM)-1:0] cfg_rm,
  input  logic                      cfg_done,
  output logic                      rp_decouple,
  output logic                      rp_rst_n,
  output logic                      rp_ready,
  output logic [$clog2(NUM_RM)-1:0] cur_rm,
  output logic [4:0]                cur_bits,
  output logic [15:0]               n_reconfig
);
  localparam int RW = $clog2(NUM_RM);

  typedef enum logic [1:0] {D_IDLE, D_DECOUPLE, D_CONFIG, D_RESET} dstate_e;
  dstate_e          state;
  logic [RW-1:0]    want;
  logic [LW-1:0]    level_q;
  logic [$clog2(RST_CYCLES+1)-1:0] rcnt;

  // first threshold the level reaches
  always_comb begin
    want = RW'(NUM_RM - 1);
    for (int i = NUM_RM - 1; i >= 0; i--)
      if (level_q >= THRESH[i]) want = RW'(i);
  end

  assign rp_ready = (state == D_IDLE) && (want == cur_rm);
  assign cur_bits = BITS[cur_rm];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= D_IDLE;
      level_q     <= '1;
      cur_rm      <= RW'(INIT_RM);
      cfg_rm      <= RW'(INIT_RM);
      cfg_req     <= 1'b0;
      rp_decouple <= 1'b0;
      rp_rst_n    <= 1'b1;
      rcnt        <= '0;
      n_reconfig  <= '0;
    end else begin
      level_q <= battery_level;
      unique case (state)
        D_IDLE: if (want != cur_rm && !cnn_busy) begin
          state       <= D_DECOUPLE;
          rp_decouple <= 1'b1;
          cfg_rm      <= want;
        end
        D_DECOUPLE: begin
          state   <= D_CONFIG;
          cfg_req <= 1'b1;
        end
        D_CONFIG: if (cfg_done) begin
          state    <= D_RESET;
          cfg_req  <= 1'b0;
          rp_rst_n <= 1'b0;
          rcnt     <= '0;
        end
        D_RESET: begin
          rcnt <= rcnt + 1'b1;
          if (int'(rcnt) == RST_CYCLES - 1) begin
            state       <= D_IDLE;
            rp_rst_n    <= 1'b1;
            rp_decouple <= 1'b0;
            cur_rm      <= cfg_rm;
            n_reconfig  <= n_reconfig + 16'd1;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // a bit-stream is only requested with the partition isolated, and a
  // request is held until the processing system answers
  a_cfg_iso:  assert property (@(posedge clk) disable iff (!rst_n) cfg_req |-> rp_decouple);
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (cfg_req && !cfg_done) |=> cfg_req);
endmodule
