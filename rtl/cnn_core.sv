// cnn_core: the EEPS-CNN-1 accelerator, one handwritten-digit image in, the
// recognised digit out, all arithmetic in N-bit fixed point.
//
// Network: conv1 (2 filters 3x3, padded) -> ReLU -> 2x2 maxpool -> conv2
// (4 filters 3x3, unpadded, filters 0,1 on pooled map 0 and 2,3 on map 1)
// -> ReLU -> maxpool -> fc1 (144 -> 20) -> ReLU -> fc2 (20 -> 10) ->
// comparator. Layer sizes, activations, pooling and the integer widths of the
// layer outputs (M_C1..M_F2) follow the source network; the grouped conv2,
// the input format M_IN and the weight format M_W are this design's choices.
//
// Datapath: mem_access streams 3x3 windows (nine operands) out of the image
// memory or the intermediate results memory; compute_unit multiplies them by
// a nine-weight row of weight_mem and sums the products in 2N bits; an add2
// accumulator adds the bias and, in the fully connected layers, the window
// sums of one neuron; the 2N-bit result keeps its top N bits, passes the
// ReLU unit, and is either parked in reg_file (conv outputs waiting for
// pooling, the ten class scores) or, after maxpool4, stored in the
// intermediate memory. argmax10 picks the class at the end.
//
// Interface: load the image (img_we, 784 words, row major) and the
// parameters (w_we by row/column, b_we by index; layout in cnn_pkg) while
// idle, then pulse start. busy is high until done pulses; class_idx, scores
// and cycles (start-to-done clock count) are then valid and held.
//
// Timing: a window is produced every 10 cycles and every layer waits for the
// previous one to be stored, so one image takes 14,239 cycles
// (784 + 288 + 320 + 30 windows). The source design reports 13,715 cycles;
// its schedule is not described, this one is this design's own.
module cnn_core
  import cnn_pkg::*;
#(
  parameter int N    = 16,
  parameter int M_IN = 0,   // integer bits of the input pixels
  parameter int M_W  = 1,   // integer bits of weights and biases
  parameter int M_C1 = 4,   // integer bits of conv1 outputs
  parameter int M_C2 = 5,   // integer bits of conv2 outputs
  parameter int M_F1 = 6,   // integer bits of fc1 outputs
  parameter int M_F2 = 8    // integer bits of fc2 outputs
) (
  input  logic               clk,
  input  logic               rst_n,
  // image load
  input  logic               img_we,
  input  logic [9:0]         img_waddr,
  input  logic [N-1:0]       img_wdata,
  // parameter load
  input  logic               w_we,
  input  logic [8:0]         w_row,
  input  logic [3:0]         w_col,
  input  logic [N-1:0]       w_data,
  input  logic               b_we,
  input  logic [5:0]         b_addr,
  input  logic [N-1:0]       b_data,
  // control and result
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [3:0]         class_idx,
  output logic signed [N-1:0] scores [10],
  output logic [15:0]        cycles
);
  localparam int W = 2 * N;

  localparam logic signed [5:0] PS_C1 = 6'(prod_shift(M_IN, M_W, M_C1));
  localparam logic signed [5:0] PS_C2 = 6'(prod_shift(M_C1, M_W, M_C2));
  localparam logic signed [5:0] PS_F1 = 6'(prod_shift(M_C2, M_W, M_F1));
  localparam logic signed [5:0] PS_F2 = 6'(prod_shift(M_F1, M_W, M_F2));
  localparam logic signed [5:0] BS_C1 = 6'(bias_shift(N, M_W, M_C1));
  localparam logic signed [5:0] BS_C2 = 6'(bias_shift(N, M_W, M_C2));
  localparam logic signed [5:0] BS_F1 = 6'(bias_shift(N, M_W, M_F1));
  localparam logic signed [5:0] BS_F2 = 6'(bias_shift(N, M_W, M_F2));

  // arithmetic shift by s (right if s >= 0, left with clamping if s < 0)
  function automatic logic signed [W-1:0] align(logic signed [W-1:0] v, logic signed [5:0] s);
    logic signed [W-1:0] r;
    logic                sat;
    r   = v;
    sat = 1'b0;
    if (s >= 0) begin
      r = v >>> s;
    end else begin
      for (int i = 0; i < 32; i++) begin
        if (i < -int'(s)) begin
          if (r[W-1] != r[W-2]) sat = 1'b1;
          r = r <<< 1;
        end
      end
      if (sat) r = v[W-1] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    end
    return r;
  endfunction

  // ------------------------------------------------------------------
  // memories
  logic [9:0]   img_raddr, fm_raddr, fm_waddr;
  logic [N-1:0] img_rdata, fm_rdata, fm_wdata;
  logic         fm_we;

  sync_ram #(.W(N), .DEPTH(IMG_WORDS), .AW(10)) u_img_mem (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(img_raddr), .rdata(img_rdata));

  sync_ram #(.W(N), .DEPTH(FM_WORDS), .AW(10)) u_fmap_mem (
    .clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata),
    .raddr(fm_raddr), .rdata(fm_rdata));

  logic [8:0]   rd_row;
  logic [5:0]   rd_bias_addr;
  logic [N-1:0] rd_w [9];
  logic [N-1:0] rd_bias;

  weight_mem #(.N(N), .ROWS(W_ROWS), .NBIAS(N_BIAS)) u_weight_mem (
    .clk, .w_we, .w_row, .w_col, .w_data, .b_we, .b_addr, .b_data,
    .rd_row, .rd_w, .rd_bias_addr, .rd_bias);

  // ------------------------------------------------------------------
  // memory access unit
  layer_e       layer;
  logic         ma_start, ma_done, ma_busy;
  logic [N-1:0] win [9];
  logic         win_valid, win_last, win_ready;

  mem_access #(.N(N)) u_mem_access (
    .clk, .rst_n, .start(ma_start), .layer,
    .img_raddr, .img_rdata, .fm_raddr, .fm_rdata,
    .win, .win_valid, .win_last, .win_ready, .busy(ma_busy), .done(ma_done));

  // ------------------------------------------------------------------
  // sequencer
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  // consumer counters, in the order mem_access produces windows
  logic [4:0] c0, c1;     // pooled row / neuron, pooled column / group
  logic [1:0] c2;         // pooling position
  logic       c3;         // conv2 input map
  logic       op;         // filter of the pair computed from one conv window
  logic       is_conv, last_op;
  logic [4:0] lim0, lim1;
  logic [1:0] lim2;
  logic       lim3;

  always_comb begin
    unique case (layer)
      L_CONV1: begin lim0 = 5'd13; lim1 = 5'd13; lim2 = 2'd3; lim3 = 1'b0; end
      L_CONV2: begin lim0 = 5'd5;  lim1 = 5'd5;  lim2 = 2'd3; lim3 = 1'b1; end
      L_FC1:   begin lim0 = 5'd19; lim1 = 5'd15; lim2 = 2'd0; lim3 = 1'b0; end
      default: begin lim0 = 5'd9;  lim1 = 5'd2;  lim2 = 2'd0; lim3 = 1'b0; end
    endcase
  end

  assign is_conv   = (layer == L_CONV1) || (layer == L_CONV2);
  assign last_op   = is_conv ? op : 1'b1;
  logic issue;
  assign issue     = (state == S_RUN) && win_valid;
  assign win_ready = issue && last_op;

  // what the operation issued this cycle is (its tag travels with the sum)
  typedef struct packed {
    layer_e     layer;
    logic [1:0] filt;
    logic [1:0] q;
    logic       first;
    logic       last;
    logic [4:0] j;
    logic [9:0] waddr;
    logic [5:0] bias_addr;
  } tag_t;

  tag_t             tag_now, tag;
  logic [1:0]       filt;
  logic signed [5:0] pshift;

  always_comb begin
    filt   = (layer == L_CONV2) ? {c3, op} : {1'b0, op};
    rd_row = '0;
    pshift = PS_C1;
    tag_now = '0;
    tag_now.layer = layer;
    tag_now.filt  = filt;
    tag_now.q     = c2;
    tag_now.j     = c0;
    tag_now.first = is_conv || (c1 == 5'd0);
    tag_now.last  = is_conv || (c1 == lim1);
    unique case (layer)
      L_CONV1: begin
        rd_row            = 9'(WROW_C1 + filt);
        pshift            = PS_C1;
        tag_now.waddr     = 10'(P1_BASE + filt * (P1_DIM * P1_DIM) + c0 * P1_DIM + c1);
        tag_now.bias_addr = 6'(BIAS_C1 + filt);
      end
      L_CONV2: begin
        rd_row            = 9'(WROW_C2 + filt);
        pshift            = PS_C2;
        tag_now.waddr     = 10'(P2_BASE + filt * (P2_DIM * P2_DIM) + c0 * P2_DIM + c1);
        tag_now.bias_addr = 6'(BIAS_C2 + filt);
      end
      L_FC1: begin
        rd_row            = 9'(WROW_F1 + c0 * FC1_GRP + c1);
        pshift            = PS_F1;
        tag_now.waddr     = 10'(F1_BASE + c0);
        tag_now.bias_addr = 6'(BIAS_F1 + c0);
      end
      default: begin
        rd_row            = 9'(WROW_F2 + c0 * FC2_GRP + c1);
        pshift            = PS_F2;
        tag_now.waddr     = '0;
        tag_now.bias_addr = 6'(BIAS_F2 + c0);
      end
    endcase
  end

  // ------------------------------------------------------------------
  // computation unit
  logic signed [W-1:0] sum;
  logic                sum_valid;
  logic signed [N-1:0] xs [9];
  logic signed [N-1:0] ws [9];
  always_comb begin
    for (int k = 0; k < 9; k++) begin
      xs[k] = win[k];
      ws[k] = rd_w[k];
    end
  end

  compute_unit #(.N(N)) u_compute (
    .clk, .rst_n, .en(issue), .x(xs), .w(ws), .pshift, .sum, .valid(sum_valid));

  // ------------------------------------------------------------------
  // accumulate, truncate, activate, pool, store
  logic signed [W-1:0] acc, acc_in, acc_new, bias_al;
  logic signed [N-1:0] res_n, res_act, pooled;
  logic signed [N-1:0] rf_q [16];
  logic signed [N-1:0] pool_in [4];
  logic                rf_we;
  logic [3:0]          rf_waddr;
  logic signed [5:0]   bshift;

  assign rd_bias_addr = tag.bias_addr;

  always_comb begin
    unique case (tag.layer)
      L_CONV1: bshift = BS_C1;
      L_CONV2: bshift = BS_C2;
      L_FC1:   bshift = BS_F1;
      default: bshift = BS_F2;
    endcase
    bias_al = align(W'(signed'(rd_bias)), bshift);
    acc_in  = tag.first ? bias_al : acc;
  end

  add2 #(.W(W)) u_acc_add (.a(acc_in), .b(sum), .y(acc_new));

  assign res_n = acc_new[W-1:N];   // keep the top N bits: 2N-bit -> N-bit format

  logic signed [N-1:0] res_act_relu;
  relu #(.N(N)) u_relu (.d(res_n), .y(res_act_relu));
  assign res_act = (tag.layer == L_FC2) ? res_n : res_act_relu;

  always_comb begin
    for (int i = 0; i < 3; i++) pool_in[i] = rf_q[{tag.filt, 2'(i)}];
    pool_in[3] = res_act;
  end
  maxpool4 #(.N(N)) u_maxpool (.d(pool_in), .y(pooled));

  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = '0;
    fm_we    = 1'b0;
    fm_waddr = tag.waddr;
    fm_wdata = res_act;
    if (sum_valid && tag.last) begin
      unique case (tag.layer)
        L_CONV1, L_CONV2: begin
          rf_we    = 1'b1;
          rf_waddr = {tag.filt, tag.q};
          fm_we    = (tag.q == 2'd3);
          fm_wdata = pooled;
        end
        L_FC1: fm_we = 1'b1;
        default: begin
          rf_we    = 1'b1;
          rf_waddr = tag.j[3:0];
        end
      endcase
    end
  end

  reg_file #(.N(N), .DEPTH(16)) u_reg_file (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(res_act), .q(rf_q));

  logic [3:0]          cls;
  logic signed [N-1:0] cls_val;
  logic signed [N-1:0] fc2_out [10];
  always_comb for (int i = 0; i < 10; i++) fc2_out[i] = rf_q[i];
  argmax10 #(.N(N)) u_argmax (.d(fc2_out), .idx(cls), .max_val(cls_val));

  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      layer     <= L_CONV1;
      ma_start  <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      class_idx <= '0;
      cycles    <= '0;
      {c0, c1, c2, c3, op} <= '0;
      tag       <= '0;
      acc       <= '0;
      for (int i = 0; i < 10; i++) scores[i] <= '0;
    end else begin
      ma_start <= 1'b0;
      done     <= 1'b0;
      if (busy) cycles <= cycles + 16'd1;
      if (issue) tag <= tag_now;
      if (sum_valid && !tag.last) acc <= acc_new;

      // consumer counters
      if (issue) begin
        if (!last_op) op <= 1'b1;
        else begin
          op <= 1'b0;
          if (c3 != lim3) c3 <= 1'b1;
          else begin
            c3 <= 1'b0;
            if (c2 != lim2) c2 <= c2 + 2'd1;
            else begin
              c2 <= '0;
              if (c1 != lim1) c1 <= c1 + 5'd1;
              else begin
                c1 <= '0;
                c0 <= (c0 == lim0) ? 5'd0 : c0 + 5'd1;
              end
            end
          end
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          layer    <= L_CONV1;
          ma_start <= 1'b1;
          busy     <= 1'b1;
          cycles   <= 16'd1;
          {c0, c1, c2, c3, op} <= '0;
        end
        S_RUN: if (ma_done) state <= S_DRAIN;
        S_DRAIN: begin
          if (layer == L_FC2) begin
            state     <= S_IDLE;
            busy      <= 1'b0;
            done      <= 1'b1;
            class_idx <= cls;
            for (int i = 0; i < 10; i++) scores[i] <= fc2_out[i];
          end else begin
            state    <= S_RUN;
            layer    <= layer_e'(layer + 2'd1);
            ma_start <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the consumer counters reach the end of the layer exactly when the
  // memory access unit hands over its last window
  a_last_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                 win_ready |-> (win_last == ((c0 == lim0) && (c1 == lim1) && (c2 == lim2) && (c3 == lim3))));

  // the memory access unit is only started when idle
  a_ma_start: assert property (@(posedge clk) disable iff (!rst_n) ma_start |-> !ma_busy);
endmodule
