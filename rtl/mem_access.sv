// mem_access: the memory access unit, which prepares the nine operands of
// every 3x3 window a layer needs.
//
// After a start pulse it walks all windows of the selected layer in a fixed
// order, reads the nine operands of each window one per cycle from the image
// memory (conv1) or the intermediate results memory (conv2, fc1, fc2), and
// offers the complete window on win/win_valid. The consumer takes it with
// win_ready; the next window is fetched meanwhile, so a window is produced
// every 10 cycles unless the consumer holds one back.
//
//   conv1: pooled row pr, pooled column pc (0..13), pooling position q
//          (0..3): window centred on image pixel (2pr+q[1], 2pc+q[0]);
//          pixels outside the image read as zero (same-size padding).
//   conv2: pr, pc (0..5), q (0..3), input map (0..1): window with top left
//          corner (2pr+q[1], 2pc+q[0]) of pooled conv1 map 'map' (unpadded).
//   fc1  : neuron j (0..19), group g (0..15): pooled conv2 values 9g..9g+8.
//   fc2  : neuron j (0..9), group g (0..2): fc1 outputs 9g..9g+8, zero
//          beyond the twentieth.
// Inputs are re-read for every neuron of a fully connected layer. Both
// memories have one cycle read latency. win_last marks the layer's last
// window; done pulses for one cycle when that window is taken. The window
// order and the one-read-per-cycle fetch are this design's choices.
module mem_access
  import cnn_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  layer_e              layer,
  output logic [9:0]          img_raddr,
  input  logic [N-1:0]        img_rdata,
  output logic [9:0]          fm_raddr,
  input  logic [N-1:0]        fm_rdata,
  output logic [N-1:0]        win [9],
  output logic                win_valid,
  output logic                win_last,
  input  logic                win_ready,
  output logic                busy,
  output logic                done
);
  layer_e      lay;
  logic        fetching;                 // windows left to fetch
  logic [4:0]  i0, i1;                   // outer counters (row/neuron, column/group)
  logic [1:0]  i2;                       // pooling position
  logic        i3;                       // conv2 input map
  logic [3:0]  k;                        // operand being read, 9 = window complete
  logic        cap_q, pad_q;
  logic [3:0]  capk;
  logic [N-1:0] stage [9];
  logic [N-1:0] fill  [9];

  // ------------------------------------------------------------------
  // loop limits and end-of-loop flags
  logic [4:0] lim0, lim1;
  logic [1:0] lim2;
  logic       lim3;
  always_comb begin
    unique case (lay)
      L_CONV1: begin lim0 = 5'd13; lim1 = 5'd13; lim2 = 2'd3; lim3 = 1'b0; end
      L_CONV2: begin lim0 = 5'd5;  lim1 = 5'd5;  lim2 = 2'd3; lim3 = 1'b1; end
      L_FC1:   begin lim0 = 5'd19; lim1 = 5'd15; lim2 = 2'd0; lim3 = 1'b0; end
      default: begin lim0 = 5'd9;  lim1 = 5'd2;  lim2 = 2'd0; lim3 = 1'b0; end
    endcase
  end
  logic last_win;
  assign last_win = (i0 == lim0) && (i1 == lim1) && (i2 == lim2) && (i3 == lim3);

  // ------------------------------------------------------------------
  // address of operand k of the current window
  logic [1:0]        kr, kc;
  logic signed [6:0] pr, pc;             // pixel coordinates (may be -1 or 28)
  logic [9:0]        addr;
  logic              pad;
  logic [5:0]        fidx;
  always_comb begin
    kr   = 2'((k >= 4'd6) ? 2 : (k >= 4'd3) ? 1 : 0);
    kc   = 2'(k - 4'(kr) * 4'd3);
    pr   = 7'sd0;
    pc   = 7'sd0;
    fidx = 6'd0;
    addr = '0;
    pad  = 1'b0;
    unique case (lay)
      L_CONV1: begin
        pr   = 7'(2 * i0 + i2[1] + kr) - 7'sd1;
        pc   = 7'(2 * i1 + i2[0] + kc) - 7'sd1;
        pad  = (pr < 0) || (pr >= 7'sd28) || (pc < 0) || (pc >= 7'sd28);
        addr = pad ? '0 : 10'(pr * IMG_DIM + pc);
      end
      L_CONV2: begin
        pr   = 7'(2 * i0 + i2[1] + kr);
        pc   = 7'(2 * i1 + i2[0] + kc);
        addr = 10'(P1_BASE + i3 * (P1_DIM * P1_DIM) + pr * P1_DIM + pc);
      end
      L_FC1: begin
        addr = 10'(P2_BASE + 9 * i1 + k);
      end
      default: begin
        fidx = 6'(9 * i1 + k);
        pad  = fidx >= 6'(FC1_OUT);
        addr = pad ? '0 : 10'(F1_BASE + fidx);
      end
    endcase
  end
  assign img_raddr = addr;
  assign fm_raddr  = addr;

  // window as it stands after this cycle's capture
  always_comb begin
    for (int j = 0; j < 9; j++) fill[j] = stage[j];
    if (cap_q) fill[capk] = pad_q ? '0 : ((lay == L_CONV1) ? img_rdata : fm_rdata);
  end

  logic slot_free, take;
  assign slot_free = !win_valid || win_ready;
  assign take      = win_valid && win_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lay       <= L_CONV1;
      fetching  <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      {i0, i1, i2, i3} <= '0;
      k         <= '0;
      cap_q     <= 1'b0;
      pad_q     <= 1'b0;
      capk      <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
      for (int j = 0; j < 9; j++) begin
        stage[j] <= '0;
        win[j]   <= '0;
      end
    end else begin
      done  <= take && win_last;
      cap_q <= 1'b0;
      for (int j = 0; j < 9; j++) stage[j] <= fill[j];
      if (take) begin
        win_valid <= 1'b0;
        win_last  <= 1'b0;
        if (win_last) busy <= 1'b0;
      end

      if (start && !busy) begin
        lay      <= layer;
        fetching <= 1'b1;
        busy     <= 1'b1;
        {i0, i1, i2, i3} <= '0;
        k        <= '0;
      end else if (fetching) begin
        if (k < 4'd9) begin
          cap_q <= 1'b1;
          capk  <= k;
          pad_q <= pad;
          k     <= k + 4'd1;
        end else if (slot_free) begin
          for (int j = 0; j < 9; j++) win[j] <= fill[j];
          win_valid <= 1'b1;
          win_last  <= last_win;
          k         <= '0;
          if (last_win) fetching <= 1'b0;
          // advance i3 (innermost) .. i0
          if (i3 != lim3) i3 <= 1'b1;
          else begin
            i3 <= 1'b0;
            if (i2 != lim2) i2 <= i2 + 2'd1;
            else begin
              i2 <= '0;
              if (i1 != lim1) i1 <= i1 + 5'd1;
              else begin
                i1 <= '0;
                i0 <= i0 + 5'd1;
              end
            end
          end
        end
      end
    end
  end

  // a window on offer stays stable until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (win_valid && !win_ready) |=> win_valid;
  endproperty
  a_hold: assert property (p_hold);
endmodule
