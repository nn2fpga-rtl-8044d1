// window_buffer: line buffer that turns a depth-first activation stream into
// FH x FW input windows, with a second output stream for Temporal Reuse.
//
// The buffer is one long FIFO cut into FH*FW chained segments (delay_line).
// Segment 0 holds the newest beat; a segment ends every ICH_BEATS beats
// inside a window row and every ICH_BEATS*(IW-FW+1) beats between rows, so
// the FH*FW segment heads are exactly the activations of one window, all of
// the same channel group. Together the segments hold
// [(FH-1)*IW + FW - 1]*ICH_BEATS + 1 beats. One beat (PAR channels) is shifted
// in per accepted input. After a shift whose newest beat is at row r >= FH-1,
// column c >= FW-1 (and on the stride grid), the heads form a window that is
// offered on win_* until taken. win_data[i][j] is window row i, column j
// (row 0 top, column 0 left), each PAR channels wide.
//
// Temporal Reuse (FWD = 1): every time a window is offered, the beat at the
// window centre is also offered on fwd_*. With a same-padded input this
// re-emits every real activation once, in stream order and at the rate of
// the convolution's output, so a later convolution can add it as the skip
// value without a second copy of the tensor being buffered. The document
// forwards an activation once the buffer has finished with it; taking it at
// the centre tap gives the same order with less delay and also flushes at
// the end of a frame, and is this design's reading.
//
// The input is stalled while an offered window or forwarded beat has not
// been taken. Parallelism over the output width (several windows at once)
// is not provided: one window per shift.
module window_buffer
  import nn2fpga_pkg::*;
#(
  parameter int PAR    = 2,    // channels per beat (ich_par)
  parameter int ICH    = 16,
  parameter int IH     = 34,   // rows of the (already padded) input
  parameter int IW     = 34,   // columns of the (already padded) input
  parameter int FH     = 3,
  parameter int FW     = 3,
  parameter int STRIDE = 1,
  parameter bit FWD    = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data [PAR],
  output logic win_valid,
  input  logic win_ready,
  output act_t win_data [FH][FW][PAR],
  output logic fwd_valid,
  input  logic fwd_ready,
  output act_t fwd_data [PAR]
);
  localparam int CB     = ICH / PAR;
  localparam int NSEG   = FH * FW;
  localparam int BEAT_W = PAR * ACT_W;

  logic [BEAT_W-1:0] seg_in  [NSEG];
  logic [BEAT_W-1:0] seg_out [NSEG];
  logic              shift;

  for (genvar p = 0; p < PAR; p++) begin : g_pack
    assign seg_in[0][p*ACT_W +: ACT_W] = in_data[p];
  end

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    if (k > 0) begin : g_link
      assign seg_in[k] = seg_out[k-1];
    end
    delay_line #(.WIDTH(BEAT_W), .DEPTH(segment_depth(k, FW, IW, CB))) u_seg (
      .clk, .rst_n, .en(shift), .d(seg_in[k]), .q(seg_out[k])
    );
    // Head k is window position (FH-1 - k/FW, FW-1 - k%FW).
    for (genvar p = 0; p < PAR; p++) begin : g_tap
      assign win_data[FH-1-k/FW][FW-1-k%FW][p] = act_t'(seg_out[k][p*ACT_W +: ACT_W]);
    end
  end

  for (genvar p = 0; p < PAR; p++) begin : g_fwd
    assign fwd_data[p] = win_data[FH/2][FW/2][p];
  end

  // Position of the next beat to be shifted in.
  logic [$clog2(CB+1)-1:0] cb;
  logic [$clog2(IW+1)-1:0] col;
  logic [$clog2(IH+1)-1:0] row;
  logic                    window_pos;

  assign window_pos = (row >= FH - 1) && (col >= FW - 1) &&
                      (((row - (FH - 1)) % STRIDE) == 0) &&
                      (((col - (FW - 1)) % STRIDE) == 0);

  assign in_ready = (!win_valid || win_ready) && (!fwd_valid || fwd_ready);
  assign shift    = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cb        <= '0;
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      fwd_valid <= 1'b0;
    end else begin
      if (win_valid && win_ready) win_valid <= 1'b0;
      if (fwd_valid && fwd_ready) fwd_valid <= 1'b0;
      if (shift) begin
        win_valid <= window_pos;
        fwd_valid <= FWD && window_pos;
        if (cb == CB - 1) begin
          cb <= '0;
          if (col == IW - 1) begin
            col <= '0;
            row <= (row == IH - 1) ? '0 : row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end else begin
          cb <= cb + 1'b1;
        end
      end
    end
  end

  // An offered window stays put until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   win_valid && !win_ready |=> win_valid && $stable(win_data[0][0][0]));

endmodule
