// resblock_top: dataflow accelerator for one residual block without
// downsampling, after the Temporal Reuse and add-merge graph optimisations.
//
// The block computes y = relu(conv1(relu(conv0(x))) + x) on a CH x IH x IW
// tensor streamed depth first, PAR channels per beat, with same-padded
// FH x FW convolutions. Every node is a concurrent task joined by streams:
//
//   x -> pad0 -> wb0 --windows--> conv0 (ReLU) -> fifo01 -> pad1 -> wb1
//                    \--forwarded x--> skip_fifo ------------------\
//                                      wb1 --windows--> conv1 (+skip, ReLU) -> y
//
// There is no separate add node and no second copy of x at the block
// input: window buffer 0 re-emits each activation of x once its window
// comes up (Temporal Reuse), and conv1 starts the partial sums of an output
// pixel from that value (shifted into accumulator scale) plus the bias. The
// skip FIFO is sized by [(FH-1)*IW + FW]*CH activations, the skip buffering
// that remains after Temporal Reuse. Parameters of both convolutions are
// loaded through par0_* and par1_* once after reset (in the system they
// come from DDR through a DMA); images then stream through continuously,
// one frame after the other, and the block runs at one convolution
// iteration per cycle, (CH/PAR)^2 cycles per pixel, in each task.
//
// The structure follows the document's optimised residual block; padding,
// the FIFO depths other than the skip buffer, the ReLU after the merged add
// (standard ResNet) and all widths are this design's choices.
module resblock_top
  import nn2fpga_pkg::*;
#(
  parameter int CH         = 16,
  parameter int IH         = 32,
  parameter int IW         = 32,
  parameter int FH         = 3,
  parameter int FW         = 3,
  parameter int PAR        = 2,
  parameter int PACK       = 2,
  parameter int SHIFT0     = 6,
  parameter int SHIFT1     = 6,
  parameter int SKIP_SHIFT = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic par0_valid,
  output logic par0_ready,
  input  par_t par0_data,
  input  logic par1_valid,
  output logic par1_ready,
  input  par_t par1_data,
  output logic loaded,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data [PAR],
  output logic out_valid,
  input  logic out_ready,
  output act_t out_data [PAR]
);
  localparam int CB        = CH / PAR;
  localparam int PADH      = FH / 2;
  localparam int PADW      = FW / 2;
  localparam int PH        = IH + 2 * PADH;
  localparam int PW        = IW + 2 * PADW;
  localparam int BEAT_W    = PAR * ACT_W;
  localparam int SKIP_BEATS = skip_buffer_size(FH, FW, IW, CH) / PAR;

  localparam int WIN_W     = FH * FW * BEAT_W;
  // Enough queued windows to keep a convolution busy while its window
  // buffer shifts the 3*CB beats between the last window of a row and the
  // first of the next (right pad, left pad, first column).
  localparam int WIN_DEPTH = max_int(2, (3 * CB + CB - 1) / CB + 1);

  function automatic logic [WIN_W-1:0] pack_win(act_t v [FH][FW][PAR]);
    logic [WIN_W-1:0] r;
    for (int i = 0; i < FH; i++)
      for (int j = 0; j < FW; j++)
        for (int p = 0; p < PAR; p++) r[((i*FW + j)*PAR + p)*ACT_W +: ACT_W] = v[i][j][p];
    return r;
  endfunction

  function automatic logic [BEAT_W-1:0] pack(act_t v [PAR]);
    logic [BEAT_W-1:0] r;
    for (int p = 0; p < PAR; p++) r[p*ACT_W +: ACT_W] = v[p];
    return r;
  endfunction

  // ---------------------------------------------------------------- stage 0
  logic              p0_valid, p0_ready;
  logic [BEAT_W-1:0] p0_bits;
  act_t              p0_data [PAR];

  pad_insert #(.BEAT_W(BEAT_W), .ICH_BEATS(CB), .IH(IH), .IW(IW), .PAD(PADH)) u_pad0 (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(pack(in_data)),
    .out_valid(p0_valid), .out_ready(p0_ready), .out_data(p0_bits)
  );
  for (genvar p = 0; p < PAR; p++) begin : g_p0
    assign p0_data[p] = act_t'(p0_bits[p*ACT_W +: ACT_W]);
  end

  logic b0_valid, b0_ready, f0_valid, f0_ready;
  act_t b0_data [FH][FW][PAR];
  act_t f0_data [PAR];

  window_buffer #(.PAR(PAR), .ICH(CH), .IH(PH), .IW(PW), .FH(FH), .FW(FW),
                  .STRIDE(1), .FWD(1'b1)) u_wb0 (
    .clk, .rst_n, .in_valid(p0_valid), .in_ready(p0_ready), .in_data(p0_data),
    .win_valid(b0_valid), .win_ready(b0_ready), .win_data(b0_data),
    .fwd_valid(f0_valid), .fwd_ready(f0_ready), .fwd_data(f0_data)
  );

  // Window stream between the window-buffer task and the convolution task.
  logic             w0_valid, w0_ready;
  logic [WIN_W-1:0] w0_bits;
  act_t             w0_data [FH][FW][PAR];

  stream_fifo #(.WIDTH(WIN_W), .DEPTH(WIN_DEPTH)) u_win_fifo0 (
    .clk, .rst_n, .in_valid(b0_valid), .in_ready(b0_ready), .in_data(pack_win(b0_data)),
    .out_valid(w0_valid), .out_ready(w0_ready), .out_data(w0_bits)
  );
  for (genvar k = 0; k < FH * FW * PAR; k++) begin : g_w0
    assign w0_data[k / (FW*PAR)][(k / PAR) % FW][k % PAR] = act_t'(w0_bits[k*ACT_W +: ACT_W]);
  end

  logic loaded0, loaded1;
  logic c0_valid, c0_ready;
  act_t c0_data [PAR];
  act_t no_skip [PAR];
  logic unused_skip_ready, unused_pw0_valid, unused_pw1_valid;
  act_t unused_pw0_data [PAR];
  act_t unused_pw1_data [PAR];
  assign no_skip = '{default: '0};

  conv_task #(.ICH(CH), .OCH(CH), .FH(FH), .FW(FW), .ICH_PAR(PAR), .OCH_PAR(PAR),
              .PACK(PACK), .OUT_SHIFT(SHIFT0), .RELU(1'b1), .HAS_SKIP(1'b0)) u_conv0 (
    .clk, .rst_n,
    .par_valid(par0_valid), .par_ready(par0_ready), .par_data(par0_data), .loaded(loaded0),
    .win_valid(w0_valid), .win_ready(w0_ready), .win_data(w0_data),
    .skip_valid(1'b0), .skip_ready(unused_skip_ready), .skip_data(no_skip),
    .out_valid(c0_valid), .out_ready(c0_ready), .out_data(c0_data),
    .pw_valid(unused_pw0_valid), .pw_ready(1'b1), .pw_data(unused_pw0_data)
  );

  // ------------------------------------------------------------ skip branch
  logic              s_valid, s_ready;
  logic [BEAT_W-1:0] s_bits;
  act_t              s_data [PAR];

  stream_fifo #(.WIDTH(BEAT_W), .DEPTH(SKIP_BEATS)) u_skip_fifo (
    .clk, .rst_n, .in_valid(f0_valid), .in_ready(f0_ready), .in_data(pack(f0_data)),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_bits)
  );
  for (genvar p = 0; p < PAR; p++) begin : g_s
    assign s_data[p] = act_t'(s_bits[p*ACT_W +: ACT_W]);
  end

  // ---------------------------------------------------------------- stage 1
  logic              q_valid, q_ready, p1_valid, p1_ready;
  logic [BEAT_W-1:0] q_bits, p1_bits;
  act_t              p1_data [PAR];

  stream_fifo #(.WIDTH(BEAT_W), .DEPTH(4)) u_fifo01 (
    .clk, .rst_n, .in_valid(c0_valid), .in_ready(c0_ready), .in_data(pack(c0_data)),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_bits)
  );

  pad_insert #(.BEAT_W(BEAT_W), .ICH_BEATS(CB), .IH(IH), .IW(IW), .PAD(PADH)) u_pad1 (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_bits),
    .out_valid(p1_valid), .out_ready(p1_ready), .out_data(p1_bits)
  );
  for (genvar p = 0; p < PAR; p++) begin : g_p1
    assign p1_data[p] = act_t'(p1_bits[p*ACT_W +: ACT_W]);
  end

  logic b1_valid, b1_ready, unused_f1_valid;
  act_t b1_data [FH][FW][PAR];
  act_t unused_f1_data [PAR];

  window_buffer #(.PAR(PAR), .ICH(CH), .IH(PH), .IW(PW), .FH(FH), .FW(FW),
                  .STRIDE(1), .FWD(1'b0)) u_wb1 (
    .clk, .rst_n, .in_valid(p1_valid), .in_ready(p1_ready), .in_data(p1_data),
    .win_valid(b1_valid), .win_ready(b1_ready), .win_data(b1_data),
    .fwd_valid(unused_f1_valid), .fwd_ready(1'b1), .fwd_data(unused_f1_data)
  );

  logic             w1_valid, w1_ready;
  logic [WIN_W-1:0] w1_bits;
  act_t             w1_data [FH][FW][PAR];

  stream_fifo #(.WIDTH(WIN_W), .DEPTH(WIN_DEPTH)) u_win_fifo1 (
    .clk, .rst_n, .in_valid(b1_valid), .in_ready(b1_ready), .in_data(pack_win(b1_data)),
    .out_valid(w1_valid), .out_ready(w1_ready), .out_data(w1_bits)
  );
  for (genvar k = 0; k < FH * FW * PAR; k++) begin : g_w1
    assign w1_data[k / (FW*PAR)][(k / PAR) % FW][k % PAR] = act_t'(w1_bits[k*ACT_W +: ACT_W]);
  end

  conv_task #(.ICH(CH), .OCH(CH), .FH(FH), .FW(FW), .ICH_PAR(PAR), .OCH_PAR(PAR),
              .PACK(PACK), .OUT_SHIFT(SHIFT1), .RELU(1'b1), .HAS_SKIP(1'b1),
              .SKIP_SHIFT(SKIP_SHIFT)) u_conv1 (
    .clk, .rst_n,
    .par_valid(par1_valid), .par_ready(par1_ready), .par_data(par1_data), .loaded(loaded1),
    .win_valid(w1_valid), .win_ready(w1_ready), .win_data(w1_data),
    .skip_valid(s_valid), .skip_ready(s_ready), .skip_data(s_data),
    .out_valid, .out_ready, .out_data,
    .pw_valid(unused_pw1_valid), .pw_ready(1'b1), .pw_data(unused_pw1_data)
  );

  assign loaded = loaded0 && loaded1;

endmodule
