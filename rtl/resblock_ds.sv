// resblock_ds: dataflow accelerator for a residual block with downsampling,
// after the Loop Merge and add-merge graph optimisations.
//
// The block computes
//   y = relu(conv1(relu(conv0(x))) + conv2(x))
// where conv0 is a same-padded FH x FW convolution with stride 2 from ICH to
// OCH channels, conv2 the 1x1 stride-2 convolution of the short branch and
// conv1 a same-padded FH x FW stride-1 convolution on OCH channels. The
// output is OCH x IH/2 x IW/2, streamed depth first with PAR channels per
// beat like the input.
//
//   x -> pad0 -> wb0 (stride 2) -> [conv0 + conv2] --y0--> fifo01 -> pad1 -> wb1 -> conv1 -> y
//                                        \--conv2(x)--> skip_fifo ----------------/
//
// Loop Merge: conv2 reads the same windows as conv0 (their centre), so x is
// buffered once; conv0 and conv2 share one loop nest and write their results
// at the same time and rate. conv1 starts each partial sum from the conv2
// value (shifted into accumulator scale) plus its bias, so there is no add
// node. The skip FIFO holds [(FH-1)*OW + FW]*OCH values, the size of conv1's
// window buffer, by the same reasoning as for Temporal Reuse. Parameters
// arrive once after reset: par0_* carries conv0's weights and biases
// followed by conv2's, par1_* conv1's. Padding, ReLU placement (standard
// ResNet), the FIFO depths other than the skip buffer and all widths are this
// design's choices.
module resblock_ds
  import nn2fpga_pkg::*;
#(
  parameter int ICH        = 16,
  parameter int OCH        = 32,
  parameter int IH         = 32,
  parameter int IW         = 32,
  parameter int FH         = 3,
  parameter int FW         = 3,
  parameter int PAR        = 2,
  parameter int PACK       = 2,
  parameter int SHIFT0     = 6,
  parameter int SHIFT1     = 6,
  parameter int SHIFT2     = 6,
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
  localparam int ICB        = ICH / PAR;
  localparam int OCB        = OCH / PAR;
  localparam int PADH       = FH / 2;
  localparam int PADW       = FW / 2;
  localparam int OH         = (IH + 2 * PADH - FH) / 2 + 1;
  localparam int OW         = (IW + 2 * PADW - FW) / 2 + 1;
  localparam int BEAT_W     = PAR * ACT_W;
  localparam int WIN_W      = FH * FW * BEAT_W;
  localparam int SKIP_BEATS = skip_buffer_size(FH, FW, OW, OCH) / PAR;
  // Queued windows so that border shifts of a window buffer overlap with work.
  localparam int WIN_DEPTH  = 4;

  function automatic logic [BEAT_W-1:0] pack(act_t v [PAR]);
    logic [BEAT_W-1:0] r;
    for (int p = 0; p < PAR; p++) r[p*ACT_W +: ACT_W] = v[p];
    return r;
  endfunction

  function automatic logic [WIN_W-1:0] pack_win(act_t v [FH][FW][PAR]);
    logic [WIN_W-1:0] r;
    for (int i = 0; i < FH; i++)
      for (int j = 0; j < FW; j++)
        for (int p = 0; p < PAR; p++) r[((i*FW + j)*PAR + p)*ACT_W +: ACT_W] = v[i][j][p];
    return r;
  endfunction

  // ---------------------------------------------------------------- stage 0
  logic              p0_valid, p0_ready;
  logic [BEAT_W-1:0] p0_bits;
  act_t              p0_data [PAR];

  pad_insert #(.BEAT_W(BEAT_W), .ICH_BEATS(ICB), .IH(IH), .IW(IW), .PAD(PADH)) u_pad0 (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(pack(in_data)),
    .out_valid(p0_valid), .out_ready(p0_ready), .out_data(p0_bits)
  );
  for (genvar p = 0; p < PAR; p++) begin : g_p0
    assign p0_data[p] = act_t'(p0_bits[p*ACT_W +: ACT_W]);
  end

  logic b0_valid, b0_ready, unused_f0_valid;
  act_t b0_data [FH][FW][PAR];
  act_t unused_f0_data [PAR];

  window_buffer #(.PAR(PAR), .ICH(ICH), .IH(IH + 2 * PADH), .IW(IW + 2 * PADW), .FH(FH),
                  .FW(FW), .STRIDE(2), .FWD(1'b0)) u_wb0 (
    .clk, .rst_n, .in_valid(p0_valid), .in_ready(p0_ready), .in_data(p0_data),
    .win_valid(b0_valid), .win_ready(b0_ready), .win_data(b0_data),
    .fwd_valid(unused_f0_valid), .fwd_ready(1'b1), .fwd_data(unused_f0_data)
  );

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
  logic c0_valid, c0_ready, c2_valid, c2_ready;
  act_t c0_data [PAR];
  act_t c2_data [PAR];
  act_t no_skip [PAR];
  logic unused_skip_ready, unused_pw1_valid;
  act_t unused_pw1_data [PAR];
  assign no_skip = '{default: '0};

  conv_task #(.ICH(ICH), .OCH(OCH), .FH(FH), .FW(FW), .ICH_PAR(PAR), .OCH_PAR(PAR),
              .PACK(PACK), .OUT_SHIFT(SHIFT0), .RELU(1'b1), .HAS_SKIP(1'b0),
              .MERGE_PW(1'b1), .PW_SHIFT(SHIFT2)) u_conv0 (
    .clk, .rst_n,
    .par_valid(par0_valid), .par_ready(par0_ready), .par_data(par0_data), .loaded(loaded0),
    .win_valid(w0_valid), .win_ready(w0_ready), .win_data(w0_data),
    .skip_valid(1'b0), .skip_ready(unused_skip_ready), .skip_data(no_skip),
    .out_valid(c0_valid), .out_ready(c0_ready), .out_data(c0_data),
    .pw_valid(c2_valid), .pw_ready(c2_ready), .pw_data(c2_data)
  );

  // ------------------------------------------------------------ skip branch
  logic              s_valid, s_ready;
  logic [BEAT_W-1:0] s_bits;
  act_t              s_data [PAR];

  stream_fifo #(.WIDTH(BEAT_W), .DEPTH(SKIP_BEATS)) u_skip_fifo (
    .clk, .rst_n, .in_valid(c2_valid), .in_ready(c2_ready), .in_data(pack(c2_data)),
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

  pad_insert #(.BEAT_W(BEAT_W), .ICH_BEATS(OCB), .IH(OH), .IW(OW), .PAD(PADH)) u_pad1 (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_bits),
    .out_valid(p1_valid), .out_ready(p1_ready), .out_data(p1_bits)
  );
  for (genvar p = 0; p < PAR; p++) begin : g_p1
    assign p1_data[p] = act_t'(p1_bits[p*ACT_W +: ACT_W]);
  end

  logic b1_valid, b1_ready, unused_f1_valid;
  act_t b1_data [FH][FW][PAR];
  act_t unused_f1_data [PAR];

  window_buffer #(.PAR(PAR), .ICH(OCH), .IH(OH + 2 * PADH), .IW(OW + 2 * PADW), .FH(FH),
                  .FW(FW), .STRIDE(1), .FWD(1'b0)) u_wb1 (
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

  conv_task #(.ICH(OCH), .OCH(OCH), .FH(FH), .FW(FW), .ICH_PAR(PAR), .OCH_PAR(PAR),
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
