// nn2fpga_top: a complete CIFAR-style residual network for 32x32 RGB
// images as one static dataflow accelerator: every layer is its own task
// and all tasks run at once on a stream of frames. NBLK residual blocks per
// stage: 1 gives ResNet8 (the default), 3 gives ResNet20.
//
// Data path (all links are valid/ready streams, depth first):
//   in (IN_CH channels, one per beat)
//    -> pad_insert -> window_buffer -> conv_task   stem 3x3, IN_CH -> CH, ReLU
//    stage 1: NBLK x resblock_top                  CH, IH x IW, Temporal Reuse
//    stage 2: resblock_ds                          CH -> 2CH, stride 2, Loop Merge
//             (NBLK-1) x resblock_top              2CH
//    stage 3: resblock_ds                          2CH -> 4CH, stride 2, Loop Merge
//             (NBLK-1) x resblock_top              4CH
//      (every block but the last followed by a stream_fifo of one row of
//       its output)
//    -> pool_task                                  global average of 4CH channels
//    -> conv_task (1x1, no ReLU)                   fully connected 4CH -> NCLASS
//    -> out (NCLASS signed scores per frame, PAR per beat)
//
// Interface: NPAR = 6*NBLK + 2 parameter streams, one per weight memory:
// stem, then for each block k its first convolution (followed by the
// merged 1x1 convolution in a downsampling block) at 1+2k and its second
// at 2+2k, then the classifier; each in the order given in conv_task. `loaded` rises once all are in;
// windows wait for it, so frames may be streamed in at any time. The input
// stream carries one channel per beat (IN_CH beats per pixel), the other
// links PAR channels per beat.
//
// Timing: every convolution runs one iteration per cycle. The 3x3
// convolutions of all blocks need IH*IW*(CH/PAR)^2 cycles per
// frame (the downsampling blocks halve the pixels and double the channels,
// so the cost stays the same), the stem IH*IW*IN_CH*CH/PAR and the
// classifier 4CH/PAR*NCLASS/PAR; the network is therefore balanced and its
// frame period is set by the 3x3 convolutions. The link FIFOs let adjacent
// blocks that run at the same rate absorb each other's short stalls
// (without them the period grows by almost half). What remains is that at
// each frame boundary every block's second convolution idles for about
// one of its output rows while its first convolution refills its window
// buffer: at the defaults 79.9 k cycles per frame against 65.5 k.
//
// Follows the document: the task types and stream connections, the two
// residual block forms, pooling before a fully connected classifier
// handled as a convolution, parameters streamed in once after reset.
// This design's choice: the layer list and channel widths (ResNet8 and
// ResNet20 as commonly defined, 16/32/64), the equal parallelism PAR in every task, one input channel per
// beat for the stem, and the link FIFOs.
module nn2fpga_top
  import nn2fpga_pkg::*;
#(
  parameter int IN_CH      = 3,
  parameter int CH         = 16,
  parameter int IH         = 32,
  parameter int IW         = 32,
  parameter int NCLASS     = 10,
  parameter int PAR        = 2,
  parameter int PACK       = 2,
  parameter int SHIFT      = 6,
  parameter int SKIP_SHIFT = 6,
  parameter int NBLK       = 1,
  parameter int NPAR       = 6 * NBLK + 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic par_valid [NPAR],
  output logic par_ready [NPAR],
  input  par_t par_data  [NPAR],
  output logic loaded,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output act_t out_data [PAR]
);
  localparam int BEAT_W = PAR * ACT_W;
  localparam int PH     = IH + 2;
  localparam int PW     = IW + 2;

  logic ld [NPAR];

  // ------------------------------------------------------------------ stem
  logic s_pad_valid, s_pad_ready;
  logic [ACT_W-1:0] s_pad_bits;
  act_t s_pad_data [1];

  pad_insert #(.BEAT_W(ACT_W), .ICH_BEATS(IN_CH), .IH(IH), .IW(IW), .PAD(1)) u_stem_pad (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_data),
    .out_valid(s_pad_valid), .out_ready(s_pad_ready), .out_data(s_pad_bits)
  );
  assign s_pad_data[0] = act_t'(s_pad_bits);

  logic s_win_valid, s_win_ready, s_unused_fwd_valid;
  act_t s_win_data [3][3][1];
  act_t s_unused_fwd_data [1];

  window_buffer #(.PAR(1), .ICH(IN_CH), .IH(PH), .IW(PW), .FH(3), .FW(3),
                  .STRIDE(1), .FWD(1'b0)) u_stem_wb (
    .clk, .rst_n, .in_valid(s_pad_valid), .in_ready(s_pad_ready), .in_data(s_pad_data),
    .win_valid(s_win_valid), .win_ready(s_win_ready), .win_data(s_win_data),
    .fwd_valid(s_unused_fwd_valid), .fwd_ready(1'b1), .fwd_data(s_unused_fwd_data)
  );

  logic s_wq_valid, s_wq_ready;
  logic [9*ACT_W-1:0] s_win_bits, s_wq_bits;
  act_t s_wq_data [3][3][1];

  for (genvar k = 0; k < 9; k++) begin : g_stem_win
    assign s_win_bits[k*ACT_W +: ACT_W] = s_win_data[k / 3][k % 3][0];
    assign s_wq_data[k / 3][k % 3][0]   = act_t'(s_wq_bits[k*ACT_W +: ACT_W]);
  end

  stream_fifo #(.WIDTH(9 * ACT_W), .DEPTH(4)) u_stem_win_fifo (
    .clk, .rst_n, .in_valid(s_win_valid), .in_ready(s_win_ready), .in_data(s_win_bits),
    .out_valid(s_wq_valid), .out_ready(s_wq_ready), .out_data(s_wq_bits)
  );

  logic s_out_valid, s_out_ready, s_unused_skip_ready, s_unused_pw_valid;
  act_t s_out_data [PAR];
  act_t s_no_skip [PAR];
  act_t s_unused_pw_data [PAR];
  assign s_no_skip = '{default: '0};

  conv_task #(.ICH(IN_CH), .OCH(CH), .FH(3), .FW(3), .ICH_PAR(1), .OCH_PAR(PAR),
              .PACK(PACK), .OUT_SHIFT(SHIFT), .RELU(1'b1)) u_stem (
    .clk, .rst_n,
    .par_valid(par_valid[0]), .par_ready(par_ready[0]), .par_data(par_data[0]), .loaded(ld[0]),
    .win_valid(s_wq_valid), .win_ready(s_wq_ready), .win_data(s_wq_data),
    .skip_valid(1'b0), .skip_ready(s_unused_skip_ready), .skip_data(s_no_skip),
    .out_valid(s_out_valid), .out_ready(s_out_ready), .out_data(s_out_data),
    .pw_valid(s_unused_pw_valid), .pw_ready(1'b1), .pw_data(s_unused_pw_data)
  );

  // ---------------------------------------------------- residual blocks
  // Block k belongs to stage k / NBLK. The first block of stages 1 and 2
  // downsamples (stride 2, channels doubled, merged 1x1 skip convolution);
  // all others keep size and width and use Temporal Reuse. Every block but
  // the last feeds the next through a link FIFO of one row of its output.
  localparam int NB = 3 * NBLK;

  logic bi_valid [NB];
  logic bi_ready [NB];
  act_t bi_data  [NB][PAR];
  logic bo_valid [NB];
  logic bo_ready [NB];
  act_t bo_data  [NB][PAR];

  assign bi_valid[0]  = s_out_valid;
  assign s_out_ready  = bi_ready[0];
  assign bi_data[0]   = s_out_data;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int STG = k / NBLK;
    localparam int C   = CH << STG;      // output channels of this block
    localparam int H   = IH >> STG;      // output rows
    localparam int W   = IW >> STG;      // output columns

    if (STG > 0 && k % NBLK == 0) begin : g_ds
      resblock_ds #(
        .ICH(C / 2), .OCH(C), .IH(2 * H), .IW(2 * W), .FH(3), .FW(3), .PAR(PAR), .PACK(PACK),
        .SHIFT0(SHIFT), .SHIFT1(SHIFT), .SHIFT2(SHIFT), .SKIP_SHIFT(SKIP_SHIFT)
      ) u_rb (
        .clk, .rst_n,
        .par0_valid(par_valid[1 + 2*k]), .par0_ready(par_ready[1 + 2*k]), .par0_data(par_data[1 + 2*k]),
        .par1_valid(par_valid[2 + 2*k]), .par1_ready(par_ready[2 + 2*k]), .par1_data(par_data[2 + 2*k]),
        .loaded(ld[1 + 2*k]),
        .in_valid(bi_valid[k]), .in_ready(bi_ready[k]), .in_data(bi_data[k]),
        .out_valid(bo_valid[k]), .out_ready(bo_ready[k]), .out_data(bo_data[k])
      );
    end else begin : g_id
      resblock_top #(
        .CH(C), .IH(H), .IW(W), .FH(3), .FW(3), .PAR(PAR), .PACK(PACK),
        .SHIFT0(SHIFT), .SHIFT1(SHIFT), .SKIP_SHIFT(SKIP_SHIFT)
      ) u_rb (
        .clk, .rst_n,
        .par0_valid(par_valid[1 + 2*k]), .par0_ready(par_ready[1 + 2*k]), .par0_data(par_data[1 + 2*k]),
        .par1_valid(par_valid[2 + 2*k]), .par1_ready(par_ready[2 + 2*k]), .par1_data(par_data[2 + 2*k]),
        .loaded(ld[1 + 2*k]),
        .in_valid(bi_valid[k]), .in_ready(bi_ready[k]), .in_data(bi_data[k]),
        .out_valid(bo_valid[k]), .out_ready(bo_ready[k]), .out_data(bo_data[k])
      );
    end
    // Each block reports one `loaded` for both of its parameter streams.
    assign ld[2 + 2*k] = ld[1 + 2*k];

    if (k < NB - 1) begin : g_link
      logic [BEAT_W-1:0] o_bits, l_bits;
      for (genvar p = 0; p < PAR; p++) begin : g_lane
        assign o_bits[p*ACT_W +: ACT_W] = bo_data[k][p];
        assign bi_data[k+1][p] = act_t'(l_bits[p*ACT_W +: ACT_W]);
      end
      stream_fifo #(.WIDTH(BEAT_W), .DEPTH(W * C / PAR)) u_link (
        .clk, .rst_n, .in_valid(bo_valid[k]), .in_ready(bo_ready[k]), .in_data(o_bits),
        .out_valid(bi_valid[k+1]), .out_ready(bi_ready[k+1]), .out_data(l_bits)
      );
    end
  end

  logic c_valid, c_ready;
  act_t c_data [PAR];
  assign c_valid          = bo_valid[NB-1];
  assign bo_ready[NB-1]   = c_ready;
  assign c_data           = bo_data[NB-1];

  // ------------------------------------------------- pooling and classifier
  logic g_valid, g_ready;
  act_t g_data [PAR];

  pool_task #(
    .CH(4 * CH), .PAR(PAR), .IH(IH / 4), .IW(IW / 4), .MODE(POOL_AVG)
  ) u_pool (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(g_valid), .out_ready(g_ready), .out_data(g_data)
  );

  // The classifier is a 1x1 convolution on the single pooled pixel; each
  // pooled beat is its window.
  act_t g_win [1][1][PAR];
  assign g_win[0][0] = g_data;

  logic f_unused_skip_ready, f_unused_pw_valid;
  act_t f_unused_pw_data [PAR];

  conv_task #(.ICH(4 * CH), .OCH(NCLASS), .FH(1), .FW(1), .ICH_PAR(PAR), .OCH_PAR(PAR),
              .PACK(PACK), .OUT_SHIFT(SHIFT), .RELU(1'b0)) u_fc (
    .clk, .rst_n,
    .par_valid(par_valid[NPAR-1]), .par_ready(par_ready[NPAR-1]), .par_data(par_data[NPAR-1]),
    .loaded(ld[NPAR-1]),
    .win_valid(g_valid), .win_ready(g_ready), .win_data(g_win),
    .skip_valid(1'b0), .skip_ready(f_unused_skip_ready), .skip_data(s_no_skip),
    .out_valid, .out_ready, .out_data,
    .pw_valid(f_unused_pw_valid), .pw_ready(1'b1), .pw_data(f_unused_pw_data)
  );

  always_comb begin
    loaded = 1'b1;
    for (int i = 0; i < NPAR; i++) loaded &= ld[i];
  end

endmodule
