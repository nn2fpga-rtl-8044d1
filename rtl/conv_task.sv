// conv_task: convolution computation task of the dataflow accelerator.
//
// Start-up: the task first reads its parameters from par_* (one per beat):
// all weights, then one bias per output channel, and only then takes
// windows. Weight order is output-channel group, input-channel group, then
// inside a group output lane, input lane, filter row, filter column. A
// weight is the low WGT_W bits of a beat, a bias the whole signed beat (it
// is already in accumulator scale). Weights stay in an on-chip array for as
// long as the task runs.
//
// Loop nest, one iteration per cycle: for every output pixel, for every
// input-channel group (ICH_PAR channels, one window from the window buffer),
// for every output-channel group (OCH_PAR filters). An iteration performs
// OCH_PAR x ICH_PAR x FH x FW multiply-adds in OCH_PAR DSP chains
// (dsp_chain, optionally packed) and adds the chain result to the partial
// sum of that output-channel group. The first input-channel group starts a
// partial sum from the bias plus, when HAS_SKIP is set, the skip value of
// the residual branch shifted left by SKIP_SHIFT (the residual add merged
// into the convolution). The last one requantises the sum (requant, with
// ReLU when RELU is set) and writes OCH_PAR activations to out_*. A pixel
// therefore takes (ICH/ICH_PAR)*(OCH/OCH_PAR) cycles and its outputs leave
// in output-channel order. Results appear ICH_PAR*FH*FW + 1 cycles after
// the iteration starts.
//
// MERGE_PW = 1 merges a pointwise (1x1) convolution with the same input,
// stride and output channels into the same pipeline (Loop Merge, used for
// the downsampling convolution of a residual block's short branch). It uses
// the centre activation of each window, so with a same-padded odd filter it
// computes a 1x1 convolution of the unpadded input at the same stride. Its
// weights (output group, input group, output lane, input lane) and biases
// follow the main parameters in the parameter stream; its results, signed
// and requantised by PW_SHIFT, leave on pw_* together with the main outputs.
//
// DEPTHWISE = 1 gives the depthwise variant: each channel has its own
// FH x FW filter, there is no sum across channels and no output-channel
// loop, so OCH must equal ICH and OCH_PAR must equal ICH_PAR; the weights
// are ordered channel, filter row, filter column.
//
// Flow control: the whole pipeline holds when the output register is full
// and not taken, or when a skip value is due and not yet valid. The loop
// order, accumulator buffer, bias start, skip initialisation and chaining
// follow the document; the handshake, the parameter order and the widths
// are this design's choice. Output-width parallelism (ow_par) is fixed at 1.
module conv_task
  import nn2fpga_pkg::*;
#(
  parameter int ICH        = 16,
  parameter int OCH        = 16,
  parameter int FH         = 3,
  parameter int FW         = 3,
  parameter int ICH_PAR    = 2,
  parameter int OCH_PAR    = 2,
  parameter int PACK       = 2,
  parameter bit DEPTHWISE  = 1'b0,
  parameter int OUT_SHIFT  = 6,
  parameter bit RELU       = 1'b1,
  parameter bit HAS_SKIP   = 1'b0,
  parameter int SKIP_SHIFT = 6,
  parameter bit MERGE_PW   = 1'b0,
  parameter int PW_SHIFT   = 6
) (
  input  logic clk,
  input  logic rst_n,
  // parameters, streamed once after reset
  input  logic par_valid,
  output logic par_ready,
  input  par_t par_data,
  output logic loaded,
  // input windows
  input  logic win_valid,
  output logic win_ready,
  input  act_t win_data [FH][FW][ICH_PAR],
  // skip values of the residual branch (ignored unless HAS_SKIP)
  input  logic skip_valid,
  output logic skip_ready,
  input  act_t skip_data [OCH_PAR],
  // output activations
  output logic out_valid,
  input  logic out_ready,
  output act_t out_data [OCH_PAR],
  // merged pointwise (1x1) convolution on the window centre (MERGE_PW)
  output logic pw_valid,
  input  logic pw_ready,
  output act_t pw_data [OCH_PAR]
);
  localparam int K       = FH * FW;
  localparam int IG      = ICH / ICH_PAR;
  localparam int OG      = DEPTHWISE ? 1 : OCH / OCH_PAR;
  localparam int WPW     = DEPTHWISE ? ICH_PAR * K : OCH_PAR * ICH_PAR * K;
  localparam int NW      = IG * OG * WPW;
  localparam int NB      = OCH;
  localparam int PWN     = MERGE_PW ? IG * OG * OCH_PAR * ICH_PAR : 1;  // pointwise weights
  localparam int PWB     = MERGE_PW ? OCH : 1;                          // pointwise biases
  localparam int NPAR    = NW + NB + (MERGE_PW ? PWN + PWB : 0);
  localparam int CHAIN_N = DEPTHWISE ? K : ICH_PAR * K;
  localparam int NGRP    = DEPTHWISE ? IG : OG;
  localparam int GW      = (NGRP > 1) ? $clog2(NGRP) : 1;
  localparam int IGW     = (IG > 1) ? $clog2(IG) : 1;
  localparam int OGW     = (OG > 1) ? $clog2(OG) : 1;
  localparam int LW      = $clog2(NPAR + 1);

  initial begin
    assert (ICH % ICH_PAR == 0 && OCH % OCH_PAR == 0)
      else $error("conv_task: unroll factors must divide the channel counts");
    assert (!DEPTHWISE || (ICH == OCH && ICH_PAR == OCH_PAR))
      else $error("conv_task: depthwise needs OCH == ICH and OCH_PAR == ICH_PAR");
    assert (!(DEPTHWISE && MERGE_PW))
      else $error("conv_task: loop merge is only defined for standard convolutions");
  end

  // ---------------------------------------------------------------- parameters
  wgt_t wmem [NW];
  acc_t bmem [NB];
  wgt_t pwmem [PWN];
  acc_t pbmem [PWB];
  logic [LW-1:0] load_cnt;

  assign par_ready = !loaded;

  always_ff @(posedge clk) begin
    if (par_valid && par_ready) begin
      if (load_cnt < LW'(NW))           wmem[load_cnt]                <= wgt_t'(par_data[WGT_W-1:0]);
      else if (load_cnt < LW'(NW + NB)) bmem[load_cnt - NW]           <= ACC_W'(par_data);
      else if (load_cnt < LW'(NW + NB + PWN)) pwmem[load_cnt - NW - NB] <= wgt_t'(par_data[WGT_W-1:0]);
      else                              pbmem[load_cnt - NW - NB - PWN] <= ACC_W'(par_data);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_cnt <= '0;
      loaded   <= 1'b0;
    end else if (par_valid && par_ready) begin
      load_cnt <= load_cnt + 1'b1;
      if (load_cnt == LW'(NPAR - 1)) loaded <= 1'b1;
    end
  end

  // --------------------------------------------------------------- front end
  logic            en;
  logic            have_win;
  act_t            win_q [FH][FW][ICH_PAR];
  logic [IGW-1:0]  ig;
  logic [OGW-1:0]  og;
  logic            issue;

  assign issue     = have_win;
  assign win_ready = loaded && en && (!have_win || og == OGW'(OG - 1));

  always_ff @(posedge clk) begin
    if (win_valid && win_ready) win_q <= win_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_win <= 1'b0;
      ig       <= '0;
      og       <= '0;
    end else if (en) begin
      if (issue) begin
        if (og == OGW'(OG - 1)) begin
          og <= '0;
          ig <= (ig == IGW'(IG - 1)) ? '0 : ig + 1'b1;
        end else begin
          og <= og + 1'b1;
        end
      end
      if (win_valid && win_ready) have_win <= 1'b1;
      else if (issue && og == OGW'(OG - 1)) have_win <= 1'b0;
    end
  end

  // Weight word and activations of the iteration being issued.
  logic [$clog2(IG*OG+1)-1:0] waddr;
  assign waddr = DEPTHWISE ? ig : og * IG + ig;

  // Iteration tags travel alongside the chains.
  logic [GW-1:0] grp_now;
  logic          first_now, last_now;
  assign grp_now   = DEPTHWISE ? GW'(ig) : GW'(og);
  assign first_now = DEPTHWISE || (ig == '0);
  assign last_now  = DEPTHWISE || (ig == IGW'(IG - 1));

  logic          chain_valid;
  acc_t          chain_sum [OCH_PAR];

  if (DEPTHWISE) begin : g_dw
    logic [ICH_PAR-1:0] v;
    for (genvar i = 0; i < ICH_PAR; i++) begin : g_ch
      act_t a [K];
      wgt_t w [1][K];
      acc_t s [1];
      for (genvar t = 0; t < K; t++) begin : g_t
        assign a[t]    = win_q[t / FW][t % FW][i];
        assign w[0][t] = wmem[waddr * WPW + i * K + t];
      end
      dsp_chain #(.N(K), .LANES(1), .PACK(1)) u_chain (
        .clk, .rst_n, .en, .in_valid(issue), .a, .w, .out_valid(v[i]), .sum(s)
      );
      assign chain_sum[i] = s[0];
    end
    assign chain_valid = v[0];
  end else begin : g_std
    act_t a [CHAIN_N];
    wgt_t w [OCH_PAR][CHAIN_N];
    for (genvar i = 0; i < ICH_PAR; i++) begin : g_i
      for (genvar t = 0; t < K; t++) begin : g_t
        assign a[i*K + t] = win_q[t / FW][t % FW][i];
        for (genvar o = 0; o < OCH_PAR; o++) begin : g_o
          assign w[o][i*K + t] = wmem[waddr * WPW + (o * ICH_PAR + i) * K + t];
        end
      end
    end
    dsp_chain #(.N(CHAIN_N), .LANES(OCH_PAR), .PACK(PACK)) u_chain (
      .clk, .rst_n, .en, .in_valid(issue), .a, .w, .out_valid(chain_valid), .sum(chain_sum)
    );
  end

  logic [GW-1:0] grp_d   [CHAIN_N];
  logic          first_d [CHAIN_N];
  logic          last_d  [CHAIN_N];
  always_ff @(posedge clk) begin
    if (en) begin
      grp_d[0]   <= grp_now;
      first_d[0] <= first_now;
      last_d[0]  <= last_now;
      for (int i = 1; i < CHAIN_N; i++) begin
        grp_d[i]   <= grp_d[i-1];
        first_d[i] <= first_d[i-1];
        last_d[i]  <= last_d[i-1];
      end
    end
  end

  // ---------------------------------------------------- merged pointwise conv
  // Loop Merge: a 1x1 convolution reading the same windows (their centre
  // activation) runs in the same loop nest, with its own weights, partial
  // sums and requantiser. Its chain is ICH_PAR stages long; its sums are
  // delayed to line up with the main chain's.
  acc_t pw_sum [OCH_PAR];
  if (MERGE_PW) begin : g_pw
    localparam int DLY = CHAIN_N - ICH_PAR;
    act_t pa [ICH_PAR];
    wgt_t pw [OCH_PAR][ICH_PAR];
    acc_t ps [OCH_PAR];
    logic pv;
    for (genvar i = 0; i < ICH_PAR; i++) begin : g_i
      assign pa[i] = win_q[FH/2][FW/2][i];
      for (genvar o = 0; o < OCH_PAR; o++) begin : g_o
        assign pw[o][i] = pwmem[waddr * (OCH_PAR * ICH_PAR) + o * ICH_PAR + i];
      end
    end
    dsp_chain #(.N(ICH_PAR), .LANES(OCH_PAR), .PACK(PACK)) u_pw_chain (
      .clk, .rst_n, .en, .in_valid(issue), .a(pa), .w(pw), .out_valid(pv), .sum(ps)
    );
    if (DLY > 0) begin : g_dly
      acc_t pd [DLY][OCH_PAR];
      always_ff @(posedge clk) begin
        if (en) begin
          pd[0] <= ps;
          for (int d = 1; d < DLY; d++) pd[d] <= pd[d-1];
        end
      end
      assign pw_sum = pd[DLY-1];
    end else begin : g_nodly
      assign pw_sum = ps;
    end
  end else begin : g_no_pw
    assign pw_sum = '{default: '0};
  end

  // ---------------------------------------------------------------- end stage
  logic [GW-1:0] e_grp;
  logic          e_first, e_last, need_skip;
  acc_t          acc_buf [NGRP][OCH_PAR];
  acc_t          total   [OCH_PAR];
  act_t          q       [OCH_PAR];

  assign e_grp     = grp_d[CHAIN_N-1];
  assign e_first   = first_d[CHAIN_N-1];
  assign e_last    = last_d[CHAIN_N-1];
  assign need_skip = HAS_SKIP && chain_valid && e_first;
  assign en        = (!out_valid || out_ready) && (!MERGE_PW || !pw_valid || pw_ready) &&
                     !(need_skip && !skip_valid);
  assign skip_ready = en && need_skip;

  for (genvar o = 0; o < OCH_PAR; o++) begin : g_lane
    acc_t base, skip_term;
    assign skip_term = HAS_SKIP ? (ACC_W'(skip_data[o]) <<< SKIP_SHIFT) : '0;
    assign base      = e_first ? bmem[e_grp * OCH_PAR + o] + skip_term : acc_buf[e_grp][o];
    assign total[o]  = base + chain_sum[o];
    requant #(.IN_W(ACC_W), .OUT_W(ACT_W), .SHIFT(OUT_SHIFT), .RELU(RELU)) u_rq (
      .acc(total[o]), .q(q[o])
    );
  end

  always_ff @(posedge clk) begin
    if (en && chain_valid) begin
      acc_buf[e_grp] <= total;
      if (e_last) out_data <= q;
    end
  end

  if (MERGE_PW) begin : g_pw_end
    acc_t pw_acc [NGRP][OCH_PAR];
    acc_t pw_total [OCH_PAR];
    act_t pq [OCH_PAR];
    for (genvar o = 0; o < OCH_PAR; o++) begin : g_lane
      assign pw_total[o] = (e_first ? pbmem[e_grp * OCH_PAR + o] : pw_acc[e_grp][o]) + pw_sum[o];
      requant #(.IN_W(ACC_W), .OUT_W(ACT_W), .SHIFT(PW_SHIFT), .RELU(1'b0)) u_rq (
        .acc(pw_total[o]), .q(pq[o])
      );
    end
    always_ff @(posedge clk) begin
      if (en && chain_valid) begin
        pw_acc[e_grp] <= pw_total;
        if (e_last) pw_data <= pq;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pw_valid <= 1'b0;
      else if (en && chain_valid && e_last) pw_valid <= 1'b1;
      else if (pw_ready) pw_valid <= 1'b0;
    end
  end else begin : g_no_pw_end
    assign pw_valid = 1'b0;
    assign pw_data  = '{default: '0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (en && chain_valid && e_last) out_valid <= 1'b1;
    else if (out_ready) out_valid <= 1'b0;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data[0]));

endmodule
