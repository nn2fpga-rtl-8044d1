// tb_resblock_ds: end-to-end test of the downsampling residual block at reduced size
// (4 to 6 channels, 6x12 to 3x6 pixels).
//
// Loads random parameters (conv0 then the merged 1x1 conv2 on one stream,
// conv1 on the other), streams FRAMES random frames back to back, the first
// half with random input gaps and output back-pressure, the rest at full
// rate, and compares every output with an integer model of
//   s  = requant(b2 + conv2_1x1_stride2(x))                      (signed)
//   y0 = relu(requant(b0 + conv0_stride2(pad(x))))
//   y  = relu(requant(b1 + s*2^SKIP_SHIFT + conv1(pad(y0))))
// It counts the mechanisms and fails if one never happened: Loop Merge
// results (one conv2 beat per conv0 beat), skip values used to start conv1's
// sums, windows held until the parameters are in, input back-pressure,
// output stalls and overlapping frames. At full rate the frame period must
// be close to OH*OW*(OCH/PAR)^2 cycles (conv1, the slower task; plus the
// padding beats and about one row lost at each frame boundary) and the skip
// FIFO must never hold back conv0.
// Model loop bounds are run-time variables so that the simulator compiles
// the loops instead of unrolling them.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_resblock_ds;
  import nn2fpga_pkg::*;
  localparam int ICH = 4, OCH = 6, IH = 6, IW = 12, FH = 3, FW = 3, PAR = 2;
  localparam int OH = IH / 2, OW = IW / 2;
  localparam int SH0 = 8, SH1 = 8, SH2 = 8, SSH = 8;
  localparam int FRAMES = 4, K = FH * FW, ICB = ICH / PAR, OCB = OCH / PAR;
  localparam int PERIOD = OH * OW * OCB * OCB;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic par0_valid, par0_ready, par1_valid, par1_ready, loaded;
  par_t par0_data, par1_data;
  logic in_valid, in_ready, out_valid, out_ready;
  act_t in_data [PAR];
  act_t out_data [PAR];

  resblock_ds #(.ICH(ICH), .OCH(OCH), .IH(IH), .IW(IW), .SHIFT0(SH0), .SHIFT1(SH1), .SHIFT2(SH2), .SKIP_SHIFT(SSH)) dut (.*);

  always #5 clk = ~clk;

  wgt_t W0 [OCH][ICH][K];
  wgt_t W1 [OCH][OCH][K];
  wgt_t W2 [OCH][ICH];
  par_t B0 [OCH];
  par_t B1 [OCH];
  par_t B2 [OCH];
  act_t X  [FRAMES][IH][IW][ICH];
  act_t Y0 [OH][OW][OCH];
  act_t S  [OH][OW][OCH];
  act_t Y  [FRAMES][OH][OW][OCH];
  par_t pl0 [$];
  par_t pl1 [$];
  int n_par0 = 0, n_par1 = 0, n_in = 0, n_out = 0, cyc = 0;
  int t_frame_end [FRAMES];
  bit fast = 0;
  int c_in_stall = 0, c_out_stall = 0, c_merge = 0, c_skip_add = 0, c_skip_full = 0;
  int c_early = 0, c_param_wait = 0, c_back_to_back = 0;

  int n_ich, n_och, n_k, n_ih, n_iw, n_oh, n_ow;

  function automatic longint rq(longint acc, int sh, bit relu);
    longint r;
    r = (acc + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > 127) r = 127;
    if (r < (relu ? 0 : -128)) r = relu ? 0 : -128;
    return r;
  endfunction

  task automatic model();
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < n_oh; r++) for (int c = 0; c < n_ow; c++) for (int o = 0; o < n_och; o++) begin
        longint acc, a2;
        acc = B0[o];
        a2  = B2[o];
        for (int i = 0; i < n_ich; i++) begin
          for (int t = 0; t < n_k; t++) begin
            int rr, cc;
            rr = 2 * r + t / FW - FH / 2; cc = 2 * c + t % FW - FW / 2;
            if (rr >= 0 && rr < n_ih && cc >= 0 && cc < n_iw)
              acc += longint'(W0[o][i][t]) * longint'(X[f][rr][cc][i]);
          end
          a2 += longint'(W2[o][i]) * longint'(X[f][2*r][2*c][i]);
        end
        Y0[r][c][o] = act_t'(rq(acc, SH0, 1));
        S[r][c][o]  = act_t'(rq(a2, SH2, 0));
      end
      for (int r = 0; r < n_oh; r++) for (int c = 0; c < n_ow; c++) for (int o = 0; o < n_och; o++) begin
        longint acc;
        acc = longint'(B1[o]) + (longint'(S[r][c][o]) <<< SSH);
        for (int i = 0; i < n_och; i++) for (int t = 0; t < n_k; t++) begin
          int rr, cc;
          rr = r + t / FW - FH / 2; cc = c + t % FW - FW / 2;
          if (rr >= 0 && rr < n_oh && cc >= 0 && cc < n_ow)
            acc += longint'(W1[o][i][t]) * longint'(Y0[rr][cc][i]);
        end
        Y[f][r][c][o] = act_t'(rq(acc, SH1, 1));
      end
    end
  endtask

  always_comb begin
    int f, r, c, b;
    f = n_in / (IH * IW * ICB);
    r = (n_in / (IW * ICB)) % IH;
    c = (n_in / ICB) % IW;
    b = n_in % ICB;
    for (int p = 0; p < PAR; p++) in_data[p] = (f < FRAMES) ? X[f][r][c][b*PAR+p] : '0;
    par0_data = (n_par0 < pl0.size()) ? pl0[n_par0] : '0;
    par1_data = (n_par1 < pl1.size()) ? pl1[n_par1] : '0;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (par0_valid && par0_ready) n_par0 <= n_par0 + 1;
    if (par1_valid && par1_ready) n_par1 <= n_par1 + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
    if (rst_n) begin
      if (dut.u_conv0.pw_valid && dut.u_conv0.pw_ready) c_merge <= c_merge + 1;
      if (dut.u_conv1.skip_valid && dut.u_conv1.skip_ready) c_skip_add <= c_skip_add + 1;
      if (fast && dut.u_conv0.pw_valid && !dut.u_conv0.pw_ready) c_skip_full <= c_skip_full + 1;
      if (dut.u_conv0.win_valid && dut.u_conv0.win_ready && !dut.u_conv0.loaded) c_early <= c_early + 1;
      if (dut.u_conv0.win_valid && !dut.u_conv0.loaded) c_param_wait <= c_param_wait + 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_ich = ICH; n_och = OCH; n_k = K; n_ih = IH; n_iw = IW; n_oh = OH; n_ow = OW;
    foreach (W0[o, i, t]) W0[o][i][t] = wgt_t'($urandom);
    foreach (W1[o, i, t]) W1[o][i][t] = wgt_t'($urandom);
    foreach (W2[o, i]) W2[o][i] = wgt_t'($urandom);
    foreach (B0[o]) B0[o] = par_t'(int'($urandom_range(0, 4000)) - 1000);
    foreach (B1[o]) B1[o] = par_t'(int'($urandom_range(0, 4000)) - 2000);
    foreach (B2[o]) B2[o] = par_t'(int'($urandom_range(0, 2000)) - 1000);
    foreach (X[f, r, c, ch]) X[f][r][c][ch] = act_t'($urandom);
    for (int og = 0; og < OCB; og++) for (int ig = 0; ig < ICB; ig++)
      for (int o = 0; o < PAR; o++) for (int i = 0; i < PAR; i++) for (int t = 0; t < K; t++)
        pl0.push_back(par_t'(W0[og*PAR+o][ig*PAR+i][t]));
    foreach (B0[o]) pl0.push_back(B0[o]);
    for (int og = 0; og < OCB; og++) for (int ig = 0; ig < ICB; ig++)
      for (int o = 0; o < PAR; o++) for (int i = 0; i < PAR; i++)
        pl0.push_back(par_t'(W2[og*PAR+o][ig*PAR+i]));
    foreach (B2[o]) pl0.push_back(B2[o]);
    for (int og = 0; og < OCB; og++) for (int ig = 0; ig < OCB; ig++)
      for (int o = 0; o < PAR; o++) for (int i = 0; i < PAR; i++) for (int t = 0; t < K; t++)
        pl1.push_back(par_t'(W1[og*PAR+o][ig*PAR+i][t]));
    foreach (B1[o]) pl1.push_back(B1[o]);
    model();

    par0_valid = 0; par1_valid = 0; in_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_out < FRAMES * OH * OW * OCB) begin
      bit slow;
      @(negedge clk);
      slow       = (n_out / (OH * OW * OCB)) < FRAMES / 2;
      fast       = !slow;
      par0_valid = (n_par0 < pl0.size()) && ($urandom_range(0, 3) != 0);
      par1_valid = (n_par1 < pl1.size()) && ($urandom_range(0, 3) != 0);
      in_valid   = (n_in < FRAMES * IH * IW * ICB) && (!slow || $urandom_range(0, 2) != 0);
      out_ready  = !slow || ($urandom_range(0, 3) != 0);
      #1;
      if (in_valid && !in_ready) c_in_stall++;
      if (out_valid && !out_ready) c_out_stall++;
      if (out_valid && out_ready) begin
        int f, r, c, b;
        f = n_out / (OH * OW * OCB);
        r = (n_out / (OW * OCB)) % OH;
        c = (n_out / OCB) % OW;
        b = n_out % OCB;
        for (int p = 0; p < PAR; p++) begin
          checks++;
          if (out_data[p] !== Y[f][r][c][b*PAR+p]) begin
            failures++;
            if (failures < 20)
              $display("FAIL frame %0d (%0d,%0d) ch %0d got %0d exp %0d", f, r, c, b*PAR+p,
                       out_data[p], Y[f][r][c][b*PAR+p]);
          end
        end
        n_out++;
        if (n_out % (OH * OW * OCB) == 0) begin
          t_frame_end[f] = cyc;
          if (n_in > (f + 1) * IH * IW * ICB) c_back_to_back++;
        end
      end
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    $display("mechanisms: input stalls %0d, output stalls %0d, merged conv2 beats %0d,",
             c_in_stall, c_out_stall, c_merge);
    $display("            skip beats added %0d, windows waiting for parameters %0d cycles,",
             c_skip_add, c_param_wait);
    $display("            back-to-back frames %0d, skip FIFO full at full rate %0d cycles",
             c_back_to_back, c_skip_full);
    checks++; if (c_in_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    checks++; if (c_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    checks++;
    if (c_merge != FRAMES * OH * OW * OCB) begin
      failures++; $display("FAIL merged conv2 produced %0d beats", c_merge);
    end
    checks++;
    if (c_skip_add != FRAMES * OH * OW * OCB) begin
      failures++; $display("FAIL merged add used %0d skip beats", c_skip_add);
    end
    checks++; if (c_skip_full != 0) begin failures++; $display("FAIL skip FIFO full"); end
    checks++; if (c_early != 0) begin failures++; $display("FAIL window taken before parameters"); end
    checks++; if (c_param_wait == 0) begin failures++; $display("FAIL no window waited for parameters"); end
    checks++; if (c_back_to_back == 0) begin failures++; $display("FAIL frames never overlapped"); end
    checks++;
    begin
      int per;
      per = t_frame_end[FRAMES-1] - t_frame_end[FRAMES-2];
      $display("full-rate frame period %0d cycles (conv1 at one iteration per cycle: %0d)", per, PERIOD);
      if (per < PERIOD || per > PERIOD + ((OH + 2) * (OW + 2) - OH * OW) * OCB + (OW + 3) * OCB * OCB + 10) begin
        failures++; $display("FAIL frame period");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
