// tb_nn2fpga_top: end-to-end test of the whole network (ResNet8 layout)
// at reduced size: 4, 8 and 16 channels, 8x16 pixels in, 4 classes.
//
// Loads random parameters into all weight memories through their
// parameter streams, streams FRAMES random images back to back (the first
// half with random input gaps and output back-pressure, the rest at full
// rate) and compares every class score with an integer model of the
// network: stem 3x3 convolution with ReLU; three stages of NBLK residual
// blocks each,
//   relu(rq(b1 + x*2^SKIP_SHIFT + conv1(relu(rq(b0 + conv0(x))))));
// except the first block of stages 2 and 3, which downsamples:
//   relu(rq(b1 + rq(b2 + conv2_1x1_s2(x))*2^SKIP_SHIFT + conv1(relu(rq(b0 + conv0_s2(x))))));
// global average pooling rounded to nearest; a fully connected layer
// without ReLU. All 3x3 convolutions use zero padding of one pixel.
// It counts each mechanism of the design and fails if one never happened:
// windows held until the parameters are in (and none taken early),
// Temporal Reuse (skip beats forwarded by block 1's first window buffer),
// the merged residual add in the first block of every stage, Loop Merge
// in both downsampling blocks, input back-pressure, output stalls and frames
// overlapping in the pipeline. At full rate the frame period must lie
// between IH*IW*(CH/PAR)^2 cycles (each 3x3 convolution at one iteration
// per cycle) and that plus the padding beats plus one output row of
// iterations of each block's second convolution (IW*(CH/PAR)^2 in the
// first stage, twice and four times that in the second and third:
// 7*NBLK*IW*(CH/PAR)^2 in all), which each block loses at a frame boundary
// while its first convolution refills its window buffer.
// Model loop bounds are run-time values (dynamic arrays) so that the
// simulator compiles the loops instead of unrolling them.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_nn2fpga_top;
  import nn2fpga_pkg::*;
  localparam int IN_CH = 3, CH = 4, IH = 8, IW = 16, NCLASS = 4, PAR = 2;
  localparam int NBLK = 1, NB = 3 * NBLK, NPAR = 6 * NBLK + 2;
  localparam int SH = 8, SSH = 8;
  localparam int FRAMES = 4, CB = CH / PAR, NCB = NCLASS / PAR;
  localparam int PERIOD = IH * IW * CB * CB;
  localparam int PAR_START = 10 * IW * IN_CH;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic par_valid [NPAR];
  logic par_ready [NPAR];
  par_t par_data [NPAR];
  logic loaded, in_valid, in_ready, out_valid, out_ready;
  act_t in_data;
  act_t out_data [PAR];

  nn2fpga_top #(.CH(CH), .IH(IH), .IW(IW), .NCLASS(NCLASS), .SHIFT(SH), .SKIP_SHIFT(SSH)) dut (.*);

  always #5 clk = ~clk;

  typedef int vec_t[];
  // Layer weights: index ((o*ICH + i)*K + t), biases per output channel.
  vec_t W [NPAR];
  vec_t B [NPAR];
  vec_t W2 [NPAR];   // merged 1x1 weights of the downsampling blocks
  vec_t B2 [NPAR];
  vec_t X [FRAMES];
  int   P [FRAMES][NCLASS];
  par_t pl [NPAR][$];
  int n_par [NPAR];
  int n_in = 0, n_out = 0, cyc = 0;
  int t_frame_end [FRAMES];
  bit fast = 0;
  int c_in_stall = 0, c_out_stall = 0, c_fwd = 0, c_skip1 = 0, c_skip2 = 0, c_skip3 = 0;
  int c_merge2 = 0, c_merge3 = 0, c_early = 0, c_param_wait = 0, c_back_to_back = 0;

  function automatic int rq(longint acc, int sh, bit relu);
    longint r;
    r = (acc + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > 127) r = 127;
    if (r < (relu ? 0 : -128)) r = relu ? 0 : -128;
    return int'(r);
  endfunction

  // Convolution of x (h x w x ich, depth first) with a k x k filter,
  // zero padding k/2, the given stride; optional skip tensor added at
  // accumulator start, shifted by SSH.
  function automatic vec_t conv(vec_t x, int h, int w, int ich, int och, int k, int stride,
                                vec_t wt, vec_t b, bit relu, vec_t skip, bit has_skip);
    vec_t y;
    int oh, ow;
    oh = h / stride; ow = w / stride;
    y = new[oh * ow * och];
    for (int r = 0; r < oh; r++) for (int c = 0; c < ow; c++) for (int o = 0; o < och; o++) begin
      longint acc;
      acc = b[o];
      if (has_skip) acc += longint'(skip[(r * ow + c) * och + o]) <<< SSH;
      for (int i = 0; i < ich; i++) for (int t = 0; t < k * k; t++) begin
        int rr, cc;
        rr = stride * r + t / k - k / 2; cc = stride * c + t % k - k / 2;
        if (rr >= 0 && rr < h && cc >= 0 && cc < w)
          acc += longint'(wt[(o * ich + i) * k * k + t]) * longint'(x[(rr * w + cc) * ich + i]);
      end
      y[(r * ow + c) * och + o] = rq(acc, SH, relu);
    end
    return y;
  endfunction

  function automatic vec_t rand_vec(int n, int lo, int hi);
    vec_t v;
    v = new[n];
    foreach (v[i]) v[i] = int'($urandom_range(0, hi - lo)) + lo;
    return v;
  endfunction

  // Parameter words of one conv_task: weights (og, ig, o, i, t), biases.
  task automatic push_conv(int s, vec_t wt, vec_t b, int ich, int och, int k, int ipar);
    for (int og = 0; og < och / PAR; og++) for (int ig = 0; ig < ich / ipar; ig++)
      for (int o = 0; o < PAR; o++) for (int i = 0; i < ipar; i++) for (int t = 0; t < k * k; t++)
        pl[s].push_back(par_t'(wt[((og * PAR + o) * ich + ig * ipar + i) * k * k + t]));
    foreach (b[o]) pl[s].push_back(par_t'(b[o]));
  endtask

  task automatic model();
    vec_t none;
    for (int f = 0; f < FRAMES; f++) begin
      vec_t x, g;
      int c, h, w, npx;
      x = conv(X[f], IH, IW, IN_CH, CH, 3, 1, W[0], B[0], 1, none, 0);
      c = CH; h = IH; w = IW;
      for (int k = 0; k < NB; k++) begin
        vec_t y0, sk;
        int s0, s1;
        s0 = 1 + 2 * k; s1 = 2 + 2 * k;
        if (k > 0 && k % NBLK == 0) begin
          y0 = conv(x, h, w, c, 2 * c, 3, 2, W[s0], B[s0], 1, none, 0);
          sk = conv(x, h, w, c, 2 * c, 1, 2, W2[s0], B2[s0], 0, none, 0);
          c = 2 * c; h = h / 2; w = w / 2;
        end else begin
          y0 = conv(x, h, w, c, c, 3, 1, W[s0], B[s0], 1, none, 0);
          sk = x;
        end
        x = conv(y0, h, w, c, c, 3, 1, W[s1], B[s1], 1, sk, 1);
      end
      npx = h * w;
      g = new[c];
      foreach (g[o]) begin
        longint sum;
        sum = 0;
        for (int p = 0; p < npx; p++) sum += x[p * c + o];
        g[o] = int'((sum + npx / 2) / npx);
      end
      x = conv(g, 1, 1, c, NCLASS, 1, 1, W[NPAR-1], B[NPAR-1], 0, none, 0);
      for (int o = 0; o < NCLASS; o++) P[f][o] = x[o];
    end
  endtask

  always_comb begin
    int f, r;
    f = n_in / (IH * IW * IN_CH);
    r = n_in % (IH * IW * IN_CH);
    in_data = (f < FRAMES) ? act_t'(X[f][r]) : '0;
    for (int s = 0; s < NPAR; s++) par_data[s] = (n_par[s] < pl[s].size()) ? pl[s][n_par[s]] : '0;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int s = 0; s < NPAR; s++) if (par_valid[s] && par_ready[s]) n_par[s] <= n_par[s] + 1;
    if (in_valid && in_ready) n_in <= n_in + 1;
    if (rst_n) begin
      if (dut.g_blk[0].g_id.u_rb.u_wb0.fwd_valid && dut.g_blk[0].g_id.u_rb.u_wb0.fwd_ready) c_fwd <= c_fwd + 1;
      if (dut.g_blk[0].g_id.u_rb.u_conv1.skip_valid && dut.g_blk[0].g_id.u_rb.u_conv1.skip_ready) c_skip1 <= c_skip1 + 1;
      if (dut.g_blk[NBLK].g_ds.u_rb.u_conv1.skip_valid && dut.g_blk[NBLK].g_ds.u_rb.u_conv1.skip_ready) c_skip2 <= c_skip2 + 1;
      if (dut.g_blk[2*NBLK].g_ds.u_rb.u_conv1.skip_valid && dut.g_blk[2*NBLK].g_ds.u_rb.u_conv1.skip_ready) c_skip3 <= c_skip3 + 1;
      if (dut.g_blk[NBLK].g_ds.u_rb.u_conv0.pw_valid && dut.g_blk[NBLK].g_ds.u_rb.u_conv0.pw_ready) c_merge2 <= c_merge2 + 1;
      if (dut.g_blk[2*NBLK].g_ds.u_rb.u_conv0.pw_valid && dut.g_blk[2*NBLK].g_ds.u_rb.u_conv0.pw_ready) c_merge3 <= c_merge3 + 1;
      if (dut.u_stem.win_valid && dut.u_stem.win_ready && !dut.u_stem.loaded) c_early <= c_early + 1;
      if (dut.u_stem.win_valid && !dut.u_stem.loaded) c_param_wait <= c_param_wait + 1;
    end
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ich [NPAR], och [NPAR], kk [NPAR];
    begin
      int c;
      c = CH;
      ich[0] = IN_CH; och[0] = CH; kk[0] = 3;
      for (int k = 0; k < NB; k++) begin
        bit ds;
        ds = (k > 0 && k % NBLK == 0);
        ich[1 + 2*k] = c; och[1 + 2*k] = ds ? 2 * c : c; kk[1 + 2*k] = 3;
        if (ds) c = 2 * c;
        ich[2 + 2*k] = c; och[2 + 2*k] = c; kk[2 + 2*k] = 3;
      end
      ich[NPAR-1] = c; och[NPAR-1] = NCLASS; kk[NPAR-1] = 1;
    end
    foreach (n_par[s]) n_par[s] = 0;
    for (int s = 0; s < NPAR; s++) begin
      W[s] = rand_vec(och[s] * ich[s] * kk[s] * kk[s], -128, 127);
      B[s] = rand_vec(och[s], -1000, 3000);
      if (ich[s] != och[s] && s > 0 && s < NPAR - 1) begin
        W2[s] = rand_vec(och[s] * ich[s], -128, 127);
        B2[s] = rand_vec(och[s], -1000, 1000);
      end
    end
    for (int f = 0; f < FRAMES; f++) X[f] = rand_vec(IH * IW * IN_CH, -128, 127);
    for (int s = 0; s < NPAR; s++) begin
      push_conv(s, W[s], B[s], ich[s], och[s], kk[s], (s == 0) ? 1 : PAR);
      // The merged 1x1 parameters follow the main ones on the same stream.
      if (ich[s] != och[s] && s > 0 && s < NPAR - 1) push_conv(s, W2[s], B2[s], ich[s], och[s], 1, PAR);
    end
    model();

    foreach (par_valid[s]) par_valid[s] = 0;
    in_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_out < FRAMES * NCB) begin
      bit slow;
      @(negedge clk);
      slow = (n_out / NCB) < FRAMES / 2;
      fast = !slow;
      // Parameters start late, so the first windows have to wait for them.
      for (int s = 0; s < NPAR; s++)
        par_valid[s] = (cyc >= PAR_START) && (n_par[s] < pl[s].size()) && ($urandom_range(0, 3) != 0);
      // Input is offered from the start, before the parameters are in.
      in_valid  = (n_in < FRAMES * IH * IW * IN_CH) && (!slow || $urandom_range(0, 2) != 0);
      out_ready = !slow || ($urandom_range(0, 1) != 0);
      #1;
      if (in_valid && !in_ready) c_in_stall++;
      if (out_valid && !out_ready) c_out_stall++;
      if (out_valid && out_ready) begin
        int f, b;
        f = n_out / NCB;
        b = n_out % NCB;
        for (int p = 0; p < PAR; p++) begin
          checks++;
          if (int'(out_data[p]) != P[f][b*PAR+p]) begin
            failures++;
            if (failures < 20)
              $display("FAIL frame %0d class %0d got %0d exp %0d", f, b*PAR+p, out_data[p], P[f][b*PAR+p]);
          end
        end
        n_out++;
        if (n_out % NCB == 0) begin
          t_frame_end[f] = cyc;
          // The next image entered the network before this one's scores left.
          if (n_in > (f + 1) * IH * IW * IN_CH) c_back_to_back++;
        end
      end
      @(posedge clk);
    end
    repeat (5) @(posedge clk);

    $display("mechanisms: input stalls %0d, output stalls %0d, forwarded skip beats %0d,",
             c_in_stall, c_out_stall, c_fwd);
    $display("            skip beats added: block 1 %0d, block 2 %0d, block 3 %0d;", c_skip1, c_skip2, c_skip3);
    $display("            merged 1x1 beats: block 2 %0d, block 3 %0d;", c_merge2, c_merge3);
    $display("            windows waiting for parameters %0d cycles, back-to-back frames %0d",
             c_param_wait, c_back_to_back);
    checks++; if (c_in_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    checks++; if (c_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    checks++; if (c_fwd != FRAMES * IH * IW * CB) begin failures++; $display("FAIL forwarded beats"); end
    checks++; if (c_skip1 != FRAMES * IH * IW * CB) begin failures++; $display("FAIL block 1 skip beats"); end
    checks++; if (c_skip2 != FRAMES * IH * IW / 4 * 2 * CB) begin failures++; $display("FAIL stage 2 first block skip beats"); end
    checks++; if (c_skip3 != FRAMES * IH * IW / 16 * 4 * CB) begin failures++; $display("FAIL stage 3 first block skip beats"); end
    checks++; if (c_merge2 != c_skip2) begin failures++; $display("FAIL block 2 merged 1x1 beats"); end
    checks++; if (c_merge3 != c_skip3) begin failures++; $display("FAIL block 3 merged 1x1 beats"); end
    checks++; if (c_early != 0) begin failures++; $display("FAIL window taken before parameters"); end
    checks++; if (c_param_wait == 0) begin failures++; $display("FAIL no window waited for parameters"); end
    checks++; if (c_back_to_back == 0) begin failures++; $display("FAIL frames never overlapped"); end
    checks++;
    if (!loaded) begin failures++; $display("FAIL loaded low"); end
    for (int s = 0; s < NPAR; s++) begin
      checks++;
      if (n_par[s] != pl[s].size()) begin failures++; $display("FAIL parameter stream %0d not all read", s); end
    end
    checks++;
    begin
      int per;
      per = t_frame_end[FRAMES-1] - t_frame_end[FRAMES-2];
      $display("full-rate frame period %0d cycles (one iteration per cycle: %0d)", per, PERIOD);
      if (per < PERIOD || per > PERIOD + ((IH + 2) * (IW + 2) - IH * IW) * CB + 7 * NBLK * (IW + 3) * CB * CB + 10) begin
        failures++; $display("FAIL frame period");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
