// tb_resblock_full: end-to-end test of the residual-block accelerator at its default size
// (16 channels, 32x32 pixels, 2 channels per beat).
//
// Loads random weights and biases for both convolutions through the two
// parameter streams, then streams FRAMES random frames back to back. The
// first half of the frames runs with random gaps on the input and random
// back-pressure on the output, the rest at full rate. Every output
// activation is compared with an integer model of
//   y = relu(requant(b1 + x*2^SKIP_SHIFT + conv1(pad(relu(requant(b0 + conv0(pad(x))))))))
// The test also counts how often each mechanism of the design happened and
// fails if one never did: parameter load before the first window,
// input
// back-pressure, output stalls, windows held until the parameters are in, skip values forwarded by window buffer 0
// (Temporal Reuse) and consumed by conv1's accumulator start (merged add),
// and frames following each other without a gap. The skip FIFO must never
// fill up while the output is not back-pressured. At full rate the frame period must lie between IH*IW*(CH/PAR)^2
// cycles (one convolution iteration per cycle) and that plus the padding
// beats each window buffer also has to shift plus about one row of
// iterations, which conv1 loses at each frame boundary while it waits for
// conv0 to fill its window buffer with the first rows of the next frame.
// Model loop bounds are run-time variables so that the simulator compiles
// the loops instead of unrolling them.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_resblock_full;
  import nn2fpga_pkg::*;
  localparam int CH = 16, IH = 32, IW = 32, FH = 3, FW = 3, PAR = 2;
  localparam int SH0 = 6, SH1 = 6, SSH = 6;
  localparam int FRAMES = 3, K = FH * FW, CB = CH / PAR;
  localparam int PERIOD = IH * IW * CB * CB;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic par0_valid, par0_ready, par1_valid, par1_ready, loaded;
  par_t par0_data, par1_data;
  logic in_valid, in_ready, out_valid, out_ready;
  act_t in_data [PAR];
  act_t out_data [PAR];

  resblock_top dut (.*);

  always #5 clk = ~clk;

  wgt_t W0 [CH][CH][K];
  wgt_t W1 [CH][CH][K];
  par_t B0 [CH];
  par_t B1 [CH];
  act_t X  [FRAMES][IH][IW][CH];
  act_t Y0 [IH][IW][CH];
  act_t Y  [FRAMES][IH][IW][CH];
  par_t pl0 [$];
  par_t pl1 [$];
  int n_par0 = 0, n_par1 = 0, n_in = 0, n_out = 0, cyc = 0;
  int t_frame_end [FRAMES];

  // Mechanism counters.
  int c_in_stall = 0, c_out_stall = 0, c_fwd = 0, c_skip_add = 0, c_skip_wait = 0;
  bit fast = 0;
  int c_early = 0, c_param_wait = 0, c_back_to_back = 0, c_skip_max = 0;

  int n_ch, n_k, n_ih, n_iw;

  function automatic longint rq(longint acc, int sh, bit relu);
    longint r;
    r = (acc + (64'sd1 <<< (sh - 1))) >>> sh;
    if (r > 127) r = 127;
    if (r < (relu ? 0 : -128)) r = relu ? 0 : -128;
    return r;
  endfunction

  task automatic model();
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < n_ih; r++) for (int c = 0; c < n_iw; c++) for (int o = 0; o < n_ch; o++) begin
        longint acc;
        acc = B0[o];
        for (int i = 0; i < n_ch; i++) for (int t = 0; t < n_k; t++) begin
          int rr, cc;
          rr = r + t / FW - FH / 2; cc = c + t % FW - FW / 2;
          if (rr >= 0 && rr < n_ih && cc >= 0 && cc < n_iw)
            acc += longint'(W0[o][i][t]) * longint'(X[f][rr][cc][i]);
        end
        Y0[r][c][o] = act_t'(rq(acc, SH0, 1));
      end
      for (int r = 0; r < n_ih; r++) for (int c = 0; c < n_iw; c++) for (int o = 0; o < n_ch; o++) begin
        longint acc;
        acc = longint'(B1[o]) + (longint'(X[f][r][c][o]) <<< SSH);
        for (int i = 0; i < n_ch; i++) for (int t = 0; t < n_k; t++) begin
          int rr, cc;
          rr = r + t / FW - FH / 2; cc = c + t % FW - FW / 2;
          if (rr >= 0 && rr < n_ih && cc >= 0 && cc < n_iw)
            acc += longint'(W1[o][i][t]) * longint'(Y0[rr][cc][i]);
        end
        Y[f][r][c][o] = act_t'(rq(acc, SH1, 1));
      end
    end
  endtask

  always_comb begin
    int f, r, c, b;
    f = n_in / (IH * IW * CB);
    r = (n_in / (IW * CB)) % IH;
    c = (n_in / CB) % IW;
    b = n_in % CB;
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
      if (dut.u_wb0.fwd_valid && dut.u_wb0.fwd_ready) c_fwd <= c_fwd + 1;
      if (dut.u_conv1.skip_valid && dut.u_conv1.skip_ready) c_skip_add <= c_skip_add + 1;
      if (fast && dut.u_wb0.fwd_valid && !dut.u_wb0.fwd_ready) c_skip_wait <= c_skip_wait + 1;
      if (fast && dut.u_skip_fifo.count > c_skip_max) c_skip_max <= int'(dut.u_skip_fifo.count);
      if (dut.u_conv0.win_valid && dut.u_conv0.win_ready && !dut.u_conv0.loaded) c_early <= c_early + 1;
      if (dut.u_conv0.win_valid && !dut.u_conv0.loaded) c_param_wait <= c_param_wait + 1;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_ch = CH; n_k = K; n_ih = IH; n_iw = IW;
    foreach (W0[o, i, t]) W0[o][i][t] = wgt_t'($urandom);
    foreach (W1[o, i, t]) W1[o][i][t] = wgt_t'($urandom);
    foreach (B0[o]) B0[o] = par_t'(int'($urandom_range(0, 4000)) - 1000);
    foreach (B1[o]) B1[o] = par_t'(int'($urandom_range(0, 4000)) - 2000);
    foreach (X[f, r, c, ch]) X[f][r][c][ch] = act_t'($urandom);
    for (int og = 0; og < CB; og++) for (int ig = 0; ig < CB; ig++)
      for (int o = 0; o < PAR; o++) for (int i = 0; i < PAR; i++) for (int t = 0; t < K; t++) begin
        pl0.push_back(par_t'(W0[og*PAR+o][ig*PAR+i][t]));
        pl1.push_back(par_t'(W1[og*PAR+o][ig*PAR+i][t]));
      end
    foreach (B0[o]) pl0.push_back(B0[o]);
    foreach (B1[o]) pl1.push_back(B1[o]);
    model();

    par0_valid = 0; par1_valid = 0; in_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_out < FRAMES * IH * IW * CB) begin
      bit slow;
      @(negedge clk);
      slow       = (n_out / (IH * IW * CB)) < FRAMES / 2;
      fast       = !slow;
      par0_valid = (n_par0 < pl0.size()) && ($urandom_range(0, 3) != 0);
      par1_valid = (n_par1 < pl1.size()) && ($urandom_range(0, 3) != 0);
      // Input is offered from the start, before the parameters are in.
      in_valid   = (n_in < FRAMES * IH * IW * CB) && (!slow || $urandom_range(0, 2) != 0);
      out_ready  = !slow || ($urandom_range(0, 3) != 0);
      #1;
      if (in_valid && !in_ready) c_in_stall++;
      if (out_valid && !out_ready) c_out_stall++;
      if (out_valid && out_ready) begin
        int f, r, c, b;
        f = n_out / (IH * IW * CB);
        r = (n_out / (IW * CB)) % IH;
        c = (n_out / CB) % IW;
        b = n_out % CB;
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
        if (n_out % (IH * IW * CB) == 0) t_frame_end[f] = cyc;
        // The next frame entered the block before this one left it.
        if (n_out % (IH * IW * CB) == 0 && n_in > n_out / CB * CB) c_back_to_back++;
      end
      @(posedge clk);
    end
    repeat (5) @(posedge clk);

    $display("mechanisms: input stalls %0d, output stalls %0d, forwarded skip beats %0d,",
             c_in_stall, c_out_stall, c_fwd);
    $display("            skip beats added %0d, back-to-back frames %0d", c_skip_add, c_back_to_back);
    $display("            at full rate: skip FIFO peak %0d of %0d beats, full %0d cycles", c_skip_max,
             ((FH - 1) * IW + FW) * CB, c_skip_wait);
    checks++; if (c_in_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    checks++; if (c_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    checks++;
    if (c_fwd != FRAMES * IH * IW * CB) begin
      failures++; $display("FAIL forwarded %0d skip beats", c_fwd);
    end
    checks++;
    if (c_skip_add != FRAMES * IH * IW * CB) begin
      failures++; $display("FAIL merged-add used %0d skip beats", c_skip_add);
    end
    // At full rate the skip buffer sized by [(FH-1)*IW + FW]*CH must never
    // hold back window buffer 0.
    checks++; if (c_skip_wait != 0) begin failures++; $display("FAIL skip FIFO full"); end
    checks++; if (c_early != 0) begin failures++; $display("FAIL window taken before parameters"); end
    checks++; if (c_param_wait == 0) begin failures++; $display("FAIL no window waited for parameters"); end
    checks++; if (c_back_to_back == 0) begin failures++; $display("FAIL frames never overlapped"); end
    checks++;
    if (n_par0 != pl0.size() || n_par1 != pl1.size()) begin
      failures++; $display("FAIL parameters not all read");
    end
    // Frame period at full rate (last two frames).
    checks++;
    begin
      int per;
      per = t_frame_end[FRAMES-1] - t_frame_end[FRAMES-2];
      $display("full-rate frame period %0d cycles (one iteration per cycle: %0d)", per, PERIOD);
      if (per < PERIOD || per > PERIOD + ((IH + 2) * (IW + 2) - IH * IW) * CB + (IW + 3) * CB * CB + 10) begin
        failures++; $display("FAIL frame period");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
