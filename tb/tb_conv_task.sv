// tb_conv_task: loads random weights and biases through the parameter stream,
// then convolves random windows with the residual skip merged into the
// accumulator and a pointwise convolution merged into the same loop (Loop
// Merge), whose outputs are checked against their own model. Checks every output against an integer model of
// requant(bias + skip*2^SKIP_SHIFT + sum w*a), that no window is taken
// before the parameters are in, that stalls on the window, skip and output
// streams lose nothing, and that at full rate a pixel costs
// (ICH/ICH_PAR)*(OCH/OCH_PAR) cycles plus the pipeline fill.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_conv_task;
  import nn2fpga_pkg::*;
  localparam int ICH = 4, OCH = 6, FH = 3, FW = 3, IP = 2, OP = 2, K = FH * FW;
  localparam int IG = ICH / IP, OG = OCH / OP;
  localparam int SH = 8, SSH = 8;
  localparam int P1 = 20, P2 = 30, NPIX = P1 + P2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic par_valid, par_ready, loaded;
  par_t par_data;
  logic win_valid, win_ready, skip_valid, skip_ready, out_valid, out_ready;
  act_t win_data [FH][FW][IP];
  act_t skip_data [OP];
  act_t out_data [OP];
  logic pw_valid, pw_ready;
  act_t pw_data [OP];
  localparam int PSH = 7;

  conv_task #(.ICH(ICH), .OCH(OCH), .FH(FH), .FW(FW), .ICH_PAR(IP), .OCH_PAR(OP),
              .PACK(2), .DEPTHWISE(1'b0), .OUT_SHIFT(SH), .RELU(1'b1), .HAS_SKIP(1'b1),
              .SKIP_SHIFT(SSH), .MERGE_PW(1'b1), .PW_SHIFT(PSH)) dut (.*);

  always #5 clk = ~clk;

  wgt_t W [OCH][ICH][K];
  par_t B [OCH];
  wgt_t PW [OCH][ICH];
  par_t PB [OCH];
  int n_pw = 0;
  act_t X [NPIX][ICH][K];
  act_t S [NPIX][OCH];
  par_t plist [$];
  int n_par = 0, n_win = 0, n_skip = 0, n_out = 0;
  bit full_rate = 0, early_take = 0;
  int cyc = 0, t_first = -1, t_last = -1;

  function automatic act_t expected(int p, int o);
    longint acc, r;
    acc = longint'(B[o]) + (longint'(S[p][o]) <<< SSH);
    for (int i = 0; i < ICH; i++) for (int t = 0; t < K; t++)
      acc += longint'(W[o][i][t]) * longint'(X[p][i][t]);
    r = (acc + (64'sd1 <<< (SH - 1))) >>> SH;
    if (r > 127) r = 127;
    if (r < 0) r = 0;
    return act_t'(r);
  endfunction

  function automatic act_t expected_pw(int p, int o);
    longint acc, r;
    acc = longint'(PB[o]);
    for (int i = 0; i < ICH; i++) acc += longint'(PW[o][i]) * longint'(X[p][i][K/2]);
    r = (acc + (64'sd1 <<< (PSH - 1))) >>> PSH;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return act_t'(r);
  endfunction

  always_comb begin
    int p, g;
    p = n_win / IG; g = n_win % IG;
    for (int t = 0; t < K; t++) for (int i = 0; i < IP; i++)
      win_data[t / FW][t % FW][i] = (p < NPIX) ? X[p][g*IP+i][t] : '0;
    p = n_skip / OG; g = n_skip % OG;
    for (int o = 0; o < OP; o++) skip_data[o] = (p < NPIX) ? S[p][g*OP+o] : '0;
    par_data = (n_par < plist.size()) ? plist[n_par] : '0;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (par_valid && par_ready) n_par <= n_par + 1;
    if (win_valid && win_ready) n_win <= n_win + 1;
    if (skip_valid && skip_ready) n_skip <= n_skip + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (W[o, i, t]) W[o][i][t] = wgt_t'($urandom);
    foreach (B[o]) B[o] = par_t'(int'($urandom_range(0, 4000)) - 2000);
    foreach (X[p, i, t]) X[p][i][t] = act_t'($urandom);
    foreach (S[p, o]) S[p][o] = act_t'($urandom_range(0, 127));
    for (int og = 0; og < OG; og++) for (int ig = 0; ig < IG; ig++)
      for (int o = 0; o < OP; o++) for (int i = 0; i < IP; i++) for (int t = 0; t < K; t++)
        plist.push_back(par_t'(W[og*OP+o][ig*IP+i][t]));
    foreach (B[o]) plist.push_back(B[o]);
    foreach (PW[o, i]) PW[o][i] = wgt_t'($urandom);
    foreach (PB[o]) PB[o] = par_t'(int'($urandom_range(0, 2000)) - 1000);
    for (int og = 0; og < OG; og++) for (int ig = 0; ig < IG; ig++)
      for (int o = 0; o < OP; o++) for (int i = 0; i < IP; i++)
        plist.push_back(par_t'(PW[og*OP+o][ig*IP+i]));
    foreach (PB[o]) plist.push_back(PB[o]);

    par_valid = 0; win_valid = 0; skip_valid = 0; out_ready = 0; pw_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_out < NPIX * OG) begin
      @(negedge clk);
      if (n_out >= P1 * OG && n_win == P1 * IG && !full_rate) begin
        // Let the pipeline drain, then switch to full rate.
        full_rate = 1;
      end
      par_valid  = (n_par < plist.size()) && ($urandom_range(0, 3) != 0);
      win_valid  = (n_win < NPIX * IG) && (full_rate || $urandom_range(0, 3) != 0)
                   && (full_rate || n_win < P1 * IG) && (!full_rate || n_out >= P1 * OG);
      skip_valid = (n_skip < NPIX * OG) && (full_rate || $urandom_range(0, 3) != 0);
      out_ready  = full_rate || ($urandom_range(0, 3) != 0);
      pw_ready   = full_rate || ($urandom_range(0, 3) != 0);
      #1;
      if (pw_valid && pw_ready) begin
        int p, g;
        p = n_pw / OG; g = n_pw % OG;
        for (int o = 0; o < OP; o++) begin
          checks++;
          if (pw_data[o] !== expected_pw(p, g*OP+o)) begin
            failures++;
            $display("FAIL pointwise pixel %0d och %0d got %0d exp %0d", p, g*OP+o, pw_data[o],
                     expected_pw(p, g*OP+o));
          end
        end
        n_pw++;
      end
      if (win_valid && win_ready && !loaded) early_take = 1;
      if (win_valid && win_ready && n_win == P1 * IG) t_first = cyc;
      if (out_valid && out_ready) begin
        int p, g;
        p = n_out / OG; g = n_out % OG;
        for (int o = 0; o < OP; o++) begin
          checks++;
          if (out_data[o] !== expected(p, g*OP+o)) begin
            failures++;
            $display("FAIL pixel %0d och %0d got %0d exp %0d", p, g*OP+o, out_data[o],
                     expected(p, g*OP+o));
          end
        end
        n_out++;
        if (n_out == NPIX * OG) t_last = cyc;
      end
      @(posedge clk);
    end
    checks++;
    if (n_pw != n_out) begin
      failures++;
      $display("FAIL %0d pointwise beats for %0d output beats", n_pw, n_out);
    end
    checks++;
    if (early_take) begin
      failures++;
      $display("FAIL a window was taken before the parameters were loaded");
    end
    // Full-rate phase: P2 pixels of IG*OG iterations, plus the chain depth.
    checks++;
    if (t_last - t_first < P2 * IG * OG || t_last - t_first > P2 * IG * OG + IP * K + 4) begin
      failures++;
      $display("FAIL full-rate span %0d cycles, expected about %0d", t_last - t_first,
               P2 * IG * OG + IP * K);
    end else $display("full-rate span %0d cycles for %0d pixels", t_last - t_first, P2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
