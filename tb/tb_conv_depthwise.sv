// tb_conv_depthwise: the depthwise variant of conv_task. Each channel is
// convolved with its own 3x3 filter and nothing is summed across channels;
// checks every output against an integer model with signed clipping, and
// that at full rate every window yields one output beat per cycle.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_conv_depthwise;
  import nn2fpga_pkg::*;
  localparam int CH = 4, FH = 3, FW = 3, P = 2, K = FH * FW, G = CH / P, SH = 6;
  localparam int NPIX = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic par_valid, par_ready, loaded;
  par_t par_data;
  logic win_valid, win_ready, skip_valid, skip_ready, out_valid, out_ready;
  act_t win_data [FH][FW][P];
  act_t skip_data [P];
  act_t out_data [P];
  logic pw_valid;
  logic pw_ready = 1'b1;
  act_t pw_data [P];

  conv_task #(.ICH(CH), .OCH(CH), .FH(FH), .FW(FW), .ICH_PAR(P), .OCH_PAR(P), .PACK(1),
              .DEPTHWISE(1'b1), .OUT_SHIFT(SH), .RELU(1'b0), .HAS_SKIP(1'b0)) dut (.*);

  always #5 clk = ~clk;

  wgt_t W [CH][K];
  par_t B [CH];
  act_t X [NPIX][CH][K];
  par_t plist [$];
  int n_par = 0, n_win = 0, n_out = 0, cyc = 0, t_first = -1, t_last = -1;

  function automatic act_t expected(int p, int c);
    longint acc, r;
    acc = longint'(B[c]);
    for (int t = 0; t < K; t++) acc += longint'(W[c][t]) * longint'(X[p][c][t]);
    r = (acc + (64'sd1 <<< (SH - 1))) >>> SH;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return act_t'(r);
  endfunction

  always_comb begin
    int p, g;
    p = n_win / G; g = n_win % G;
    for (int t = 0; t < K; t++) for (int i = 0; i < P; i++)
      win_data[t / FW][t % FW][i] = (p < NPIX) ? X[p][g*P+i][t] : '0;
    par_data = (n_par < plist.size()) ? plist[n_par] : '0;
  end
  assign skip_data = '{default: '0};
  assign skip_valid = 1'b0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (par_valid && par_ready) n_par <= n_par + 1;
    if (win_valid && win_ready) n_win <= n_win + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (W[c, t]) W[c][t] = wgt_t'($urandom);
    foreach (B[c]) B[c] = par_t'(int'($urandom_range(0, 2000)) - 1000);
    foreach (X[p, c, t]) X[p][c][t] = act_t'($urandom);
    for (int c = 0; c < CH; c++) for (int t = 0; t < K; t++) plist.push_back(par_t'(W[c][t]));
    foreach (B[c]) plist.push_back(B[c]);
    par_valid = 0; win_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_out < NPIX * G) begin
      @(negedge clk);
      par_valid = (n_par < plist.size());
      // First half with random gaps and back-pressure, second half at full rate.
      win_valid = (n_win < NPIX * G) && (n_win >= NPIX * G / 2 || $urandom_range(0, 2) != 0);
      out_ready = (n_out >= NPIX * G / 2) || ($urandom_range(0, 2) != 0);
      #1;
      if (win_valid && win_ready && n_win == NPIX * G / 2 + 4) t_first = cyc;
      if (out_valid && out_ready) begin
        int p, g;
        p = n_out / G; g = n_out % G;
        for (int i = 0; i < P; i++) begin
          checks++;
          if (out_data[i] !== expected(p, g*P+i)) begin
            failures++;
            $display("FAIL pixel %0d ch %0d got %0d exp %0d", p, g*P+i, out_data[i],
                     expected(p, g*P+i));
          end
        end
        n_out++;
        if (n_out == NPIX * G) t_last = cyc;
      end
      @(posedge clk);
    end
    // The last NPIX*G/2 - 4 windows leave one per cycle after the chain depth.
    checks++;
    if (t_last - t_first > NPIX * G / 2 - 4 + K + 3) begin
      failures++;
      $display("FAIL full-rate span %0d", t_last - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
