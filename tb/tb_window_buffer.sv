// tb_window_buffer: streams three random 5x6x4 frames (2 channels per beat)
// into a 3x3 window buffer with Temporal Reuse forwarding and into a
// stride-2 one, with random gaps and back-pressure on both outputs. Every
// window is checked against the frame it was cut from, every forwarded beat
// against the window centre, and the window count per frame against
// ((IH-FH)/S+1)*((IW-FW)/S+1)*ICH/PAR.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_window_buffer;
  import nn2fpga_pkg::*;
  localparam int PAR = 2, ICH = 4, IH = 5, IW = 6, FH = 3, FW = 3, CB = ICH / PAR;
  localparam int FRAMES = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  act_t frame [FRAMES][IH][IW][ICH];
  int   n_in = 0;
  logic in_valid, in_ready, in_ready2;
  act_t in_data [PAR];

  logic win_valid, win_ready, fwd_valid, fwd_ready;
  act_t win_data [FH][FW][PAR];
  act_t fwd_data [PAR];
  logic win2_valid, win2_ready, fwd2_valid;
  act_t win2_data [FH][FW][PAR];
  act_t fwd2_data [PAR];

  // Both buffers see the same stream; a beat moves when both take it.
  logic both_ready;
  assign both_ready = in_ready && in_ready2;

  window_buffer #(.PAR(PAR), .ICH(ICH), .IH(IH), .IW(IW), .FH(FH), .FW(FW),
                  .STRIDE(1), .FWD(1'b1)) dut (
    .clk, .rst_n, .in_valid(in_valid && in_ready2), .in_ready, .in_data,
    .win_valid, .win_ready, .win_data, .fwd_valid, .fwd_ready, .fwd_data);

  window_buffer #(.PAR(PAR), .ICH(ICH), .IH(IH), .IW(IW), .FH(FH), .FW(FW),
                  .STRIDE(2), .FWD(1'b0)) dut_s2 (
    .clk, .rst_n, .in_valid(in_valid && in_ready), .in_ready(in_ready2), .in_data,
    .win_valid(win2_valid), .win_ready(win2_ready), .win_data(win2_data),
    .fwd_valid(fwd2_valid), .fwd_ready(1'b1), .fwd_data(fwd2_data));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (in_valid && both_ready) n_in <= n_in + 1;
  end

  always_comb begin
    int f, r, c, b;
    f = n_in / (IH * IW * CB);
    r = (n_in / (IW * CB)) % IH;
    c = (n_in / CB) % IW;
    b = n_in % CB;
    for (int p = 0; p < PAR; p++) in_data[p] = (f < FRAMES) ? frame[f][r][c][b*PAR+p] : '0;
  end

  // Expected windows, in order.
  typedef struct { int f, r, c, b; } pos_t;
  pos_t q1 [$], q2 [$];
  int n_fwd = 0, n_win1 = 0, n_win2 = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (frame[f, r, c, ch]) frame[f][r][c][ch] = act_t'($urandom);
    for (int f = 0; f < FRAMES; f++)
      for (int r = FH - 1; r < IH; r++)
        for (int c = FW - 1; c < IW; c++)
          for (int b = 0; b < CB; b++) begin
            q1.push_back('{f, r, c, b});
            if ((r - FH + 1) % 2 == 0 && (c - FW + 1) % 2 == 0) q2.push_back('{f, r, c, b});
          end
    checks++;
    if (q2.size() != FRAMES * ((IH - FH) / 2 + 1) * ((IW - FW) / 2 + 1) * CB) failures++;
    in_valid = 0; win_ready = 0; fwd_ready = 0; win2_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (q1.size() > 0 || q2.size() > 0 || n_fwd < n_win1) begin
      @(negedge clk);
      in_valid   = (n_in < FRAMES * IH * IW * CB) && ($urandom_range(0, 4) != 0);
      win_ready  = ($urandom_range(0, 3) != 0);
      fwd_ready  = ($urandom_range(0, 2) != 0);
      win2_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (win_valid && win_ready) begin
        pos_t e;
        e = q1.pop_front();
        n_win1++;
        for (int i = 0; i < FH; i++) for (int j = 0; j < FW; j++) for (int p = 0; p < PAR; p++) begin
          checks++;
          if (win_data[i][j][p] !== frame[e.f][e.r-FH+1+i][e.c-FW+1+j][e.b*PAR+p]) begin
            failures++;
            $display("FAIL win f%0d r%0d c%0d b%0d [%0d][%0d][%0d] got %0d exp %0d", e.f, e.r, e.c, e.b, i, j, p, win_data[i][j][p], frame[e.f][e.r-FH+1+i][e.c-FW+1+j][e.b*PAR+p]);
          end
        end
      end
      if (fwd_valid && fwd_ready) begin
        // Forwarded beats follow the windows: the n-th is the centre of the n-th window.
        int k, f, r, c, b;
        k = n_fwd;
        b = k % CB;
        c = (k / CB) % (IW - FW + 1) + FW / 2;
        r = (k / (CB * (IW - FW + 1))) % (IH - FH + 1) + FH / 2;
        f = k / (CB * (IW - FW + 1) * (IH - FH + 1));
        for (int p = 0; p < PAR; p++) begin
          checks++;
          if (fwd_data[p] !== frame[f][r][c][b*PAR+p]) begin
            failures++;
            $display("FAIL fwd %0d", k);
          end
        end
        n_fwd++;
      end
      if (win2_valid && win2_ready) begin
        pos_t e;
        e = q2.pop_front();
        n_win2++;
        for (int i = 0; i < FH; i++) for (int j = 0; j < FW; j++) for (int p = 0; p < PAR; p++) begin
          checks++;
          if (win2_data[i][j][p] !== frame[e.f][e.r-FH+1+i][e.c-FW+1+j][e.b*PAR+p]) begin
            failures++;
            $display("FAIL win2 f%0d r%0d c%0d b%0d", e.f, e.r, e.c, e.b);
          end
        end
      end
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks += 2;
    if (win_valid || win2_valid) begin
      failures++;
      $display("FAIL extra window");
    end
    if (n_fwd != n_win1) begin
      failures++;
      $display("FAIL forwarded %0d of %0d", n_fwd, n_win1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
