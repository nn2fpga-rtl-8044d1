// tb_pad_insert: streams three 3x4 frames (2 beats per pixel) with random
// gaps and back-pressure and checks the padded 5x6 output beat by beat.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_pad_insert;
  localparam int W = 16, CB = 2, IH = 3, IW = 4, P = 1;
  localparam int OH = IH + 2 * P, OW = IW + 2 * P, FRAMES = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] src [FRAMES][IH][IW][CB];
  logic [W-1:0] exp_q [$];
  int n_in = 0;

  pad_insert #(.BEAT_W(W), .ICH_BEATS(CB), .IH(IH), .IW(IW), .PAD(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source: beats in depth-first order with random gaps.
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) n_in <= n_in + 1;
  end
  always_comb begin
    int f, r, c, b;
    f = n_in / (IH * IW * CB);
    r = (n_in / (IW * CB)) % IH;
    c = (n_in / CB) % IW;
    b = n_in % CB;
    in_data = (f < FRAMES) ? src[f][r][c][b] : '0;
  end

  initial begin
    foreach (src[f, r, c, b]) src[f][r][c][b] = W'($urandom_range(1, 65535));
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < OH; r++)
        for (int c = 0; c < OW; c++)
          for (int b = 0; b < CB; b++)
            exp_q.push_back((r < P || r >= OH - P || c < P || c >= OW - P) ? '0
                            : src[f][r-P][c-P][b]);
    in_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      in_valid  = (n_in < FRAMES * IH * IW * CB) && ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != exp_q[0]) begin
          failures++;
          $display("FAIL got %h exp %h (%0d left)", out_data, exp_q[0], exp_q.size());
        end
        void'(exp_q.pop_front());
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
