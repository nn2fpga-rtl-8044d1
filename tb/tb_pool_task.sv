// tb_pool_task: streams random 3x5 frames of 6 channels (2 per beat) into an
// average and a max global pooling task with random gaps and back-pressure
// and checks every result (rounded average, maximum) and the number of
// output beats per frame.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_pool_task;
  import nn2fpga_pkg::*;
  localparam int CH = 6, PAR = 2, IH = 3, IW = 5, CB = CH / PAR, FRAMES = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, ra, rm, ova, ovm, oready;
  act_t in_data [PAR];
  act_t oa [PAR];
  act_t om [PAR];
  act_t X [FRAMES][IH][IW][CH];
  int n_in = 0, n_a = 0, n_m = 0;

  pool_task #(.CH(CH), .PAR(PAR), .IH(IH), .IW(IW), .MODE(POOL_AVG)) dut_avg (
    .clk, .rst_n, .in_valid(in_valid && rm), .in_ready(ra), .in_data,
    .out_valid(ova), .out_ready(oready), .out_data(oa));
  pool_task #(.CH(CH), .PAR(PAR), .IH(IH), .IW(IW), .MODE(POOL_MAX)) dut_max (
    .clk, .rst_n, .in_valid(in_valid && ra), .in_ready(rm), .in_data,
    .out_valid(ovm), .out_ready(oready), .out_data(om));

  always #5 clk = ~clk;

  always_comb begin
    int f, r, c, b;
    f = n_in / (IH * IW * CB);
    r = (n_in / (IW * CB)) % IH;
    c = (n_in / CB) % IW;
    b = n_in % CB;
    for (int p = 0; p < PAR; p++) in_data[p] = (f < FRAMES) ? X[f][r][c][b*PAR+p] : '0;
  end
  always_ff @(posedge clk) if (in_valid && ra && rm) n_in <= n_in + 1;

  function automatic int exp_avg(int f, int ch);
    int s, n;
    s = 0; n = IH * IW;
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) s += int'(X[f][r][c][ch]);
    return (s >= 0) ? (s + n / 2) / n : -((-s + n / 2) / n);
  endfunction

  function automatic int exp_max(int f, int ch);
    int m;
    m = -1000;
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++)
      if (int'(X[f][r][c][ch]) > m) m = int'(X[f][r][c][ch]);
    return m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (X[f, r, c, ch]) X[f][r][c][ch] = act_t'($urandom);
    in_valid = 0; oready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n_a < FRAMES * CB || n_m < FRAMES * CB) begin
      @(negedge clk);
      in_valid = (n_in < FRAMES * IH * IW * CB) && ($urandom_range(0, 3) != 0);
      oready   = ($urandom_range(0, 2) != 0);
      #1;
      if (ova && oready) begin
        for (int p = 0; p < PAR; p++) begin
          checks++;
          if (int'(oa[p]) != exp_avg(n_a / CB, (n_a % CB) * PAR + p)) begin
            failures++;
            $display("FAIL avg frame %0d ch %0d got %0d exp %0d", n_a / CB, (n_a % CB) * PAR + p,
                     oa[p], exp_avg(n_a / CB, (n_a % CB) * PAR + p));
          end
        end
        n_a++;
      end
      if (ovm && oready) begin
        for (int p = 0; p < PAR; p++) begin
          checks++;
          if (int'(om[p]) != exp_max(n_m / CB, (n_m % CB) * PAR + p)) begin
            failures++;
            $display("FAIL max frame %0d ch %0d got %0d", n_m / CB, (n_m % CB) * PAR + p, om[p]);
          end
        end
        n_m++;
      end
      @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (ova || ovm || n_a != FRAMES * CB) begin
      failures++;
      $display("FAIL extra output beats");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
