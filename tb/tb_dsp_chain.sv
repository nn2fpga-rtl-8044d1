// tb_dsp_chain: feeds random operand vectors with random stalls (en low) and
// gaps (in_valid low) into a packed 3-lane, 5-stage chain and a plain one,
// and checks every result and that it arrives after exactly N enabled cycles.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_dsp_chain;
  import nn2fpga_pkg::*;
  localparam int N = 5, L = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, in_valid;
  act_t a [N];
  wgt_t w [L][N];
  logic ov_p, ov_u;
  acc_t sum_p [L], sum_u [L];

  typedef struct { acc_t s [L]; int t; } exp_t;
  exp_t q [$];
  int en_cycles = 0;

  dsp_chain #(.N(N), .LANES(L), .PACK(2)) dut_p (.clk, .rst_n, .en, .in_valid, .a, .w,
                                                .out_valid(ov_p), .sum(sum_p));
  dsp_chain #(.N(N), .LANES(L), .PACK(1)) dut_u (.clk, .rst_n, .en, .in_valid, .a, .w,
                                                .out_valid(ov_u), .sum(sum_u));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      en       = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 4) != 0);
      foreach (a[k]) a[k] = act_t'($urandom);
      foreach (w[l, k]) w[l][k] = wgt_t'($urandom);
      // Results leaving this cycle.
      if (en && ov_p) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (en_cycles - e.t != N || ov_u != 1'b1) begin
          failures++;
          $display("FAIL latency %0d", en_cycles - e.t);
        end
        for (int l = 0; l < L; l++) begin
          checks++;
          if (sum_p[l] != e.s[l] || sum_u[l] != e.s[l]) begin
            failures++;
            $display("FAIL lane %0d got %0d/%0d exp %0d", l, sum_p[l], sum_u[l], e.s[l]);
          end
        end
      end
      if (en && in_valid) begin
        exp_t e;
        for (int l = 0; l < L; l++) begin
          e.s[l] = 0;
          for (int k = 0; k < N; k++) e.s[l] += acc_t'(a[k]) * acc_t'(w[l][k]);
        end
        e.t = en_cycles;
        q.push_back(e);
      end
      if (en) en_cycles++;
    end
    checks++;
    if (q.size() > N) begin
      failures++;
      $display("FAIL %0d results never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
