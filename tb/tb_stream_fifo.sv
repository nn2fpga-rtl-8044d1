// tb_stream_fifo: random pushes and pops against a queue model; checks order,
// data, that a full FIFO refuses data unless a word leaves, and that it
// fills to exactly DEPTH words.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_stream_fifo;
  localparam int W = 12, D = 5;
  int checks = 0, failures = 0, max_fill = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] q [$];

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      // Phases: mostly filling, mostly draining, mixed.
      in_valid  = ($urandom_range(0, 9) < ((it / 500) % 3 == 0 ? 8 : (it / 500) % 3 == 1 ? 2 : 5));
      out_ready = ($urandom_range(0, 9) < ((it / 500) % 3 == 0 ? 2 : (it / 500) % 3 == 1 ? 8 : 5));
      in_data   = W'($urandom);
      #1;
      checks++;
      if (out_valid != (q.size() > 0) || in_ready != (q.size() < D || out_ready)) begin
        failures++;
        $display("FAIL flags: valid %0b ready %0b size %0d", out_valid, in_ready, q.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin
          failures++;
          $display("FAIL data %h exp %h", out_data, q[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
      if (q.size() > max_fill) max_fill = q.size();
    end
    checks++;
    if (max_fill != D) begin
      failures++;
      $display("FAIL never full (max %0d)", max_fill);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
