// tb_dsp_pack2: checks both packed products against plain multiplication for
// all sign corners and many random operand triples.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_dsp_pack2;
  import nn2fpga_pkg::*;
  int checks = 0, failures = 0;
  act_t a;
  wgt_t w0, w1;
  logic signed [15:0] p0, p1;

  dsp_pack2 dut (.a, .w0, .w1, .p0, .p1);

  task automatic check_one(int av, int w0v, int w1v);
    a = act_t'(av); w0 = wgt_t'(w0v); w1 = wgt_t'(w1v);
    #1;
    checks++;
    if (int'(p0) != int'(a) * int'(w0) || int'(p1) != int'(a) * int'(w1)) begin
      failures++;
      $display("FAIL a=%0d w0=%0d w1=%0d -> %0d %0d", a, w0, w1, p0, p1);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c[5] = '{-128, -1, 0, 1, 127};
    foreach (c[i]) foreach (c[j]) foreach (c[k]) check_one(c[i], c[j], c[k]);
    for (int i = 0; i < 20000; i++)
      check_one(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128,
                int'($urandom_range(0, 255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
