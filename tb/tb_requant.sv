// tb_requant: checks power-of-two requantisation (round half up, clip) for a
// ReLU instance and a signed instance against an integer reference model.
// The reference values follow the arithmetic the architecture defines for
// this block; sizes, random stimulus and stall patterns are this test's own.
module tb_requant;
  import nn2fpga_pkg::*;
  int checks = 0, failures = 0;

  logic signed [31:0] acc;
  logic signed [7:0]  q_relu, q_sgn;

  requant #(.IN_W(32), .OUT_W(8), .SHIFT(6), .RELU(1'b1)) dut_relu (.acc, .q(q_relu));
  requant #(.IN_W(32), .OUT_W(8), .SHIFT(4), .RELU(1'b0)) dut_sgn  (.acc, .q(q_sgn));

  function automatic longint ref_q(longint a, int sh, bit relu);
    longint r, lo, hi;
    r  = (sh > 0) ? ((a + (64'sd1 <<< (sh - 1))) >>> sh) : a;
    hi = 127;
    lo = relu ? 0 : -128;
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  task automatic check_one(longint a);
    acc = 32'(a);
    #1;
    checks += 2;
    if (longint'(q_relu) != ref_q(a, 6, 1)) begin
      failures++;
      $display("FAIL relu acc=%0d got %0d exp %0d", a, q_relu, ref_q(a, 6, 1));
    end
    if (longint'(q_sgn) != ref_q(a, 4, 0)) begin
      failures++;
      $display("FAIL signed acc=%0d got %0d exp %0d", a, q_sgn, ref_q(a, 4, 0));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Edges of rounding and clipping.
    check_one(0);     check_one(31);   check_one(32);   check_one(-32);  check_one(-33);
    check_one(8127);  check_one(8128); check_one(-1);   check_one(2040); check_one(2039);
    check_one(-2056); check_one(-2057); check_one(64'sd2147483647); check_one(-64'sd2147483648);
    for (int i = 0; i < 2000; i++) check_one(longint'($signed($urandom_range(0, 40000))) - 20000);
    for (int i = 0; i < 500; i++)  check_one(longint'($signed($urandom())));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
