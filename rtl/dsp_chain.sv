// dsp_chain: LANES chains of N multiply-add stages that each propagate one
// accumulation, the way cascaded DSP slices add through their internal
// adders instead of a separate adder tree.
//
// Stage k adds a[k]*w[l][k] to the partial sum coming from stage k-1 and
// registers it; stage 0 starts from zero. Operand k is delayed by k cycles
// on its way in so that it meets its partial sum, hence the result of the
// operands presented in cycle t appears on sum in cycle t+N (counting only
// cycles with en high; the chain holds still when en is low). All lanes share
// the activations a and have their own weights. With PACK = 2 each pair of
// lanes uses one packed multiplier per stage (dsp_pack2). The chain
// structure follows the document; the per-operand delays, the zero start
// and the lane pairing are this design's choice. Results with in_valid low
// are tracked by out_valid.
module dsp_chain
  import nn2fpga_pkg::*;
#(
  parameter int N     = 18,
  parameter int LANES = 2,
  parameter int PACK  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  act_t a [N],
  input  wgt_t w [LANES][N],
  output logic out_valid,
  output acc_t sum [LANES]
);
  // Delayed operands: a_d[k] is a[k] seen k enabled cycles ago.
  act_t a_d [N];
  wgt_t w_d [LANES][N];
  acc_t part [N+1][LANES];
  logic [N:0] vld;

  for (genvar k = 0; k < N; k++) begin : g_dly
    if (k == 0) begin : g_now
      assign a_d[0] = a[0];
      for (genvar l = 0; l < LANES; l++) begin : g_l
        assign w_d[l][0] = w[l][0];
      end
    end else begin : g_pipe
      act_t ap [k];
      wgt_t wp [LANES][k];
      always_ff @(posedge clk) begin
        if (en) begin
          ap[0] <= a[k];
          for (int i = 1; i < k; i++) ap[i] <= ap[i-1];
          for (int l = 0; l < LANES; l++) begin
            wp[l][0] <= w[l][k];
            for (int i = 1; i < k; i++) wp[l][i] <= wp[l][i-1];
          end
        end
      end
      assign a_d[k] = ap[k-1];
      for (genvar l = 0; l < LANES; l++) begin : g_l
        assign w_d[l][k] = wp[l][k-1];
      end
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_zero
    assign part[0][l] = '0;
  end

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic signed [15:0] prod [LANES];
    for (genvar l = 0; l < LANES; l += 2) begin : g_mul
      if (PACK == 2 && l + 1 < LANES) begin : g_packed
        dsp_pack2 u_pack (.a(a_d[k]), .w0(w_d[l][k]), .w1(w_d[l+1][k]),
                          .p0(prod[l]), .p1(prod[l+1]));
      end else begin : g_plain
        assign prod[l] = 16'(a_d[k]) * 16'(w_d[l][k]);
        if (l + 1 < LANES) begin : g_second
          assign prod[l+1] = 16'(a_d[k]) * 16'(w_d[l+1][k]);
        end
      end
    end
    always_ff @(posedge clk) begin
      if (en) begin
        for (int l = 0; l < LANES; l++) part[k+1][l] <= part[k][l] + ACC_W'(prod[l]);
      end
    end
  end

  assign vld[0] = in_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld[N:1] <= '0;
    else if (en) vld[N:1] <= vld[N-1:0];
  end

  assign out_valid = vld[N];
  for (genvar l = 0; l < LANES; l++) begin : g_out
    assign sum[l] = part[N][l];
  end
endmodule
