// pool_task: global pooling task, reducing each channel of an IH x IW
// tensor to one value (average or maximum, MODE).
//
// The tensor arrives depth first with PAR channels per beat. A running sum
// (POOL_AVG) or maximum (POOL_MAX) is kept per channel; the beat of the last
// pixel completes a channel group, whose PAR results are written out at
// once, so a frame yields CH/PAR output beats, in channel order, while its
// last pixel streams in. The average rounds half away from zero and is a
// shift when IH*IW is a power of two. Frames follow each other without a
// gap; the input stalls only while an output beat is not taken. The document
// names pooling tasks (max and average) without describing them: reducing
// the whole tensor, as ResNet and MobileNetV2 do before their classifier, the
// rounding and the handshake are this design's choice.
module pool_task
  import nn2fpga_pkg::*;
#(
  parameter int         CH   = 32,
  parameter int         PAR  = 2,
  parameter int         IH   = 16,
  parameter int         IW   = 16,
  parameter pool_mode_e MODE = POOL_AVG
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data [PAR],
  output logic out_valid,
  input  logic out_ready,
  output act_t out_data [PAR]
);
  localparam int CB  = CH / PAR;
  localparam int NPX = IH * IW;
  localparam int CBW = (CB > 1) ? $clog2(CB) : 1;
  localparam int PXW = $clog2(NPX + 1);

  acc_t                acc [CB][PAR];
  logic [CBW-1:0]      cb;
  logic [PXW-1:0]      px;
  logic                fire, first_px, last_px;
  acc_t                nxt [PAR];
  act_t                res [PAR];

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign first_px = (px == '0);
  assign last_px  = (px == PXW'(NPX - 1));

  function automatic act_t average(acc_t sum);
    acc_t q;
    if (sum >= 0) q = (sum + acc_t'(NPX / 2)) / acc_t'(NPX);
    else          q = (sum - acc_t'(NPX / 2)) / acc_t'(NPX);
    return act_t'(q);
  endfunction

  for (genvar p = 0; p < PAR; p++) begin : g_lane
    always_comb begin
      if (MODE == POOL_MAX)
        nxt[p] = (first_px || acc_t'(in_data[p]) > acc[cb][p]) ? acc_t'(in_data[p]) : acc[cb][p];
      else
        nxt[p] = (first_px ? '0 : acc[cb][p]) + acc_t'(in_data[p]);
      res[p] = (MODE == POOL_MAX) ? act_t'(nxt[p]) : average(nxt[p]);
    end
  end

  always_ff @(posedge clk) begin
    if (fire) begin
      acc[cb] <= nxt;
      if (last_px) out_data <= res;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cb        <= '0;
      px        <= '0;
      out_valid <= 1'b0;
    end else begin
      if (fire && last_px)   out_valid <= 1'b1;
      else if (out_ready)    out_valid <= 1'b0;
      if (fire) begin
        if (cb == CBW'(CB - 1)) begin
          cb <= '0;
          px <= last_px ? '0 : px + 1'b1;
        end else begin
          cb <= cb + 1'b1;
        end
      end
    end
  end
endmodule
