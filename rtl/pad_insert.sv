// pad_insert: adds a zero border of PAD pixels around a streamed tensor.
//
// The tensor arrives depth first (all channel beats of a pixel, then the
// next pixel of the row, then the next row), ICH_BEATS beats per pixel, and
// leaves as an (IH+2*PAD) x (IW+2*PAD) tensor in the same order. Counters
// walk the padded tensor; on border positions the module emits zero beats
// without reading its input, elsewhere it passes input beats through
// combinationally (no added latency). Frames follow each other without a gap.
// Same padding is not described by the document; this block exists so that
// the residual add sees equal tensor sizes on both branches, as ResNet needs.
module pad_insert #(
  parameter int BEAT_W    = 16,
  parameter int ICH_BEATS = 8,
  parameter int IH        = 32,
  parameter int IW        = 32,
  parameter int PAD       = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [BEAT_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [BEAT_W-1:0] out_data
);
  localparam int OH = IH + 2 * PAD;
  localparam int OW = IW + 2 * PAD;

  logic [$clog2(ICH_BEATS+1)-1:0] cb;
  logic [$clog2(OW+1)-1:0]        col;
  logic [$clog2(OH+1)-1:0]        row;
  logic                           border;

  always_comb begin
    border = (row < PAD) || (row >= OH - PAD) || (col < PAD) || (col >= OW - PAD);
    out_valid = border ? 1'b1 : in_valid;
    out_data  = border ? '0 : in_data;
    in_ready  = border ? 1'b0 : out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cb  <= '0;
      col <= '0;
      row <= '0;
    end else if (out_valid && out_ready) begin
      if (cb == ICH_BEATS - 1) begin
        cb <= '0;
        if (col == OW - 1) begin
          col <= '0;
          row <= (row == OH - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end else begin
        cb <= cb + 1'b1;
      end
    end
  end
endmodule
