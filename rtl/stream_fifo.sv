// stream_fifo: the FIFO channel that connects two dataflow tasks.
//
// A circular buffer of DEPTH words with a valid/ready handshake on both
// sides (a word moves when valid and ready are both high on a clock edge).
// The output is read straight from the array, so a word written in cycle t
// is visible at the output in cycle t+1; a full FIFO accepts a word in the
// same cycle as one leaves. The same module is the skip-connection buffer of
// a residual block, sized by the Temporal Reuse formula. The handshake and
// the flat array are this design's choice; the document only says tasks
// talk through streams.
module stream_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH)) || out_ready;
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // A full FIFO only accepts a word when one leaves in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   push && !pop |-> count < (AW+1)'(DEPTH));

endmodule
