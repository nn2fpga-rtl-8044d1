// delay_line: one segment of a partitioned window buffer.
//
// Holds the last DEPTH words shifted in. q is the oldest of them, the word
// that leaves on the next shift, so a chain of delay lines behaves as one
// long shift register whose segment boundaries are read points. Stored as a
// circular buffer (one write and one read per shift) so that a long segment
// maps onto a RAM rather than DEPTH registers. Contents are not reset; the
// window buffer only uses them once they have been written.
module delay_line #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign q = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
