// nn2fpga_pkg: widths and sizing formulas shared by the dataflow CNN blocks.
//
// Activations and weights are signed 8-bit integers with power-of-two
// scales; accumulators are 32 bits. The sizing functions follow the buffer
// formulas of the architecture: the window (line) buffer of a FH x FW
// convolution, and the skip-connection buffer left after Temporal Reuse.
// The widths are this design's choice for the 8-bit configuration.
package nn2fpga_pkg;

  localparam int ACT_W = 8;   // activation bits
  localparam int WGT_W = 8;   // weight bits
  localparam int ACC_W = 32;  // accumulator bits
  localparam int PAR_W = 16;  // parameter stream beat (weight in low bits, bias in full)

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [PAR_W-1:0] par_t;

  // Activations a window buffer must retain: [(fh-1)*iw + fw - 1] * ich.
  function automatic int window_buffer_size(int fh, int fw, int iw, int ich);
    return ((fh - 1) * iw + fw - 1) * ich;
  endfunction

  // Skip buffering left after Temporal Reuse: [(fh1-1)*iw0 + fw1] * ich0.
  function automatic int skip_buffer_size(int fh1, int fw1, int iw0, int ich0);
    return ((fh1 - 1) * iw0 + fw1) * ich0;
  endfunction

  // Skip buffering without Temporal Reuse: [iw0*(rh0-1) + rw0] * ich0,
  // rh0 = fh1 + fh0 - 1, rw0 = fw1 + fw0 - 1 (receptive field).
  function automatic int skip_buffer_size_noopt(int fh0, int fw0, int fh1, int fw1,
                                                int iw0, int ich0);
    return (iw0 * (fh1 + fh0 - 2) + (fw1 + fw0 - 1)) * ich0;
  endfunction

  // Depth of window-buffer segment k (k = 0 is the newest activation):
  // 1 for the head, ich between taps of one window row, ich*(iw-fw+1)
  // between the last tap of a row and the first of the row above.
  function automatic int segment_depth(int k, int fw, int iw, int ich_beats);
    if (k == 0) return 1;
    if (k % fw == 0) return ich_beats * (iw - fw + 1);
    return ich_beats;
  endfunction

  // Reduction performed by a pooling task.
  typedef enum logic [0:0] {POOL_AVG = 1'b0, POOL_MAX = 1'b1} pool_mode_e;

  function automatic int max_int(int a, int b);
    return (a > b) ? a : b;
  endfunction

endpackage
