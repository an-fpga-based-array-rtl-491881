// systolic_array: the 16-slice correlation array.
//
// The 1536-range correlation is time-multiplexed onto NSLICE hardware
// slices: one range block of NSLICE ranges is integrated at a time, one
// step s per clock. The reference sample x is broadcast to all slices;
// the two 2-bit y pipelines enter slice 0 from the input select logic and
// advance one slice per clock, so slice k sees the y stream k cycles late.
// With x and y read in forward time order, slice k therefore computes range
// r_block + (NSLICE-1-k) of the block; the last slice holds the lowest
// range of the block.
//
// Results leave through the chain of output registers: `out_load` copies
// every accumulator into its output register, after which the chain shifts
// one slice per clock towards the last slice, whose register is 27 bits
// wide: the 26-bit sum plus the frame indication bit, loaded from
// `frame_bit` together with the sums. `out_word` is therefore the lowest
// range of the block in the cycle after the load, and the next higher range
// in each following cycle, for NSLICE cycles.
//
// The slice structure, the broadcast/pipelined data flow and the 27-bit
// output follow the published array; the direction of range numbering is
// a consequence of the forward read order chosen here.
module systolic_array
  import radar_pkg::*;
#(
  parameter int unsigned N = NSLICE     // number of slices
) (
  input  logic     clk,
  input  logic     rst_n,
  input  xsample_t x,
  input  ysample_t ya_in,
  input  ysample_t yb_in,
  input  logic     ysel,
  input  logic     acc_clr,
  input  logic     out_load,
  input  logic     frame_bit,
  output outword_t out_word
);

  ysample_t ya [N+1];
  ysample_t yb [N+1];
  cacc_t    oc [N+1];
  logic     frame_q;

  assign ya[0] = ya_in;
  assign yb[0] = yb_in;
  assign oc[0] = '0;

  for (genvar k = 0; k < N; k++) begin : g_slice
    array_slice u_slice (
      .clk     (clk),
      .rst_n   (rst_n),
      .x       (x),
      .ya_in   (ya[k]),
      .yb_in   (yb[k]),
      .ysel    (ysel),
      .acc_clr (acc_clr),
      .out_load(out_load),
      .out_in  (oc[k]),
      .ya_out  (ya[k+1]),
      .yb_out  (yb[k+1]),
      .acc_q   (),
      .out_q   (oc[k+1])
    );
  end

  // Frame indication bit: the 27th bit of the last output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frame_q <= 1'b0;
    else        frame_q <= out_load ? frame_bit : 1'b0;
  end

  assign out_word.frame = frame_q;
  assign out_word.z     = oc[N];

endmodule
