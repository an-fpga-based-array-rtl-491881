// radar_array_top: array processor of the passive ionospheric radar.
//
// The processor computes the cross-ambiguity function
//   z[t;r] = sum_{s=0}^{T-1} conj(x[t+s]) * y[t+r+s]
// of a 6-bit complex reference signal x (the direct FM broadcast) and a
// 1-bit complex scattered signal y, for 96 range blocks of 16 ranges
// (1536 ranges) at every T-th sample time. A virtual 1536-stage array is
// time-multiplexed onto a 16-slice hardware array: each range block is
// integrated in T clocks, so a frame of 96 blocks takes 15 + 96*T clocks,
// less than the 100*T clocks that T samples last at 25 MHz / 250 kHz.
//
// Parts and data flow:
//   sram_bank (x)   32K x 12 reference samples, written by the host;
//   sram_bank (y)   32K x 6 packed scattered-sample words (current and
//                   preload sample), written by the host;
//   array_control   address generation and data flow control;
//   input_select    steers the two samples of a y word to the pipelines;
//   systolic_array  16 slices; x broadcast, y pipelined, results shifted
//                   out in range order with the frame indication bit;
//   async_fifo      27-bit dual-clock FIFO to the DSP (bridge board).
// The host software that formats the samples and the DSP that computes the
// autocorrelation are outside this module: their ports are brought out.
//
// Interface timing: host writes take effect at the next clk edge; `run`
// starts frames (configuration is sampled at each frame start); results
// appear at the FIFO read port in the dsp_clk domain in increasing range
// order, the first word of each frame with `frame` set.
module radar_array_top
  import radar_pkg::*;
#(
  parameter int unsigned FIFO_AW = 10   // log2 of the output FIFO depth
) (
  input  logic          clk,
  input  logic          rst_n,
  // host download port
  input  logic          host_x_we,
  input  logic [AW-1:0] host_x_addr,
  input  xsample_t      host_x_data,
  input  logic          host_y_we,
  input  logic [AW-1:0] host_y_addr,
  input  yword_t        host_y_data,
  // run-time configuration
  input  logic          run,
  input  logic [TW-1:0] cfg_t,
  input  logic [7:0]    cfg_nblocks,
  input  logic [AW-1:0] cfg_delay,
  // status
  output logic          busy,
  output logic          frame_done,
  output logic [AW-1:0] t_frame,
  output logic          fifo_overflow,
  output logic          fifo_full,
  output logic          preloading,     // first block of a frame is being preloaded
  // DSP side of the bridge FIFO
  input  logic          dsp_clk,
  input  logic          dsp_rst_n,
  input  logic          dsp_rd,
  output outword_t      dsp_data,
  output logic          dsp_empty
);

  logic [AW-1:0] x_addr, y_addr;
  xsample_t      x_rd;
  yword_t        y_rd;
  logic          act, acc_clr, out_load, frame_bit, out_valid;
  ysample_t      ya, yb;
  outword_t      arr_out;

  sram_bank #(.DW($bits(xsample_t)), .AW(AW)) u_xmem (
    .clk  (clk),
    .we   (host_x_we),
    .waddr(host_x_addr),
    .wdata(host_x_data),
    .raddr(x_addr),
    .rdata(x_rd)
  );

  sram_bank #(.DW($bits(yword_t)), .AW(AW)) u_ymem (
    .clk  (clk),
    .we   (host_y_we),
    .waddr(host_y_addr),
    .wdata(host_y_data),
    .raddr(y_addr),
    .rdata(y_rd)
  );

  array_control #(.N(NSLICE), .MAXB(NBLOCKS)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (run),
    .cfg_t      (cfg_t),
    .cfg_nblocks(cfg_nblocks),
    .cfg_delay  (cfg_delay),
    .x_addr     (x_addr),
    .y_addr     (y_addr),
    .act        (act),
    .acc_clr    (acc_clr),
    .out_load   (out_load),
    .frame_bit  (frame_bit),
    .out_valid  (out_valid),
    .in_preload (preloading),
    .busy       (busy),
    .frame_done (frame_done),
    .t_frame    (t_frame)
  );

  input_select u_isel (
    .word(y_rd),
    .act (act),
    .ya  (ya),
    .yb  (yb)
  );

  systolic_array #(.N(NSLICE)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .x        (x_rd),
    .ya_in    (ya),
    .yb_in    (yb),
    .ysel     (act),
    .acc_clr  (acc_clr),
    .out_load (out_load),
    .frame_bit(frame_bit),
    .out_word (arr_out)
  );

  async_fifo #(.DW(OUTW), .AW(FIFO_AW)) u_fifo (
    .wclk    (clk),
    .wrst_n  (rst_n),
    .winc    (out_valid),
    .wdata   (arr_out),
    .wfull   (fifo_full),
    .overflow(fifo_overflow),
    .rclk    (dsp_clk),
    .rrst_n  (dsp_rst_n),
    .rinc    (dsp_rd),
    .rdata   (dsp_data),
    .rempty  (dsp_empty)
  );

endmodule
