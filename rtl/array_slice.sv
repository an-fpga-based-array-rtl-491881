// array_slice: one stage of the 16-stage correlation array.
//
// Each slice computes one range of the cross-ambiguity function
//   z[t;r] = sum_{s=0}^{T-1} conj(x[t+s]) * y[t+r+s].
// The reference sample x is broadcast to every slice; the 1-bit complex
// scattered sample y travels through the array in two pipelines (A and B),
// one register per slice each. While one pipeline feeds the running range
// block, the other is filled with the samples of the next block, so blocks
// follow each other with no dead cycles. The slice taps both pipelines at
// its input, before its own registers, and `ysel` picks the one of the
// running block.
//
// Because y is only +1 or -1 per component, the complex multiply reduces to
// sign selection (multiplexers) and two adders:
//   re = xi*yi + xq*yq,   im = xi*yq - xq*yi.
// The 13-bit accumulator restarts with the current product when `acc_clr`
// is high (first step of a block) and adds otherwise; sums wrap modulo
// 2^13. The output register either loads the slice's own accumulator
// (`out_load`, one cycle after a block's last step) or takes the previous
// slice's output register, so the 16 results shift out one per cycle.
//
// Structure, widths and register placement follow the published slice;
// the sign encoding of y, doing the conjugation in the slice and the
// restart-by-load form of the accumulator reset are this design's choices.
// Timing: all registers update on the rising edge of clk; rst_n is an
// asynchronous active-low reset that clears every register.
module array_slice
  import radar_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  xsample_t x,         // broadcast reference sample
  input  ysample_t ya_in,     // y pipeline A from the previous slice
  input  ysample_t yb_in,     // y pipeline B from the previous slice
  input  logic     ysel,      // 0: use pipeline A, 1: use pipeline B
  input  logic     acc_clr,   // first step of a block: restart the sum
  input  logic     out_load,  // load own sum into the output register
  input  cacc_t    out_in,    // output register of the previous slice
  output ysample_t ya_out,
  output ysample_t yb_out,
  output cacc_t    acc_q,
  output cacc_t    out_q
);

  ysample_t y;
  logic signed [ACCW-1:0] xi, xq, p_re, p_im;
  cacc_t prod;

  always_comb begin
    y    = ysel ? yb_in : ya_in;
    xi   = {{(ACCW-XW){x.i[XW-1]}}, x.i};
    xq   = {{(ACCW-XW){x.q[XW-1]}}, x.q};
    p_re = (y.i ? -xi : xi) + (y.q ? -xq : xq);
    p_im = (y.q ? -xi : xi) - (y.i ? -xq : xq);
    prod.re = p_re;
    prod.im = p_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ya_out <= '0;
      yb_out <= '0;
      acc_q  <= '0;
      out_q  <= '0;
    end else begin
      ya_out <= ya_in;
      yb_out <= yb_in;
      if (acc_clr) begin
        acc_q <= prod;
      end else begin
        acc_q.re <= acc_q.re + prod.re;
        acc_q.im <= acc_q.im + prod.im;
      end
      out_q <= out_load ? acc_q : out_in;
    end
  end

endmodule
