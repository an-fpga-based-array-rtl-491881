// async_fifo: dual-clock FIFO between the array and the DSP.
//
// The array writes one 27-bit result word per clock in bursts of 16 at its
// own clock; the DSP reads at its own pace on a different clock. Read and
// write pointers are kept in binary for addressing and passed between the
// clock domains in Gray code through two-flop synchronisers, so at most
// one bit changes per transfer. Full and empty compare the local pointer
// with the synchronised remote one, using one extra pointer bit to tell a
// full buffer from an empty one; both are conservative (a word written is
// seen by the reader two or three read clocks later).
//
// The real-time array cannot be stalled, so a write while full is dropped
// and sets the sticky `overflow` flag (cleared by the write-side reset).
// The read side is first-word-fall-through: `rdata` shows the oldest word
// while `rempty` is low, and `rinc` removes it.
//
// The asynchronous FIFO and its 27-bit width are published; the depth
// (2**AW words), the pointer scheme and the overflow behaviour are this
// design's choices.
module async_fifo #(
  parameter int unsigned DW = 27,   // word width
  parameter int unsigned AW = 10    // log2 of the depth
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          winc,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  output logic          overflow,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rinc,
  output logic [DW-1:0] rdata,
  output logic          rempty
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;
  logic [AW:0] wbin_nxt, rbin_nxt;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] v);
    return v ^ (v >> 1);
  endfunction

  // write domain
  assign wfull    = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  assign wbin_nxt = wbin + (AW+1)'(winc && !wfull);

  always_ff @(posedge wclk) begin
    if (winc && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
      overflow  <= 1'b0;
    end else begin
      wbin      <= wbin_nxt;
      wgray     <= bin2gray(wbin_nxt);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      if (winc && wfull) overflow <= 1'b1;
    end
  end

  // read domain
  assign rempty   = (rgray == rq2_wgray);
  assign rbin_nxt = rbin + (AW+1)'(rinc && !rempty);
  assign rdata    = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_nxt;
      rgray     <= bin2gray(rbin_nxt);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

endmodule
