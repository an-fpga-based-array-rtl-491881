// sram_bank: one bank of sample memory (x-data or y-data).
//
// The host writes formatted samples through the write port; the array
// reads one word per clock through the read port, addressed by the
// control logic. Reads are synchronous: the word addressed in one cycle
// is on `rdata` in the next, and the control logic delays its own signals
// by that one cycle. A write and a read of the same address in the same
// cycle return the old word.
//
// The 15-bit address and the 12-bit (x) and 6-bit (y) read widths are
// published; the board's memories were separate SRAM chips shared with the
// host bus. Here the bank is a two-port memory array on one clock with a
// host port as wide as the read port: those are this design's choices.
module sram_bank #(
  parameter int unsigned DW = 12,   // word width
  parameter int unsigned AW = 15    // address width
) (
  input  logic          clk,
  // host write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // array read port
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
