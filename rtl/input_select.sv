// input_select: splits the packed y word into the two y pipelines.
//
// Only one y-data address can be issued per clock, so each 6-bit y word
// carries two 1-bit complex samples: `cur`, the sample of the range block
// being integrated, and `pre`, the sample that preloads the other pipeline
// for the next block. The host lays the words out so that the word read
// for integration step c of block b holds y for that step in `cur` and the
// sample needed NSLICE-1 cycles ahead of the next block in `pre`. This
// logic steers `cur` to the pipeline of the running block (`act`) and `pre`
// to the other one. The two spare bits of the word are not used.
//
// The 6-bit word and the 2-bit pipeline inputs are published; the layout
// of the word and the steering rule are this design's choices. Purely
// combinational.
module input_select
  import radar_pkg::*;
(
  input  yword_t   word,   // word read from the y-data SRAM
  input  logic     act,    // pipeline of the running block: 0 = A, 1 = B
  output ysample_t ya,
  output ysample_t yb
);

  always_comb begin
    ya = act ? word.pre : word.cur;
    yb = act ? word.cur : word.pre;
  end

endmodule
