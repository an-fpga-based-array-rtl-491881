// tb_systolic_array: the 16-slice array driven with a block schedule.
//
// The testbench generates, for each of NB range blocks, a random reference
// stream x_b[c] (c = 0..T-1) and a random y stream Y_b[c] (c = -15..T-1).
// It feeds them the way the control logic does: 15 preload cycles that
// fill pipeline A with Y_0[-15..-1], then each block b on pipeline b%2
// while the other pipeline receives Y_{b+1}[c-T] in the block's last 15
// cycles and random junk before that. Slice k must then hold
//   sum_c conj(x_b[c]) * Y_b[c-k],
// and after each load the array must emit slices 15, 14, ..., 0 on
// consecutive cycles, with the frame bit on the first word of block 0.
// Checks: every output word and its frame bit, the word order and that the
// results follow the load by exactly one cycle.
`timescale 1ns/1ps
module tb_systolic_array;
  import radar_pkg::*;

  localparam int N  = NSLICE;
  localparam int T  = 32;
  localparam int NB = 5;

  logic     clk = 1'b0, rst_n = 1'b0;
  xsample_t x = '0;
  ysample_t ya_in = '0, yb_in = '0;
  logic     ysel = 1'b0, acc_clr = 1'b0, out_load = 1'b0, frame_bit = 1'b0;
  outword_t out_word;

  always #5 clk = ~clk;

  systolic_array dut (.*);

  int checks = 0, failures = 0;

  xsample_t xb [NB][T];
  ysample_t yb [NB+1][T+N-1];   // index c + N - 1

  function automatic cacc_t zslice(int b, int k);
    logic signed [ACCW-1:0] re = '0, im = '0;
    for (int c = 0; c < T; c++) begin
      int xi = xb[b][c].i, xq = xb[b][c].q;
      ysample_t y = yb[b][c - k + N - 1];
      int yi = y.i ? -1 : 1, yq = y.q ? -1 : 1;
      re += ACCW'(xi*yi + xq*yq);
      im += ACCW'(xi*yq - xq*yi);
    end
    return '{re: re, im: im};
  endfunction

  // output monitor
  int mon_cnt = 0, mon_blk = 0, nwords = 0;
  outword_t e;
  always @(posedge clk) begin
    if (mon_cnt > 0) begin
      automatic int k = mon_cnt - 1;         // slice N-1 first
      e = '{frame: (mon_blk == 0 && k == N - 1), z: zslice(mon_blk, k)};
      checks++;
      nwords++;
      if (out_word !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: block %0d slice %0d got %h expected %h", mon_blk, k, out_word, e);
      end
      mon_cnt--;
    end
    if (rst_n && out_load) begin
      mon_cnt <= N;
      mon_blk <= mon_blk_next;
    end
  end
  int mon_blk_next = 0;

  task automatic drive(xsample_t xv, ysample_t a, ysample_t bb, logic sel, logic clr, logic ld, logic fb);
    x <= xv; ya_in <= a; yb_in <= bb; ysel <= sel; acc_clr <= clr; out_load <= ld; frame_bit <= fb;
    @(posedge clk);
  endtask

  initial begin
    for (int b = 0; b <= NB; b++)
      for (int i = 0; i < T + N - 1; i++) yb[b][i] = ysample_t'($urandom);
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < T; c++) xb[b][c] = xsample_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // preload of block 0 into pipeline A
    for (int c = -(N-1); c < 0; c++)
      drive(xsample_t'($urandom), yb[0][c + N - 1], ysample_t'($urandom), 1'b1, 1'b0, 1'b0, 1'b0);
    for (int b = 0; b < NB; b++) begin
      for (int c = 0; c < T; c++) begin
        automatic ysample_t cur = yb[b][c + N - 1];
        automatic ysample_t pre = (c >= T - (N-1) && b + 1 < NB) ? yb[b+1][c - T + N - 1] : ysample_t'($urandom);
        automatic logic ld = (b > 0 && c == 0);
        if (ld) mon_blk_next = b - 1;
        if (b % 2 == 0) drive(xb[b][c], cur, pre, 1'b0, c == 0, ld, ld && b == 1);
        else            drive(xb[b][c], pre, cur, 1'b1, c == 0, ld, ld && b == 1);
      end
    end
    mon_blk_next = NB - 1;
    drive('0, '0, '0, 1'b0, 1'b0, 1'b1, NB == 1);
    repeat (N + 4) drive('0, '0, '0, 1'b0, 1'b0, 1'b0, 1'b0);
    checks++;
    if (nwords != NB * N) begin
      failures++;
      $display("FAIL: %0d words seen, expected %0d", nwords, NB * N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
