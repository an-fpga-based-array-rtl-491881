// tb_array_control: cycle-exact test of address generation and data flow
// control.
//
// For each frame the testbench builds the expected schedule from the frame
// definition: 15 preload cycles (b = -1, c = T-15..T-1) then NB blocks of
// T steps; x address t+c, y address t+D+16b+15+c; one cycle later the
// active pipeline (block parity, B while preloading) and the accumulator
// restart on c = 0; two cycles later the result load after each block's
// last step, with the frame bit for block 0; then 16 cycles of out_valid.
// Every output is compared in every cycle from the first preload cycle to
// the end of the schedule. Three frames are run: T=40, 3 blocks, D=5;
// then, with run held, T=32, 2 blocks, D=1000 directly behind it (mode
// switch with no gap); then a frame with out-of-range settings
// (T=200, 0 blocks), which must run as T=128 and 1 block. The frame
// length 15 + NB*T and the advance of t by T are checked too.
`timescale 1ns/1ps
module tb_array_control;
  import radar_pkg::*;

  localparam int N = NSLICE;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          run = 1'b0;
  logic [TW-1:0] cfg_t = '0;
  logic [7:0]    cfg_nblocks = '0;
  logic [AW-1:0] cfg_delay = '0;
  logic [AW-1:0] x_addr, y_addr, t_frame;
  logic          act, acc_clr, out_load, frame_bit, out_valid, in_preload, busy, frame_done;

  always #5 clk = ~clk;

  array_control dut (.*);

  int checks = 0, failures = 0;

  // expected values per cycle, relative to the first preload cycle
  int e_x[int], e_y[int], e_act[int];
  bit e_clr[int], e_ld[int], e_fb[int], e_v[int], e_pre[int], e_fd[int];

  // fill the schedule of one frame starting at cycle o; returns its length
  function automatic int plan(int o, int t, int tl, int nb, int d);
    int i = 0;
    for (int c = tl - (N-1); c < tl; c++) begin
      e_y[o+i]   = (t + d - N + N - 1 + c) % 2**AW;
      e_pre[o+i] = 1;
      e_act[o+i+1] = 1;
      i++;
    end
    for (int b = 0; b < nb; b++) begin
      for (int c = 0; c < tl; c++) begin
        e_x[o+i] = (t + c) % 2**AW;
        e_y[o+i] = (t + d + b*N + N - 1 + c) % 2**AW;
        e_act[o+i+1] = b % 2;
        if (c == 0) e_clr[o+i+1] = 1;
        if (c == tl - 1) begin
          e_ld[o+i+2] = 1;
          if (b == 0) e_fb[o+i+2] = 1;
          for (int v = 3; v < 3 + N; v++) e_v[o+i+v] = 1;
          if (b == nb - 1) e_fd[o+i+1] = 1;
        end
        i++;
      end
    end
    return i;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  int cyc = -1, last = 0;
  int n_pre = 0, n_fb = 0, n_ld = 0;

  always @(posedge clk) begin
    if (cyc < 0 && in_preload) cyc = 0;
    if (cyc >= 0 && cyc <= last) begin
      if (e_x.exists(cyc))   check(x_addr == AW'(e_x[cyc]), $sformatf("cycle %0d x_addr %0d expected %0d", cyc, x_addr, e_x[cyc]));
      if (e_y.exists(cyc))   check(y_addr == AW'(e_y[cyc]), $sformatf("cycle %0d y_addr %0d expected %0d", cyc, y_addr, e_y[cyc]));
      if (e_act.exists(cyc)) check(act == 1'(e_act[cyc]), $sformatf("cycle %0d act", cyc));
      check(in_preload == e_pre.exists(cyc), $sformatf("cycle %0d in_preload", cyc));
      check(acc_clr == e_clr.exists(cyc), $sformatf("cycle %0d acc_clr", cyc));
      check(out_load == e_ld.exists(cyc), $sformatf("cycle %0d out_load", cyc));
      check(frame_bit == e_fb.exists(cyc), $sformatf("cycle %0d frame_bit", cyc));
      check(out_valid == e_v.exists(cyc), $sformatf("cycle %0d out_valid", cyc));
      check(frame_done == e_fd.exists(cyc), $sformatf("cycle %0d frame_done", cyc));
      if (in_preload) n_pre++;
      if (frame_bit) n_fb++;
      if (out_load) n_ld++;
    end
    if (cyc >= 0) cyc++;
  end

  initial begin
    int l1, l2, l3;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!busy && t_frame == 0, "idle after reset");
    // frames 1 and 2 back to back
    l1 = plan(0, 0, 40, 3, 5);
    l2 = plan(l1, 40, 32, 2, 1000);
    last = l1 + l2 + N + 3;
    cfg_t <= 8'd40; cfg_nblocks <= 8'd3; cfg_delay <= AW'(5);
    run <= 1'b1;
    @(posedge clk iff in_preload);
    cfg_t <= 8'd32; cfg_nblocks <= 8'd2; cfg_delay <= AW'(1000);
    @(posedge clk iff frame_done);
    check(t_frame == 40, "t advanced by 40");
    @(posedge clk iff in_preload);
    run <= 1'b0;
    @(posedge clk iff !busy);
    check(t_frame == 72, "t advanced by 32");
    check(n_pre == 2*(N-1), "preload cycles");
    check(n_fb == 2, "frame bits");
    check(n_ld == 5, "result loads");
    // frame 3: settings out of range are clamped
    repeat (5) @(posedge clk);
    e_x.delete(); e_y.delete(); e_act.delete(); e_clr.delete(); e_ld.delete();
    e_fb.delete(); e_v.delete(); e_pre.delete(); e_fd.delete();
    l3 = plan(0, 72, 128, 1, 7);
    cyc = -1;
    last = l3 + N + 3;
    cfg_t <= 8'd200; cfg_nblocks <= 8'd0; cfg_delay <= AW'(7);
    run <= 1'b1;
    @(posedge clk iff in_preload);
    run <= 1'b0;
    @(posedge clk iff !busy);
    repeat (2) @(posedge clk);
    check(t_frame == 200, "t advanced by the clamped T");
    check(n_fb == 3 && n_ld == 6, "frame 3 produced one block");
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
