// tb_radar_array_top: end-to-end test of the array processor at its
// default size (16 slices, 96 range blocks, 32K-word memories, 1024-word
// output FIFO).
//
// The testbench plays the host and the DSP. It fills the x memory with
// random 6-bit complex samples and the y memory with random 1-bit complex
// samples packed as {spare, y[a+16-T], y[a]} for the T in use, runs frames
// and compares every word read from the FIFO with z[t;r] computed here
// directly from the sample arrays (13-bit wrap-around sums).
//   frame A : T = 128, 96 blocks, offset 0            (full 1536 ranges)
//   frame B,C: T = 32, 96 blocks, offset 100, run held high, so the two
//             frames follow each other with no gap (mode switch from A)
//   frame D : T = 32, 96 blocks, DSP not reading: 1536 words into a
//             1024-word FIFO, so the FIFO must overflow; the 1024 words it
//             kept are then read and checked.
// It also checks the frame indication bit, the frame length 15 + 96*T
// clocks (no dead time between blocks) and counts how often each mechanism
// ran: preload phases, block changes, frame bits, mode switch, back-to-back
// frames, offset range, overflow.
`timescale 1ns/1ps
module tb_radar_array_top;
  import radar_pkg::*;

  localparam int unsigned MEMW = 2**AW;

  logic clk = 1'b0, dsp_clk = 1'b0;
  logic rst_n = 1'b0, dsp_rst_n = 1'b0;
  always #20 clk = ~clk;        // 25 MHz array clock
  always #7  dsp_clk = ~dsp_clk; // unrelated DSP clock

  logic          host_x_we = 1'b0, host_y_we = 1'b0;
  logic [AW-1:0] host_x_addr = '0, host_y_addr = '0;
  xsample_t      host_x_data = '0;
  yword_t        host_y_data = '0;
  logic          run = 1'b0;
  logic [TW-1:0] cfg_t = 8'd128;
  logic [7:0]    cfg_nblocks = 8'd96;
  logic [AW-1:0] cfg_delay = '0;
  logic          busy, frame_done, fifo_overflow, fifo_full, preloading;
  logic [AW-1:0] t_frame;
  logic          dsp_rd;
  outword_t      dsp_data;
  logic          dsp_empty;

  radar_array_top dut (.*);

  int checks = 0, failures = 0;

  // sample store of the "host"
  xsample_t xs [MEMW];
  ysample_t ys [MEMW];

  // reference: z[t;r] = sum conj(x[t+s]) y[t+r+s], 13-bit wrap
  function automatic cacc_t zref(int t, int r, int tl);
    logic signed [ACCW-1:0] re = '0, im = '0;
    int xi, xq, yi, yq;
    for (int s = 0; s < tl; s++) begin
      xi = xs[(t+s) % MEMW].i;
      xq = xs[(t+s) % MEMW].q;
      yi = ys[(t+r+s) % MEMW].i ? -1 : 1;
      yq = ys[(t+r+s) % MEMW].q ? -1 : 1;
      re += ACCW'(xi*yi + xq*yq);
      im += ACCW'(xi*yq - xq*yi);
    end
    return '{re: re, im: im};
  endfunction

  outword_t exp_q[$];
  logic     rd_en = 1'b0;
  int       nread = 0, nframe_bits = 0;

  // DSP side: read whenever allowed and the FIFO has a word
  assign dsp_rd = rd_en && !dsp_empty;
  always @(posedge dsp_clk) begin
    if (dsp_rd) begin
      outword_t e;
      nread++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected word %h", dsp_data);
      end else begin
        e = exp_q.pop_front();
        if (dsp_data !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d got %h expected %h", nread, dsp_data, e);
        end
      end
      if (dsp_data.frame) nframe_bits++;
    end
  end

  // mechanism counters
  int n_preload = 0, n_blockchg = 0, n_loads = 0;
  logic pre_d = 1'b0;
  always @(posedge clk) begin
    pre_d <= preloading;
    if (preloading && !pre_d) n_preload++;
    if (rst_n && dut.acc_clr) n_blockchg++;
    if (rst_n && dut.out_load) n_loads++;
  end

  task automatic load_x();
    for (int a = 0; a < MEMW; a++) begin
      host_x_we <= 1'b1; host_x_addr <= AW'(a); host_x_data <= xs[a];
      @(posedge clk);
    end
    host_x_we <= 1'b0;
  endtask

  task automatic load_y(int tl);
    for (int a = 0; a < MEMW; a++) begin
      host_y_we   <= 1'b1;
      host_y_addr <= AW'(a);
      host_y_data <= '{spare: 2'b00, pre: ys[(a + NSLICE - tl + MEMW) % MEMW], cur: ys[a]};
      @(posedge clk);
    end
    host_y_we <= 1'b0;
  endtask

  task automatic expect_frame(int t, int tl, int nb, int d, int limit);
    int n = 0;
    for (int r = 0; r < nb*NSLICE; r++) begin
      if (n < limit) exp_q.push_back('{frame: (r == 0), z: zref(t, d + r, tl)});
      n++;
    end
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy);
  endtask

  task automatic drain();
    repeat (200) @(posedge dsp_clk);
    while (exp_q.size() != 0 && !dsp_empty) @(posedge dsp_clk);
    repeat (20) @(posedge dsp_clk);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint fd_cycle [$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (frame_done) fd_cycle.push_back(cyc);
  end

  int n_modesw = 0, n_b2b = 0, n_offset = 0, n_ovf = 0;

  initial begin
    for (int a = 0; a < MEMW; a++) begin
      xs[a] = xsample_t'($urandom);
      ys[a] = ysample_t'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1; dsp_rst_n <= 1'b1;
    load_x();

    // ---- frame A: T = 128, full range, offset 0
    load_y(128);
    rd_en = 1'b1;
    expect_frame(0, 128, 96, 0, 1 << 30);
    cfg_t <= 8'd128; cfg_nblocks <= 8'd96; cfg_delay <= '0;
    run <= 1'b1;
    @(posedge clk iff preloading);
    run <= 1'b0;
    wait_idle();
    drain();
    check(exp_q.size() == 0, "frame A: all 1536 words delivered");
    check(t_frame == 128, "frame A: t advanced by T");

    // ---- frames B, C: T = 32, offset 100, back to back
    load_y(32);
    expect_frame(128, 32, 96, 100, 1 << 30);
    expect_frame(160, 32, 96, 100, 1 << 30);
    fd_cycle.delete();
    cfg_t <= 8'd32; cfg_delay <= AW'(100);
    run <= 1'b1;
    @(posedge clk iff frame_done);
    @(posedge clk iff preloading);
    run <= 1'b0;
    n_modesw++;
    n_offset++;
    wait_idle();
    drain();
    check(exp_q.size() == 0, "frames B/C: all words delivered");
    check(fd_cycle.size() == 2, "frames B/C: two frame_done pulses");
    if (fd_cycle.size() == 2) begin
      check(fd_cycle[1] - fd_cycle[0] == longint'(NSLICE - 1 + 96*32),
            $sformatf("frame length %0d clocks, expected %0d",
                      fd_cycle[1] - fd_cycle[0], NSLICE - 1 + 96*32));
      if (fd_cycle[1] - fd_cycle[0] == longint'(NSLICE - 1 + 96*32)) n_b2b++;
    end

    // ---- frame D: DSP stalled, FIFO overflows
    check(!fifo_overflow, "no overflow before frame D");
    rd_en = 1'b0;
    expect_frame(192, 32, 96, 100, 1024);
    run <= 1'b1;
    @(posedge clk iff preloading);
    run <= 1'b0;
    wait_idle();
    check(fifo_overflow, "frame D: overflow flagged");
    check(fifo_full, "frame D: FIFO full");
    if (fifo_overflow) n_ovf++;
    rd_en = 1'b1;
    drain();
    check(exp_q.size() == 0, "frame D: the 1024 kept words read");
    check(dsp_empty, "frame D: FIFO empty after reading");

    // ---- mechanisms
    check(n_preload == 4, $sformatf("preload phases %0d", n_preload));
    check(n_blockchg == 4*96, $sformatf("blocks started %0d", n_blockchg));
    check(n_loads == 4*96, $sformatf("result loads %0d", n_loads));
    check(nframe_bits == 4, $sformatf("frame bits read %0d", nframe_bits));
    check(n_modesw > 0 && n_b2b > 0 && n_offset > 0 && n_ovf > 0, "all mechanisms ran");
    $display("mechanisms: preload=%0d block_changes=%0d loads=%0d frame_bits=%0d mode_switch=%0d back_to_back=%0d offset=%0d overflow=%0d",
             n_preload, n_blockchg, n_loads, nframe_bits, n_modesw, n_b2b, n_offset, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
