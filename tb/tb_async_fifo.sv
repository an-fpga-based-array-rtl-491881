// tb_async_fifo: the dual-clock output FIFO at its default size
// (1024 x 27 bits), with a 40 ns write clock and a 14 ns read clock.
//   1. random writes and reads on both sides: every word must come out
//      once, in order, and the FIFO must never claim to be full or empty
//      wrongly (no word lost, none invented);
//   2. the reader stops: after 1024 words the FIFO is full, further writes
//      are dropped and set the overflow flag; the 1024 kept words are then
//      read back in order and the FIFO ends empty.
`timescale 1ns/1ps
module tb_async_fifo;

  localparam int unsigned DW = 27, AW = 10, DEPTH = 2**AW;

  logic          wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic          winc = 1'b0, rinc;
  logic [DW-1:0] wdata = '0, rdata;
  logic          wfull, overflow, rempty;

  always #20 wclk = ~wclk;
  always #7  rclk = ~rclk;

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];
  logic rd_en = 1'b0;
  int nread = 0, n_full = 0, n_empty_wait = 0;

  assign rinc = rd_en && !rempty && ($urandom % 3 != 0);

  always @(posedge rclk) begin
    if (rinc) begin
      logic [DW-1:0] e;
      checks++;
      nread++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: read from a FIFO that should be empty");
      end else begin
        e = q.pop_front();
        if (rdata !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: read %h expected %h", rdata, e);
        end
      end
    end
    if (rd_en && rempty) n_empty_wait++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n <= 1'b1;
    rrst_n <= 1'b1;
    @(posedge wclk);
    check(!wfull && !overflow, "reset state (write side)");
    check(rempty, "reset state (read side)");
    // 1. random traffic
    rd_en = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      automatic logic w = ($urandom % 2) == 0;
      automatic logic [DW-1:0] d = DW'($urandom);
      if (w && !wfull) q.push_back(d);
      if (wfull) n_full++;
      winc  <= w && !wfull;
      wdata <= d;
      @(posedge wclk);
      #1;
    end
    winc <= 1'b0;
    repeat (50) @(posedge wclk);
    check(q.size() == 0, "all random-traffic words read");
    check(!overflow, "no overflow under random traffic");
    // 2. reader stopped: fill and overflow
    rd_en = 1'b0;
    repeat (10) @(posedge wclk);
    for (int n = 0; n < DEPTH + 20; n++) begin
      automatic logic [DW-1:0] d = DW'($urandom);
      if (n < DEPTH) begin
        check(!wfull, $sformatf("not full before word %0d", n));
        q.push_back(d);
      end else begin
        check(wfull, $sformatf("full at word %0d", n));
      end
      winc  <= 1'b1;
      wdata <= d;
      @(posedge wclk);
      #1;
    end
    winc <= 1'b0;
    @(posedge wclk);
    check(overflow, "overflow flagged");
    rd_en = 1'b1;
    repeat (DEPTH * 4) @(posedge rclk);
    check(q.size() == 0, "the kept words read back");
    check(rempty, "empty at the end");
    repeat (5) @(posedge wclk);
    check(!wfull, "not full at the end");
    check(n_empty_wait > 0, "reader waited on empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
