// tb_sram_bank: write every word of a 32K x 12 bank with random data,
// read it all back, and check the one-cycle read latency and that a read
// of the address being written returns the old word.
`timescale 1ns/1ps
module tb_sram_bank;

  localparam int unsigned DW = 12, AW = 15;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0;
  logic [DW-1:0] rdata;

  always #5 clk = ~clk;

  sram_bank #(.DW(DW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] img [2**AW];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      img[a] = DW'($urandom);
      we <= 1'b1; waddr <= AW'(a); wdata <= img[a];
      @(posedge clk);
    end
    we <= 1'b0;
    // read back in a scrambled order, one per clock
    for (int n = 0; n < 2**AW; n++) begin
      automatic int a = (n * 7919) % (2**AW);
      raddr <= AW'(a);
      @(posedge clk);
      #1;
      check(rdata == img[a], $sformatf("addr %0d read %h expected %h", a, rdata, img[a]));
    end
    // read during write of the same address: old data, new data next time
    raddr <= AW'(123); waddr <= AW'(123); wdata <= ~img[123]; we <= 1'b1;
    @(posedge clk);
    #1;
    check(rdata == img[123], "read during write returns the old word");
    we <= 1'b0;
    @(posedge clk);
    #1;
    check(rdata == ~img[123], "written word read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
