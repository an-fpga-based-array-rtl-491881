// tb_input_select: exhaustive test of the y word steering.
// For all 64 words and both settings of `act`, the current-block sample
// (bits 1:0) must go to the active pipeline and the preload sample
// (bits 3:2) to the other one.
`timescale 1ns/1ps
module tb_input_select;
  import radar_pkg::*;

  yword_t   word;
  logic     act;
  ysample_t ya, yb;

  input_select dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int w = 0; w < 64; w++) begin
      for (int a = 0; a < 2; a++) begin
        logic [1:0] cur, pre, ea, eb;
        word = yword_t'(w);
        act  = 1'(a);
        cur  = 2'(w);
        pre  = 2'(w >> 2);
        ea   = (a == 0) ? cur : pre;
        eb   = (a == 0) ? pre : cur;
        #1;
        checks++;
        if (ya !== ysample_t'(ea) || yb !== ysample_t'(eb)) begin
          failures++;
          $display("FAIL: word %02h act %0d: ya %b yb %b", w, a, ya, yb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
