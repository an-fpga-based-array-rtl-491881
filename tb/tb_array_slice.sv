// tb_array_slice: random test of one array slice.
//
// Drives random reference samples, y samples on both pipelines, pipeline
// selects, accumulator restarts and output loads, and keeps a cycle model
// of the slice written from the equations
//   re = xi*yi + xq*yq, im = xi*yq - xq*yi  (y component bit 1 = -1),
// a 13-bit accumulator that restarts on acc_clr, the output register that
// loads the sum or takes the previous slice's value, and the two y
// pipeline registers. Every output is compared after every clock.
`timescale 1ns/1ps
module tb_array_slice;
  import radar_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  xsample_t x = '0;
  ysample_t ya_in = '0, yb_in = '0;
  logic     ysel = 1'b0, acc_clr = 1'b0, out_load = 1'b0;
  cacc_t    out_in = '0;
  ysample_t ya_out, yb_out;
  cacc_t    acc_q, out_q;

  always #5 clk = ~clk;

  array_slice dut (.*);

  int checks = 0, failures = 0;
  int m_re = 0, m_im = 0;      // model accumulator (wrapped to 13 bits)
  cacc_t    m_out = '0;
  ysample_t m_ya = '0, m_yb = '0;
  int n_clr = 0, n_load = 0, n_b = 0;

  function automatic int wrap13(int v);
    return int'(signed'(ACCW'(v)));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check(acc_q == '0 && out_q == '0, "reset state");
    for (int n = 0; n < 3000; n++) begin
      int xi, xq, yi, yq, pr, pi;
      ysample_t y;
      // new stimulus
      x        = xsample_t'($urandom);
      ya_in    = ysample_t'($urandom);
      yb_in    = ysample_t'($urandom);
      ysel     = 1'($urandom);
      acc_clr  = ($urandom % 8) == 0;
      out_load = ($urandom % 6) == 0;
      out_in   = cacc_t'($urandom);
      // model of the clock edge
      y  = ysel ? yb_in : ya_in;
      xi = x.i; xq = x.q;
      yi = y.i ? -1 : 1; yq = y.q ? -1 : 1;
      pr = xi*yi + xq*yq;
      pi = xi*yq - xq*yi;
      m_out = out_load ? '{re: ACCW'(m_re), im: ACCW'(m_im)} : out_in;
      if (acc_clr) begin m_re = wrap13(pr); m_im = wrap13(pi); end
      else begin m_re = wrap13(m_re + pr); m_im = wrap13(m_im + pi); end
      m_ya = ya_in; m_yb = yb_in;
      if (acc_clr) n_clr++;
      if (out_load) n_load++;
      if (ysel) n_b++;
      @(posedge clk);
      #1;
      check(int'(acc_q.re) == m_re && int'(acc_q.im) == m_im,
            $sformatf("step %0d acc %0d,%0d expected %0d,%0d", n, acc_q.re, acc_q.im, m_re, m_im));
      check(out_q == m_out, $sformatf("step %0d out %h expected %h", n, out_q, m_out));
      check(ya_out == m_ya && yb_out == m_yb, $sformatf("step %0d y pipeline", n));
    end
    check(n_clr > 0 && n_load > 0 && n_b > 0, "restart, load and pipeline B used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
