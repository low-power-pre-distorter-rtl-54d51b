// tb_cmul: checks the full-precision complex product, its one-clock latency
// and that the product register holds while the enable is low.
module tb_cmul;
  import dpd_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  cplx_t x = '0;
  ccoef_t c = '0;
  cprod_t p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmul dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ar, ai, br, bi, er, ei, hr, hi;
    repeat (3) @(posedge clk);
    rst_n = 1;
    hr = 0; hi = 0;
    for (int i = 0; i < 3000; i++) begin
      ar = (i == 0) ? -32768 : longint'($urandom_range(65535)) - 32768;
      ai = (i == 0) ? -32768 : longint'($urandom_range(65535)) - 32768;
      br = (i == 0) ? -32768 : longint'($urandom_range(65535)) - 32768;
      bi = (i == 0) ? 32767  : longint'($urandom_range(65535)) - 32768;
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      x.re = 16'(ar); x.im = 16'(ai); c.re = 16'(br); c.im = 16'(bi);
      @(posedge clk); #1;
      if (en) begin
        er = ar * br - ai * bi;
        ei = ar * bi + ai * br;
        hr = er; hi = ei;
      end
      checks++;
      if (longint'(p.re) != hr || longint'(p.im) != hi) begin
        failures++;
        $display("mismatch (%0d,%0d)*(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                 ar, ai, br, bi, p.re, p.im, hr, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
