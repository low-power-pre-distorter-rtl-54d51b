// tb_power_calc: checks I*I + Q*Q and the one-clock latency of power_calc
// on random samples and on the extreme values of the 16-bit parts.
module tb_power_calc;
  import dpd_pkg::*;
  import dpd_model_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  cplx_t in_x = '0, out_x;
  power_t out_pwr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  power_calc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int re_q[$], im_q[$];
  initial begin
    int re, im;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin re = -32768; im = -32768; end
        1: begin re = 32767;  im = -32768; end
        2: begin re = 0;      im = 0;      end
        default: begin re = int'($urandom_range(65535)) - 32768; im = int'($urandom_range(65535)) - 32768; end
      endcase
      @(negedge clk);
      in_valid = 1;
      in_x.re = 16'(re); in_x.im = 16'(im);
      @(posedge clk); #1;
      // one clock after the sample was presented the result must be there
      checks++;
      if (!out_valid || longint'(out_pwr) != m_power(re, im) ||
          out_x.re != 16'(re) || out_x.im != 16'(im)) begin
        failures++;
        $display("mismatch re=%0d im=%0d got %0d exp %0d", re, im, out_pwr, m_power(re, im));
      end
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
