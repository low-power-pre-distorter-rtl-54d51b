// tb_lut_ram: writes random coefficients through the write port and reads
// them back through the read port, checking the one-clock read latency, that
// the read register holds while rd_en is low, and simultaneous write/read of
// different addresses.
module tb_lut_ram;
  import dpd_pkg::*;

  localparam int NB = 64;
  logic clk = 0;
  logic we = 0, rd_en = 0;
  logic [5:0] waddr = '0, raddr = '0;
  ccoef_t wdata = '0, rdata;
  ccoef_t model [NB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_ram #(.NUM_BINS(NB)) dut (
    .wclk(clk), .we, .waddr, .wdata, .rclk(clk), .rd_en, .raddr, .rdata
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ccoef_t held;
    // fill
    for (int a = 0; a < NB; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = ccoef_t'($urandom);
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    // read back with random write traffic on other addresses
    held = '0;
    for (int i = 0; i < 2000; i++) begin
      int ra, wa;
      ra = $urandom_range(NB - 1);
      wa = (ra + 1 + $urandom_range(NB - 2)) % NB;
      @(negedge clk);
      rd_en = ($urandom_range(3) != 0);
      raddr = 6'(ra);
      we = $urandom_range(1);
      waddr = 6'(wa);
      wdata = ccoef_t'($urandom);
      @(posedge clk); #1;
      if (rd_en) held = model[ra];
      if (we) model[wa] = wdata;
      checks++;
      if (rdata != held) begin
        failures++;
        $display("mismatch addr %0d got %h exp %h", ra, rdata, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
