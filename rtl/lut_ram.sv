// lut_ram: one look-up table of the predistorter, a dual-port memory.
//
// Each entry (bin) holds one complex coefficient. Port A writes coefficient
// updates delivered by the scheduler; port B is read by the datapath with the
// bin number from the address generator. The two ports have their own clocks
// so the read side can sit behind a clock gate while updates still land.
// Read data is registered (one clock of latency, only when rd_en is high), as
// in a synchronous SRAM. The contents are not reset: the tables must be
// written before they are used, which the training flow does anyway.
//
// That each LUT is a dual-port memory is the source design's; the registered
// read and the separate port clocks are this implementation's choice.
module lut_ram
  import dpd_pkg::*;
#(
  parameter int unsigned NUM_BINS = 64,
  localparam int unsigned AW = $clog2(NUM_BINS)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ccoef_t        wdata,
  input  logic          rclk,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output ccoef_t        rdata
);

  ccoef_t mem [NUM_BINS];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
