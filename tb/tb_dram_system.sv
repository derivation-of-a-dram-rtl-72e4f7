// tb_dram_system: end-to-end test of the DRAM memory subsystem with a
// shortened refresh interval (60 clocks instead of 33000) so that many
// refreshes collide with processor traffic. Memory geometry is the
// default 512 x 512 x 32 bits. A behavioural DRAM bank is attached to the
// DRAM pins and dram_bus_master plays the processor and does all checks.
module tb_dram_system;
  import dram_pkg::*;

  localparam int unsigned PERIOD = 60;
  localparam int unsigned DADDR_W = (ROW_BITS > COL_BITS) ? ROW_BITS : COL_BITS;

  logic clk = 1'b0;
  logic rst_n, strobe, rw, dtack;
  logic [ADDR_BITS-1:0] addr;
  logic [DATA_BITS-1:0] wdata, rdata, dram_din, dram_dout;
  logic dram_ras, dram_cas, dram_rw;
  logic [DADDR_W-1:0] dram_addr;
  int unsigned n_reads, n_writes, n_refreshes, perr, rviol, maxgap;

  always #50 clk = ~clk;   // 100 ns

  dram_system #(.REFRESH_PERIOD(PERIOD)) dut (
    .clk, .rst_n, .strobe, .rw, .addr, .wdata, .rdata, .dtack,
    .dram_ras, .dram_cas, .dram_rw, .dram_addr, .dram_din, .dram_dout);

  dram_chip_model #(.ROW_W(ROW_BITS), .COL_W(COL_BITS), .DATA_W(DATA_BITS),
                    .REFRESH_LIMIT(PERIOD + 6)) mem (
    .clk, .rst_n, .ras(dram_ras), .cas(dram_cas), .rw(dram_rw),
    .addr(dram_addr), .din(dram_din), .dout(dram_dout),
    .n_reads, .n_writes, .n_refreshes, .protocol_errors(perr),
    .refresh_violations(rviol), .max_refresh_gap(maxgap));

  dram_bus_master #(.ADDR_W(ADDR_BITS), .DATA_W(DATA_BITS), .DADDR_W(DADDR_W),
                    .PERIOD(PERIOD), .NUM_OPS(5000), .MIN_REFRESH(100),
                    .WATCHDOG(200000)) cpu (
    .clk, .rst_n, .strobe, .rw, .addr, .wdata, .rdata, .dtack,
    .dram_ras, .dram_cas, .protocol_errors(perr), .refresh_violations(rviol));
endmodule
