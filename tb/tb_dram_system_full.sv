// tb_dram_system_full: end-to-end test of the DRAM memory subsystem with
// every parameter at its default: 100 ns clock, 3.3 ms refresh timer
// (33000 clocks), 512 x 512 x 32-bit memory. Processor traffic runs until
// at least eight refresh cycles have happened (about 26 ms of simulated
// time). The DRAM model flags any gap of more than 4 ms (40000 clocks)
// between refreshes; dram_bus_master checks data, access timing and that
// each refresh interval is 33003..33006 clocks.
module tb_dram_system_full;
  import dram_pkg::*;

  localparam int unsigned DADDR_W = (ROW_BITS > COL_BITS) ? ROW_BITS : COL_BITS;

  logic clk = 1'b0;
  logic rst_n, strobe, rw, dtack;
  logic [ADDR_BITS-1:0] addr;
  logic [DATA_BITS-1:0] wdata, rdata, dram_din, dram_dout;
  logic dram_ras, dram_cas, dram_rw;
  logic [DADDR_W-1:0] dram_addr;
  int unsigned n_reads, n_writes, n_refreshes, perr, rviol, maxgap;

  always #50 clk = ~clk;   // 100 ns

  dram_system dut (
    .clk, .rst_n, .strobe, .rw, .addr, .wdata, .rdata, .dtack,
    .dram_ras, .dram_cas, .dram_rw, .dram_addr, .dram_din, .dram_dout);

  dram_chip_model #(.ROW_W(ROW_BITS), .COL_W(COL_BITS), .DATA_W(DATA_BITS),
                    .REFRESH_LIMIT(REFRESH_LIMIT_CYC)) mem (
    .clk, .rst_n, .ras(dram_ras), .cas(dram_cas), .rw(dram_rw),
    .addr(dram_addr), .din(dram_din), .dout(dram_dout),
    .n_reads, .n_writes, .n_refreshes, .protocol_errors(perr),
    .refresh_violations(rviol), .max_refresh_gap(maxgap));

  dram_bus_master #(.ADDR_W(ADDR_BITS), .DATA_W(DATA_BITS), .DADDR_W(DADDR_W),
                    .PERIOD(REFRESH_TIMER_CYC), .NUM_OPS(1000), .MIN_REFRESH(8),
                    .WATCHDOG(600000)) cpu (
    .clk, .rst_n, .strobe, .rw, .addr, .wdata, .rdata, .dtack,
    .dram_ras, .dram_cas, .protocol_errors(perr), .refresh_violations(rviol));

  final $display("longest refresh gap seen by the DRAM: %0d clocks (limit %0d)",
                 maxgap, REFRESH_LIMIT_CYC);
endmodule
