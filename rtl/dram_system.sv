// dram_system: DRAM memory subsystem for a 32-bit processor.
//
// The subsystem sits between the processor's memory bus and a bank of
// multiplexed-address DRAM chips, and hides the DRAM protocol and its
// refresh duty from the processor. It holds the two designed parts:
//
//   dram_manager   runs read, write and CAS-before-RAS refresh cycles
//   refresh_timer  requests a refresh 3.3 ms after the previous one ended
//
// The manager sets the timer at the end of every refresh; the timer's
// `done` is the manager's refresh request. The processor and the DRAM
// chips are outside: their signals are this module's ports.
//
// Processor bus: raise `strobe` with `rw` (1 = read), `addr` and, for a
// write, `wdata`; hold all of them until the one-clock `dtack`. Read data
// is on `rdata` while `dtack` is high. With no refresh in the way an
// access takes four clocks from the first clock of `strobe` to `dtack`
// inclusive; a refresh that is due first adds three clocks.
//
// DRAM pins: active-high `dram_ras`/`dram_cas` (asserted = strobe active;
// a board driving real active-low chips inverts them), `dram_rw` (1 =
// read), the multiplexed row/column address, and separate data in/out.
//
// Parameters default to the design's figures: 100 ns clock, 3.3 ms
// timer (33000 clocks), 9-bit row and column, 32-bit words.
module dram_system #(
  parameter int unsigned ROW_W          = dram_pkg::ROW_BITS,
  parameter int unsigned COL_W          = dram_pkg::COL_BITS,
  parameter int unsigned DATA_W         = dram_pkg::DATA_BITS,
  parameter int unsigned REFRESH_PERIOD = dram_pkg::REFRESH_TIMER_CYC,
  localparam int unsigned ADDR_W  = ROW_W + COL_W,
  localparam int unsigned DADDR_W = (ROW_W > COL_W) ? ROW_W : COL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor bus
  input  logic               strobe,
  input  logic               rw,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [DATA_W-1:0]  wdata,
  output logic [DATA_W-1:0]  rdata,
  output logic               dtack,
  // DRAM
  output logic               dram_ras,
  output logic               dram_cas,
  output logic               dram_rw,
  output logic [DADDR_W-1:0] dram_addr,
  output logic [DATA_W-1:0]  dram_din,
  input  logic [DATA_W-1:0]  dram_dout
);

  logic refresh_req;
  logic timer_set;

  refresh_timer #(
    .PERIOD (REFRESH_PERIOD)
  ) u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .set   (timer_set),
    .done  (refresh_req)
  );

  dram_manager #(
    .ROW_W  (ROW_W),
    .COL_W  (COL_W),
    .DATA_W (DATA_W)
  ) u_manager (
    .clk         (clk),
    .rst_n       (rst_n),
    .strobe      (strobe),
    .rw          (rw),
    .addr        (addr),
    .wdata       (wdata),
    .rdata       (rdata),
    .dtack       (dtack),
    .refresh_req (refresh_req),
    .timer_set   (timer_set),
    .dram_ras    (dram_ras),
    .dram_cas    (dram_cas),
    .dram_rw     (dram_rw),
    .dram_addr   (dram_addr),
    .dram_din    (dram_din),
    .dram_dout   (dram_dout)
  );

endmodule
