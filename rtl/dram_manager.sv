// dram_manager: controller between the processor memory bus, the refresh
// timer and a multiplexed-address DRAM (TMS4256 style, RAS/CAS).
//
// It is one state machine that merges three protocol paths, all starting
// and ending in IDLE:
//
//   refresh (CAS before RAS), taken when the timer's `refresh_req` is up:
//     1: cas, not ras            2: cas, ras
//     3: not cas, not ras, timer_set
//   read  (processor strobe with rw = 1):
//     1: ras, not cas, addr=row  2: ras, cas, rw=1, addr=col
//     3: not ras, not cas, rw=1  (the DRAM drives dram_dout; it is captured)
//     4: dtack, rdata = captured word
//   write (processor strobe with rw = 0):
//     1: ras, not cas, addr=row  2: ras, cas, rw=0, addr=col
//     3: not ras, not cas, rw=0, dram_din = wdata (the DRAM stores it)
//     4: dtack
//
// Each step lasts one clock; at the 100 ns clock this meets the DRAM's
// pulse-width limits, so a read or write takes 400 ns and a refresh 300 ns.
// Step 1 is produced directly out of IDLE: the DRAM outputs in IDLE are
// decoded from `refresh_req` and `strobe` in the same clock, as in the
// derived machine where step 1 is the transition leaving the start state.
// All other DRAM outputs are decoded from the state register alone.
//
// Processor side: the processor raises `strobe` with `rw`, `addr` (and
// `wdata` for a write) and holds them until it sees `dtack`, which is a
// one-clock pulse. It must drop `strobe`, or present the next request, on
// the clock after `dtack`. The manager does not latch the request; it
// reads `addr`, `rw` and `wdata` in the step that needs them, which is
// why they must be held (checked by assertions below). For the same
// reason `dram_din` is simply the processor's `wdata`, wired straight
// through; the DRAM only samples it in write step 3.
//
// This design's own choices: a refresh request found in IDLE wins over a
// pending strobe (the 0.7 ms margin between the 3.3 ms timer and the 4 ms
// limit absorbs at most one read or write in progress, not a stream of
// them); the row is the upper ROW_W bits of `addr` and the column the
// lower COL_W bits; `dram_rw` rests at 1 (read) outside steps 2 and 3;
// reset (asynchronous, active low) returns to IDLE with all strobes low.
module dram_manager
  import dram_pkg::*;
#(
  parameter int unsigned ROW_W  = dram_pkg::ROW_BITS,
  parameter int unsigned COL_W  = dram_pkg::COL_BITS,
  parameter int unsigned DATA_W = dram_pkg::DATA_BITS,
  localparam int unsigned ADDR_W  = ROW_W + COL_W,
  localparam int unsigned DADDR_W = (ROW_W > COL_W) ? ROW_W : COL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor bus
  input  logic               strobe,
  input  logic               rw,          // 1 = read, 0 = write
  input  logic [ADDR_W-1:0]  addr,
  input  logic [DATA_W-1:0]  wdata,       // processor DOUT
  output logic [DATA_W-1:0]  rdata,       // processor DIN
  output logic               dtack,
  // refresh timer
  input  logic               refresh_req, // timer done
  output logic               timer_set,
  // DRAM
  output logic               dram_ras,
  output logic               dram_cas,
  output logic               dram_rw,
  output logic [DADDR_W-1:0] dram_addr,
  output logic [DATA_W-1:0]  dram_din,
  input  logic [DATA_W-1:0]  dram_dout
);

  mgr_state_t state, state_nx;
  logic [DATA_W-1:0] rdata_q;

  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  assign row = addr[ADDR_W-1:COL_W];
  assign col = addr[COL_W-1:0];

  // Next state.
  always_comb begin
    state_nx = state;
    unique case (state)
      MS_IDLE: begin
        if (refresh_req)  state_nx = MS_REF2;
        else if (strobe)  state_nx = MS_COL;
      end
      MS_COL:  state_nx = MS_DATA;
      MS_DATA: state_nx = MS_ACK;
      MS_ACK:  state_nx = MS_IDLE;
      MS_REF2: state_nx = MS_REF3;
      MS_REF3: state_nx = MS_IDLE;
      default: state_nx = MS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= MS_IDLE;
    else        state <= state_nx;
  end

  // Read data is captured at the end of step 3 and shown in step 4.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    rdata_q <= '0;
    else if (state == MS_DATA && rw) rdata_q <= dram_dout;
  end

  // Outputs of each step.
  always_comb begin
    dram_ras  = 1'b0;
    dram_cas  = 1'b0;
    dram_rw   = 1'b1;
    dram_addr = '0;
    timer_set = 1'b0;
    dtack     = 1'b0;
    unique case (state)
      MS_IDLE: begin
        if (refresh_req) begin
          dram_cas = 1'b1;                        // refresh step 1
        end else if (strobe) begin
          dram_ras  = 1'b1;                       // read/write step 1
          dram_addr = DADDR_W'(row);
        end
      end
      MS_COL: begin
        dram_ras  = 1'b1;
        dram_cas  = 1'b1;
        dram_rw   = rw;
        dram_addr = DADDR_W'(col);
      end
      MS_DATA: dram_rw = rw;
      MS_ACK:  dtack   = 1'b1;
      MS_REF2: begin
        dram_cas = 1'b1;
        dram_ras = 1'b1;
      end
      MS_REF3: timer_set = 1'b1;
      default: ;
    endcase
  end

  assign rdata    = rdata_q;
  assign dram_din = wdata;

  // Processor bus rules: once a read or write has begun, strobe, rw and
  // addr stay put until dtack; write data stays put as well.
  property p_held;
    @(posedge clk) disable iff (!rst_n)
      (state inside {MS_COL, MS_DATA, MS_ACK}) |->
        strobe && $stable(rw) && $stable(addr) && (rw || $stable(wdata));
  endproperty
  a_held: assert property (p_held)
    else $error("dram_manager: processor request changed before dtack");

  // RAS and CAS never rise together from idle (row step or CBR step first).
  a_no_ras_cas_start: assert property (@(posedge clk) disable iff (!rst_n)
      (state == MS_IDLE) |-> !(dram_ras && dram_cas))
    else $error("dram_manager: RAS and CAS asserted together out of IDLE");

endmodule
