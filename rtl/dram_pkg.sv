// dram_pkg: constants and types shared by the DRAM memory interface.
//
// The interface runs from a single 10 MHz clock (100 ns period). At that
// rate every minimum pulse width of the TMS4256-class DRAM it drives
// (RAS-to-data 100 ns, CAS-to-data 50 ns, CAS precharge before RAS 90 ns,
// RAS low in refresh 100 ns, output disable 30 ns) is met by holding each
// step of a cycle for exactly one clock. A read or write therefore takes
// four clocks (400 ns) and a CAS-before-RAS refresh three (300 ns).
//
// The DRAM must see a refresh within 4 ms of the previous one. The refresh
// timer is set to 3.3 ms (33000 clocks), leaving room for a read or write
// that is already in progress when the timer expires.
//
// Row/column split (9 + 9 bits, 256K locations) follows the 256K-bit part;
// the 32-bit data path is one word of the 32-bit processor, i.e. 32 such
// one-bit-wide chips side by side. Both are this design's reading of the
// part, not figures stated for the memory system itself.
package dram_pkg;

  // Clock period in ns and the refresh timing budget.
  localparam int unsigned CLK_PERIOD_NS      = 100;
  localparam int unsigned REFRESH_TIMER_CYC  = 33000;   // 3.3 ms / 100 ns
  localparam int unsigned REFRESH_LIMIT_CYC  = 40000;   // 4 ms / 100 ns

  // Memory geometry.
  localparam int unsigned ROW_BITS  = 9;
  localparam int unsigned COL_BITS  = 9;
  localparam int unsigned ADDR_BITS = ROW_BITS + COL_BITS;
  localparam int unsigned DATA_BITS = 32;

  // Cycle lengths in clocks (one clock per protocol step).
  localparam int unsigned RW_CYCLE_CLKS      = 4;
  localparam int unsigned REFRESH_CYCLE_CLKS = 3;

  // States of the DRAM manager. Each protocol step is one transition of
  // the manager, and the first step of every cycle is taken straight out
  // of IDLE (its outputs are decoded from IDLE and the request inputs), so
  // a read or write occupies IDLE->COL->DATA->ACK->IDLE (four clocks) and
  // a refresh IDLE->REF2->REF3->IDLE (three clocks).
  typedef enum logic [2:0] {
    MS_IDLE = 3'd0,  // reset/final state; step 1 of the next cycle
    MS_COL  = 3'd1,  // step 2 of read/write: ras, cas, rw, addr = column
    MS_DATA = 3'd2,  // step 3 of read/write: not ras, not cas; data moves
    MS_ACK  = 3'd3,  // step 4 of read/write: dtack, read data on DIN
    MS_REF2 = 3'd4,  // step 2 of refresh: cas, ras
    MS_REF3 = 3'd5   // step 3 of refresh: not cas, not ras, set the timer
  } mgr_state_t;

endpackage
