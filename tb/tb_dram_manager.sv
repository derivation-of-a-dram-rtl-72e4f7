// tb_dram_manager: cycle-exact self-checking test of the DRAM manager.
//
// The manager drives a behavioural DRAM model; the refresh request is
// driven by the testbench in place of the timer. Every read, write and
// refresh is checked step by step against the expected pins:
//   read/write: (ras,!cas,row) (ras,cas,rw,col) (!ras,!cas,rw) (dtack)
//   refresh:    (cas,!ras) (cas,ras) (!cas,!ras,timer_set)
// so a read or write takes 4 clocks and a refresh 3. Read data is compared
// with a shadow copy of everything written. Cases covered: single reads
// and writes, back-to-back accesses, a refresh alone, a refresh and a
// strobe raised in the same clock (refresh goes first, the access waits
// three clocks) and a refresh request raised during an access (it waits
// for the access to finish). The model's protocol error count must stay 0.
module tb_dram_manager;
  import dram_pkg::*;

  localparam int unsigned ROW_W = 4, COL_W = 5, DATA_W = 16;
  localparam int unsigned ADDR_W = ROW_W + COL_W;
  localparam int unsigned DADDR_W = (ROW_W > COL_W) ? ROW_W : COL_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic strobe = 1'b0, rw = 1'b1;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic dtack, refresh_req = 1'b0, timer_set;
  logic dram_ras, dram_cas, dram_rw;
  logic [DADDR_W-1:0] dram_addr;
  logic [DATA_W-1:0] dram_din, dram_dout;
  int unsigned n_reads, n_writes, n_refreshes, perr, rviol, maxgap;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] shadow [2**ADDR_W];
  logic              written [2**ADDR_W];

  always #5 clk = ~clk;

  dram_manager #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) dut (
    .clk, .rst_n, .strobe, .rw, .addr, .wdata, .rdata, .dtack,
    .refresh_req, .timer_set,
    .dram_ras, .dram_cas, .dram_rw, .dram_addr, .dram_din, .dram_dout);

  dram_chip_model #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W),
                    .REFRESH_LIMIT(1000000)) mem (
    .clk, .rst_n, .ras(dram_ras), .cas(dram_cas), .rw(dram_rw),
    .addr(dram_addr), .din(dram_din), .dout(dram_dout),
    .n_reads, .n_writes, .n_refreshes, .protocol_errors(perr),
    .refresh_violations(rviol), .max_refresh_gap(maxgap));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Check the pins in the current clock (called just before the edge).
  task automatic expect_pins(input logic ras, input logic cas,
                             input logic ack, input logic tset, input string step);
    check(dram_ras == ras && dram_cas == cas && dtack == ack && timer_set == tset,
          $sformatf("%s: ras=%0b cas=%0b dtack=%0b set=%0b", step,
                    dram_ras, dram_cas, dtack, timer_set));
  endtask

  task automatic step_wait();
    @(posedge clk);
    #1;
  endtask

  // Refresh steps, starting in the clock where the manager leaves IDLE.
  task automatic expect_refresh();
    #3 expect_pins(0, 1, 0, 0, "refresh 1");
    step_wait();
    #3 expect_pins(1, 1, 0, 0, "refresh 2");
    step_wait();
    #3 expect_pins(0, 0, 0, 1, "refresh 3");
  endtask

  // Access steps, starting in the clock where the manager leaves IDLE.
  task automatic expect_access(input logic r, input logic [ADDR_W-1:0] a,
                               input logic [DATA_W-1:0] wd);
    #3 expect_pins(1, 0, 0, 0, "access 1");
    check(dram_addr == DADDR_W'(a[ADDR_W-1:COL_W]), "access 1: row address");
    step_wait();
    #3 expect_pins(1, 1, 0, 0, "access 2");
    check(dram_addr == DADDR_W'(a[COL_W-1:0]) && dram_rw == r, "access 2: column address / rw");
    step_wait();
    #3 expect_pins(0, 0, 0, 0, "access 3");
    check(dram_rw == r, "access 3: rw");
    if (!r) check(dram_din == wd, "access 3: write data");
    step_wait();
    #3 expect_pins(0, 0, 1, 0, "access 4");
    if (r) check(!written[a] || rdata == shadow[a],
                 $sformatf("read %0h: got %0h expected %0h", a, rdata, shadow[a]));
  endtask

  // Drive one processor access; `refresh_first` says a refresh is due now.
  task automatic access(input logic r, input logic [ADDR_W-1:0] a,
                        input logic [DATA_W-1:0] wd, input bit refresh_first);
    strobe = 1'b1; rw = r; addr = a; wdata = wd;
    if (refresh_first) begin
      expect_refresh();
      step_wait();
      refresh_req = 1'b0;
    end
    expect_access(r, a, wd);
    if (!r) begin shadow[a] = wd; written[a] = 1'b1; end
    step_wait();
    strobe = 1'b0;
  endtask

  task automatic refresh();
    refresh_req = 1'b1;
    expect_refresh();
    step_wait();
    refresh_req = 1'b0;
  endtask

  logic [ADDR_W-1:0] a;
  logic [DATA_W-1:0] d;

  initial begin
    foreach (written[i]) written[i] = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    step_wait();
    // Idle: nothing moves.
    #3 expect_pins(0, 0, 0, 0, "idle");
    step_wait();
    // Writes then reads back, with idle clocks between.
    for (int i = 0; i < 40; i++) begin
      a = ADDR_W'($urandom); d = DATA_W'($urandom);
      access(1'b0, a, d, 0);
      step_wait();
      access(1'b1, a, '0, 0);
      step_wait();
    end
    // Back-to-back random accesses (strobe kept high across dtack).
    for (int i = 0; i < 200; i++) begin
      a = ADDR_W'($urandom_range(0, 15)); d = DATA_W'($urandom);
      strobe = 1'b1; rw = 1'($urandom_range(0, 1)); addr = a; wdata = d;
      expect_access(rw, a, d);
      if (!rw) begin shadow[a] = d; written[a] = 1'b1; end
      step_wait();
    end
    strobe = 1'b0;
    step_wait();
    // A refresh on its own.
    refresh();
    step_wait();
    // Refresh and strobe in the same clock: refresh first.
    for (int i = 0; i < 10; i++) begin
      refresh_req = 1'b1;
      access(i[0], ADDR_W'($urandom_range(0, 15)), DATA_W'($urandom), 1);
      step_wait();
    end
    // Refresh request raised during an access: waits for the access.
    for (int i = 0; i < 10; i++) begin
      a = ADDR_W'($urandom_range(0, 15));
      strobe = 1'b1; rw = 1'b1; addr = a;
      fork
        expect_access(1'b1, a, '0);
        begin #15 refresh_req = 1'b1; end
      join
      step_wait();
      strobe = 1'b0;
      expect_refresh();
      step_wait();
      refresh_req = 1'b0;
      step_wait();
    end
    check(perr == 0, $sformatf("DRAM model counted %0d protocol errors", perr));
    check(n_refreshes == 21, $sformatf("DRAM saw %0d refreshes, expected 21", n_refreshes));
    check(n_reads + n_writes == 300, $sformatf("DRAM saw %0d accesses, expected 300",
                                              n_reads + n_writes));
    $display("reads=%0d writes=%0d refreshes=%0d", n_reads, n_writes, n_refreshes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
