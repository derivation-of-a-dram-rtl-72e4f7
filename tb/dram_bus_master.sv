// dram_bus_master: processor-side traffic generator and checker for the
// DRAM memory subsystem (testbench helper, not part of the design).
//
// It plays the processor: random reads and writes, held until dtack, with
// random idle gaps and frequent back-to-back requests (strobe kept high
// into the clock after dtack with the next request). Every read is checked
// against a shadow copy of what was written. Every access is timed: four
// clocks from the first clock of strobe to dtack, plus the steps still to
// run of a refresh that is in progress or starts in that first clock
// (three when it starts then, since a refresh goes ahead of a strobe).
//
// It watches the DRAM pins as well: the clocks between the starts of
// consecutive refresh cycles must lie between PERIOD+3 (timer expires with
// the manager idle) and PERIOD+6 (timer expires just as an access has
// started, which delays the refresh by three clocks), and the DRAM model
// must report no protocol error and no refresh-interval violation.
//
// It counts each mechanism (read, write, refresh, back-to-back access,
// access held behind a refresh, refresh held behind an access) and counts
// a failure for any that never happened, then prints the TB_RESULT line.
module dram_bus_master #(
  parameter int unsigned ADDR_W      = 18,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned DADDR_W     = 9,
  parameter int unsigned PERIOD      = 33000,
  parameter int unsigned NUM_OPS     = 1000,
  parameter int unsigned MIN_REFRESH = 3,
  parameter int unsigned WATCHDOG    = 1000000
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              strobe,
  output logic              rw,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] rdata,
  input  logic              dtack,
  input  logic              dram_ras,
  input  logic              dram_cas,
  input  int unsigned       protocol_errors,
  input  int unsigned       refresh_violations
);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned n_reads = 0, n_writes = 0, n_refresh = 0, n_b2b = 0;
  int unsigned n_stalled = 0, n_deferred = 0;
  int unsigned last_ref = 0;
  bit          seen_ref = 0;
  // Refresh step (1..3) shown on the DRAM pins in the current clock, 0 if
  // no refresh is in progress; worked out from the pins alone.
  logic [1:0]  ph, ph_q;
  always_comb
    ph = (dram_cas && !dram_ras)            ? 2'd1 :
         (dram_cas && dram_ras && ph_q == 1) ? 2'd2 :
         (ph_q == 2)                         ? 2'd3 : 2'd0;
  always_ff @(posedge clk) ph_q <= rst_n ? ph : 2'd0;
  logic [DATA_W-1:0] shadow [int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic finish();
    check(protocol_errors == 0, $sformatf("%0d DRAM protocol errors", protocol_errors));
    check(refresh_violations == 0, $sformatf("%0d refresh-interval violations",
                                             refresh_violations));
    check(n_reads > 0,    "no read happened");
    check(n_writes > 0,   "no write happened");
    check(n_refresh >= MIN_REFRESH, $sformatf("only %0d refreshes", n_refresh));
    check(n_b2b > 0,      "no back-to-back access happened");
    check(n_stalled > 0,  "no access waited for a refresh");
    check(n_deferred > 0, "no refresh waited for an access");
    $display("reads=%0d writes=%0d refreshes=%0d back_to_back=%0d access_behind_refresh=%0d refresh_behind_access=%0d cycles=%0d",
             n_reads, n_writes, n_refresh, n_b2b, n_stalled, n_deferred, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Clock counter and refresh monitor on the DRAM pins.
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (ph == 2'd1) begin
        n_refresh <= n_refresh + 1;
        if (seen_ref) begin
          check(cyc - last_ref >= PERIOD + 3 && cyc - last_ref <= PERIOD + 6,
                $sformatf("refresh interval %0d clocks, expected %0d..%0d",
                          cyc - last_ref, PERIOD + 3, PERIOD + 6));
          if (cyc - last_ref > PERIOD + 3) n_deferred <= n_deferred + 1;
        end
        seen_ref <= 1'b1;
        last_ref <= cyc;
      end
    end
  end

  task automatic step();
    @(posedge clk);
    #1;
  endtask

  initial begin
    int unsigned start, lat, gap;
    int unsigned extra;
    logic [ADDR_W-1:0] a;
    rst_n = 1'b0; strobe = 1'b0; rw = 1'b1; addr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int unsigned op = 0; op < NUM_OPS || n_refresh < MIN_REFRESH; op++) begin
      gap = ($urandom_range(0, 9) < 7) ? 0 : $urandom_range(1, 3);
      if (gap > 0) begin
        strobe = 1'b0;
        repeat (gap) step();
      end else if (op > 0) n_b2b++;
      // Half the addresses come from a small pool, so reads find data.
      a = ($urandom_range(0, 1) == 0) ? ADDR_W'($urandom_range(0, 31) * 4099)
                                      : ADDR_W'($urandom);
      strobe = 1'b1;
      rw     = (shadow.exists(int'(a)) || $urandom_range(0, 3) == 0) ? 1'($urandom_range(0, 1)) : 1'b0;
      addr   = a;
      wdata  = DATA_W'({$urandom, $urandom});
      start  = cyc;
      // A refresh in progress (or starting now) delays the access by the
      // refresh steps still to come.
      #3 extra = (ph == 0) ? 0 : 4 - int'(ph);
      if (extra > 0) n_stalled++;
      while (!dtack) begin
        step();
        #3;
        check(cyc - start < 16, "no dtack within 16 clocks");
        if (cyc - start >= 16) finish();
      end
      lat = cyc - start + 1;
      check(lat == 4 + extra,
            $sformatf("access took %0d clocks, expected %0d", lat, 4 + extra));
      if (rw) begin
        n_reads++;
        if (shadow.exists(int'(a)))
          check(rdata == shadow[int'(a)],
                $sformatf("read %05h: got %08h expected %08h", a, rdata, shadow[int'(a)]));
      end else begin
        n_writes++;
        shadow[int'(a)] = wdata;
      end
      step();
    end
    strobe = 1'b0;
    repeat (10) step();
    finish();
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
