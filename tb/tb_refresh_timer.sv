// tb_refresh_timer: self-checking test of the refresh interval timer.
//
// Two timers run side by side from the same random `set` pulses: one with
// a short period (7 clocks) for many set/expire rounds, one at the default
// 33000 clocks (3.3 ms at 100 ns). Each clock, `done` is compared with a
// reference that counts clocks since the last set (or reset): done must be
// low for exactly PERIOD clocks after a set and high from then until the
// next set. The long timer is additionally left alone long enough to
// expire twice, checking the exact expiry clock.
module tb_refresh_timer;
  import dram_pkg::*;

  localparam int unsigned P_SHORT = 7;
  localparam int unsigned P_LONG  = REFRESH_TIMER_CYC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic set_s = 1'b0, set_l = 1'b0;
  logic done_s, done_l;
  int unsigned since_s, since_l;
  int checks = 0, failures = 0;
  int expiries_s = 0, expiries_l = 0, restarts_s = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  refresh_timer #(.PERIOD(P_SHORT)) dut_s (.clk, .rst_n, .set(set_s), .done(done_s));
  refresh_timer                     dut_l (.clk, .rst_n, .set(set_l), .done(done_l));

  // Reference: clocks since the edge that sampled set (or reset release).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      since_s <= 0; since_l <= 0;
    end else begin
      since_s <= set_s ? 0 : since_s + 1;
      since_l <= set_l ? 0 : since_l + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      checks += 2;
      if (done_s !== (since_s >= P_SHORT)) begin
        failures++;
        $display("FAIL short: cycle %0d since=%0d done=%0b", cyc, since_s, done_s);
      end
      if (done_l !== (since_l >= P_LONG)) begin
        failures++;
        $display("FAIL long: cycle %0d since=%0d done=%0b", cyc, since_l, done_l);
      end
      if (since_s == P_SHORT) expiries_s++;
      if (since_l == P_LONG)  expiries_l++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Short timer: random set pulses, some before expiry, some long after.
    repeat (3000) begin
      @(posedge clk);
      #1;
      set_s = ($urandom_range(0, 9) == 0);
      if (set_s && since_s < P_SHORT) restarts_s++;
    end
    set_s = 1'b0;
    // Long timer: let it expire, hold a while, set, expire again.
    wait (done_l);
    repeat (50) @(posedge clk);
    #1 set_l = 1'b1;
    @(posedge clk);
    #1 set_l = 1'b0;
    wait (done_l);
    repeat (10) @(posedge clk);
    checks++;
    if (expiries_l != 2) begin
      failures++;
      $display("FAIL: long timer expired %0d times, expected 2", expiries_l);
    end
    checks++;
    if (expiries_s == 0 || restarts_s == 0) begin
      failures++;
      $display("FAIL: short timer expiries=%0d restarts=%0d", expiries_s, restarts_s);
    end
    $display("short timer: %0d expiries, %0d restarts before expiry", expiries_s, restarts_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
