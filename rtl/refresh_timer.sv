// refresh_timer: interval timer that requests DRAM refresh.
//
// After `set` is pulsed the timer counts PERIOD clocks and then raises
// `done`, which it holds until the next `set`. A `set` while counting
// restarts the count. This is the Timer machine of the design: a wait
// loop, then `done` held until `set`.
//
// The 3.3 ms interval (33000 clocks of 100 ns) is the design's figure.
// How the timer counts is this implementation's choice: a down counter
// that is loaded with PERIOD-1 on `set` and on reset, so that `done`
// rises exactly PERIOD clocks after the clock edge that samples `set`
// (or after reset is released). A `set` and the expiry in the same clock
// restart the count; `set` wins.
//
// Interface:  clk, rst_n (asynchronous, active low)
//             set   in   restart the interval
//             done  out  interval elapsed, held until set
module refresh_timer #(
  parameter int unsigned PERIOD = dram_pkg::REFRESH_TIMER_CYC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  output logic done
);

  localparam int unsigned CNT_W = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam logic [CNT_W-1:0] LOAD = CNT_W'(PERIOD - 1);

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= LOAD;
      done  <= 1'b0;
    end else if (set) begin
      count <= LOAD;
      done  <= 1'b0;
    end else if (!done) begin
      if (count == '0) done  <= 1'b1;
      else             count <= count - 1'b1;
    end
  end

  initial begin
    assert (PERIOD >= 1) else $error("refresh_timer: PERIOD must be at least 1");
  end

endmodule
