// dram_chip_model: behavioural model of a bank of multiplexed-address
// DRAM chips (TMS4256 style) driven at one protocol step per clock.
// Simulation only; it is not part of the design.
//
// It follows the DRAM's three legal cycles, each a path from idle back to
// idle, one step per clock, with active-high ras/cas:
//   refresh: (cas, not ras) (cas, ras) (not cas, not ras)
//   read:    (ras, not cas; row) (ras, cas, rw=1; col) (not ras, not cas)
//            with the addressed word on `dout` during the third step
//   write:   (ras, not cas; row) (ras, cas, rw=0; col)
//            (not ras, not cas, rw=0; din is stored)
// Anything else is counted in `protocol_errors`. Outside the data step of
// a read, `dout` carries a random word, so a controller that samples it at
// the wrong time reads garbage. The model also measures the clocks between
// refresh cycles and counts a refresh violation when more than
// REFRESH_LIMIT clocks pass without one (4 ms at 100 ns by default).
module dram_chip_model #(
  parameter int unsigned ROW_W         = 9,
  parameter int unsigned COL_W         = 9,
  parameter int unsigned DATA_W        = 32,
  parameter int unsigned REFRESH_LIMIT = 40000,
  localparam int unsigned DADDR_W = (ROW_W > COL_W) ? ROW_W : COL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ras,
  input  logic               cas,
  input  logic               rw,
  input  logic [DADDR_W-1:0] addr,
  input  logic [DATA_W-1:0]  din,
  output logic [DATA_W-1:0]  dout,
  output int unsigned        n_reads,
  output int unsigned        n_writes,
  output int unsigned        n_refreshes,
  output int unsigned        protocol_errors,
  output int unsigned        refresh_violations,
  output int unsigned        max_refresh_gap
);

  typedef enum logic [2:0] {D_IDLE, D_REF1, D_REF2, D_ROW, D_COL} dstate_t;

  logic [DATA_W-1:0] mem [2**(ROW_W+COL_W)];
  dstate_t           st;
  logic [ROW_W-1:0]  row_q;
  logic [COL_W-1:0]  col_q;
  logic              rw_q;
  int unsigned       gap;

  initial begin
    foreach (mem[i]) mem[i] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE;
      dout <= '0;
      n_reads <= 0; n_writes <= 0; n_refreshes <= 0;
      protocol_errors <= 0; refresh_violations <= 0;
      max_refresh_gap <= 0; gap <= 0;
      row_q <= '0; col_q <= '0; rw_q <= 1'b1;
    end else begin
      dout <= DATA_W'({$urandom, $urandom});
      gap  <= gap + 1;
      if (gap == REFRESH_LIMIT) refresh_violations <= refresh_violations + 1;
      unique case (st)
        D_IDLE: begin
          if (cas && !ras) st <= D_REF1;
          else if (ras && !cas) begin
            row_q <= addr[ROW_W-1:0];
            st    <= D_ROW;
          end else if (ras && cas) begin
            protocol_errors <= protocol_errors + 1;
            $display("DRAM MODEL ERROR: ras and cas rise together");
          end
        end
        D_REF1: begin
          if (cas && ras) st <= D_REF2;
          else begin
            protocol_errors <= protocol_errors + 1;
            $display("DRAM MODEL ERROR: refresh step 2 expected cas, ras");
            st <= D_IDLE;
          end
        end
        D_REF2: begin
          if (!cas && !ras) begin
            n_refreshes <= n_refreshes + 1;
            if (gap > max_refresh_gap) max_refresh_gap <= gap;
            gap <= 0;
          end else begin
            protocol_errors <= protocol_errors + 1;
            $display("DRAM MODEL ERROR: refresh step 3 expected not cas, not ras");
          end
          st <= D_IDLE;
        end
        D_ROW: begin
          if (ras && cas) begin
            col_q <= addr[COL_W-1:0];
            rw_q  <= rw;
            if (rw) dout <= mem[{row_q, addr[COL_W-1:0]}];
            st <= D_COL;
          end else begin
            protocol_errors <= protocol_errors + 1;
            $display("DRAM MODEL ERROR: column step expected ras, cas");
            st <= D_IDLE;
          end
        end
        D_COL: begin
          if (!ras && !cas && rw == rw_q) begin
            if (rw_q) n_reads <= n_reads + 1;
            else begin
              mem[{row_q, col_q}] <= din;
              n_writes <= n_writes + 1;
            end
          end else begin
            protocol_errors <= protocol_errors + 1;
            $display("DRAM MODEL ERROR: data step expected not ras, not cas, same rw");
          end
          st <= D_IDLE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

endmodule
