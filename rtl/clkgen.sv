// clkgen: timing generator of the TRRT FPGA.
//
// From the 24 MHz board clock it derives every rate the other blocks use:
// 12 MHz (83 ns) and 24 MHz for the 1553 interface, 1 us (1 MHz) for the
// init/refresh, data-ready and telecommand schedulers, 26 us (about 38 kHz)
// for the analog/digital acquisition sequencer, 500 us (2 kHz) for the main
// scheduler, 1 ms for the watchdog pulse width and 8 ms (125 Hz) for the
// watchdog counter.
//
// The rates and the output list (Clk1M, Clk, Clk8ms, Clk2K, Clk12, the
// sequencer clock) follow the source design. How they are made is this
// design's choice: the whole FPGA runs on the 24 MHz clock, and each rate is
// delivered as a one-cycle clock-enable strobe (`tick_*`), with a 50 %-duty
// (or as close as the divisor allows) square wave of the same rate beside it
// (`*_clk`) for anything off-chip or for viewing. The 1 us strobe comes from a
// divide-by-DIV_1US counter; the 500 us, 1 ms and 8 ms strobes come from
// counting 1 us strobes; the 26 us strobe has its own divide-by-DIV_26US
// counter. All strobes are registered outputs. `rst` (the watchdog reset,
// power-on OR reset command) restarts every counter, and the first strobe of
// each rate arrives one full period after reset is released.
module clkgen #(
  parameter int unsigned DIV_1US   = 24,    // 24 MHz cycles per 1 us
  parameter int unsigned DIV_26US  = 624,   // 24 MHz cycles per 26 us
  parameter int unsigned US_PER_MS = 1000,  // 1 us ticks per 1 ms
  parameter int unsigned MS_PER_8MS = 8     // 1 ms ticks per 8 ms
) (
  input  logic clk,          // 24 MHz
  input  logic rst,          // synchronous, active high
  output logic tick_1us,
  output logic tick_26us,
  output logic tick_500us,
  output logic tick_1ms,
  output logic tick_8ms,
  output logic clk12m,       // 24 MHz / 2
  output logic clk1m,
  output logic clk26us,
  output logic clk2k,
  output logic clk1ms,
  output logic clk8ms
);

  localparam int unsigned W_US  = $clog2(DIV_1US);
  localparam int unsigned W_26  = $clog2(DIV_26US);
  localparam int unsigned W_MS  = $clog2(US_PER_MS);
  localparam int unsigned W_8MS = $clog2(MS_PER_8MS);

  logic [W_US-1:0]  cnt_us;
  logic [W_26-1:0]  cnt_26;
  logic [W_MS-1:0]  cnt_ms;   // 1 us ticks within the current millisecond
  logic [W_8MS-1:0] cnt_8ms;  // 1 ms ticks within the current 8 ms

  wire us_wrap  = (cnt_us == W_US'(DIV_1US - 1));
  wire a26_wrap = (cnt_26 == W_26'(DIV_26US - 1));
  wire ms_wrap  = us_wrap && (cnt_ms == W_MS'(US_PER_MS - 1));
  wire half_ms  = us_wrap && (cnt_ms == W_MS'(US_PER_MS / 2 - 1));
  wire ms8_wrap = ms_wrap && (cnt_8ms == W_8MS'(MS_PER_8MS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_us     <= '0;
      cnt_26     <= '0;
      cnt_ms     <= '0;
      cnt_8ms    <= '0;
      tick_1us   <= 1'b0;
      tick_26us  <= 1'b0;
      tick_500us <= 1'b0;
      tick_1ms   <= 1'b0;
      tick_8ms   <= 1'b0;
      clk12m     <= 1'b0;
    end else begin
      clk12m <= ~clk12m;
      cnt_us <= us_wrap ? '0 : cnt_us + 1'b1;
      cnt_26 <= a26_wrap ? '0 : cnt_26 + 1'b1;
      if (us_wrap) cnt_ms <= ms_wrap ? '0 : cnt_ms + 1'b1;
      if (ms_wrap) cnt_8ms <= ms8_wrap ? '0 : cnt_8ms + 1'b1;
      tick_1us   <= us_wrap;
      tick_26us  <= a26_wrap;
      tick_500us <= half_ms || ms_wrap;
      tick_1ms   <= ms_wrap;
      tick_8ms   <= ms8_wrap;
    end
  end

  // Square waves: high during the first half of each period.
  always_comb begin
    clk1m   = (cnt_us  < W_US'(DIV_1US / 2));
    clk26us = (cnt_26  < W_26'(DIV_26US / 2));
    clk2k   = (cnt_ms  < W_MS'(US_PER_MS / 4)) ||
              ((cnt_ms >= W_MS'(US_PER_MS / 2)) && (cnt_ms < W_MS'(3 * US_PER_MS / 4)));
    clk1ms  = (cnt_ms  < W_MS'(US_PER_MS / 2));
    clk8ms  = (cnt_8ms < W_8MS'(MS_PER_8MS / 2));
  end

endmodule
