// wdt: data-ready watchdog of the TRRT FPGA.
//
// The bus controller signals each read of the Tx data with a data-ready word;
// the data-ready scheduler turns each one it finds into `drdy_pulse`. If no
// such pulse arrives for 3 minutes while the watchdog is enabled by
// telecommand, the watchdog raises `wdt_pulse` for 50 ms. That pulse makes
// the init sequencer reload the 1553 device registers and the RAM descriptor
// table from PROM. It also sets the sticky `wdt_occ_sts` flag, which goes to
// the bus controller in bit 4 of Tx SA1 W0 (bit 5 carries `wdt_en_sts`) and
// is cleared by telecommand.
//
// The three states WDTIDLE, WDTINC and WDTDET and the two conditions "enable
// telecommand is 0" and "count reaches WDT_LIMIT" follow the source design.
// This design uses the first to go from WDTINC back to WDTIDLE and the
// second to go from WDTINC to WDTDET. Also this design's choices: WDTIDLE
// moves to WDTINC when the enable is 1; WDTDET holds the pulse for
// PULSE_MS 1 ms strobes and then returns to WDTIDLE (so counting restarts
// from zero); a data-ready pulse clears the count. The count advances on
// the 8 ms (125 Hz) strobe, so the 3-minute limit is 180 s / 8 ms = 22500.
//
// Timing: `wdt_pulse` rises two clocks after the 8 ms strobe on which the
// count reaches WDT_LIMIT and falls on the PULSE_MS-th 1 ms strobe after
// that, so it lasts between PULSE_MS-1 and PULSE_MS milliseconds.
// `wdt_en_sts` is the enable telecommand itself, passed on so that the Tx
// status word reports it next to `wdt_occ_sts`.
module wdt #(
  parameter int unsigned WDT_LIMIT = 22500,  // 8 ms ticks in 3 minutes
  parameter int unsigned PULSE_MS  = 50      // pulse width in ms
) (
  input  logic clk,
  input  logic rst,          // power-on OR reset command
  input  logic tick_8ms,     // watchdog counting rate
  input  logic tick_1ms,     // pulse width timing
  input  logic drdy_pulse,   // a data ready was seen
  input  logic tc_wdt_en,    // telecommand: watchdog enabled
  input  logic tc_wdt_clr,   // telecommand: clear occurred status
  output logic wdt_occ_sts,
  output logic wdt_en_sts,
  output logic wdt_pulse
);

  typedef enum logic [1:0] {WDTIDLE, WDTINC, WDTDET} wdt_state_e;

  localparam int unsigned CW = $clog2(WDT_LIMIT + 1);
  localparam int unsigned PW = $clog2(PULSE_MS + 1);

  wdt_state_e     state;
  logic [CW-1:0]  wdtcnt;
  logic [PW-1:0]  pcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= WDTIDLE;
      wdtcnt      <= '0;
      pcnt        <= '0;
      wdt_pulse   <= 1'b0;
      wdt_occ_sts <= 1'b0;
    end else begin
      if (tc_wdt_clr) wdt_occ_sts <= 1'b0;
      unique case (state)
        WDTIDLE: begin
          wdtcnt    <= '0;
          wdt_pulse <= 1'b0;
          if (tc_wdt_en) state <= WDTINC;
        end
        WDTINC: begin
          if (!tc_wdt_en) begin
            state  <= WDTIDLE;
            wdtcnt <= '0;
          end else if (drdy_pulse) begin
            wdtcnt <= '0;
          end else if (wdtcnt == CW'(WDT_LIMIT)) begin
            state       <= WDTDET;
            wdt_pulse   <= 1'b1;
            wdt_occ_sts <= 1'b1;
            pcnt        <= '0;
          end else if (tick_8ms) begin
            wdtcnt <= wdtcnt + 1'b1;
          end
        end
        WDTDET: begin
          if (tick_1ms) begin
            if (pcnt == PW'(PULSE_MS - 1)) begin
              state     <= WDTIDLE;
              wdt_pulse <= 1'b0;
            end
            pcnt <= pcnt + 1'b1;
          end
        end
        default: state <= WDTIDLE;
      endcase
    end
  end

  assign wdt_en_sts = tc_wdt_en;

endmodule
