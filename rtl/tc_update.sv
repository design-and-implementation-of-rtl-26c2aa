// tc_update: telecommand (Rx) update scheduler.
//
// When the master scheduler starts it (TC_UPDT state), this block reads two
// words that the bus controller writes into the RT's receive area of the 1553
// RAM: the internal-logic telecommand word and the phase control word. From
// the telecommand it latches refresh enable, watchdog enable, a clear of the
// watchdog-occurred status and the two 2-bit antenna selections, one for
// switch matrix M and one for switch matrix R (one of four antennas each).
// The phase control word from the attitude and orbit control electronics is
// latched and driven out as 12 parallel bits.
//
// The list of commands and outputs follows the source design. The word
// addresses (TC_ADDR, PCW_ADDR) and the bit layout of the telecommand word
// (trrt_pkg: bit 0 refresh enable, 1 WDT enable, 2 WDT status clear,
// 5..4 antenna M, 7..6 antenna R) are this design's choices, as are the reset
// values (everything 0: refresh and watchdog disabled, antenna 0).
//
// Timing: the two reads are paced by the 1 us strobe, about 2 us in all.
// `wdt_clr` pulses for one clock when a telecommand with bit 2 set is read;
// the other outputs change on the clock after their word is read and hold
// until the next read. `done` pulses when both words have been taken.
module tc_update
  import trrt_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tick_1us,
  input  logic              start,
  output ram_req_t          ram_req,
  input  ram_rsp_t          ram_rsp,
  output logic              refresh_en,
  output logic              wdt_en,
  output logic              wdt_clr,
  output logic [1:0]        ant_sel_m,
  output logic [1:0]        ant_sel_r,
  output logic [PCW_W-1:0]  pcw,
  output logic              done
);

  typedef enum logic [2:0] {T_IDLE, T_TCREQ, T_TCWAIT, T_PCREQ, T_PCWAIT} tc_state_e;

  tc_state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= T_IDLE;
      ram_req    <= RAM_REQ_IDLE;
      refresh_en <= 1'b0;
      wdt_en     <= 1'b0;
      wdt_clr    <= 1'b0;
      ant_sel_m  <= '0;
      ant_sel_r  <= '0;
      pcw        <= '0;
      done       <= 1'b0;
    end else begin
      wdt_clr <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        T_IDLE:  if (start) state <= T_TCREQ;
        T_TCREQ: if (tick_1us) begin
          ram_req <= '{req: 1'b1, we: 1'b0, mem: 1'b1, addr: TC_ADDR, wdata: '0};
          state   <= T_TCWAIT;
        end
        T_TCWAIT: if (ram_rsp.ack) begin
          ram_req    <= RAM_REQ_IDLE;
          refresh_en <= ram_rsp.rdata[TC_RFEN_BIT];
          wdt_en     <= ram_rsp.rdata[TC_WDTEN_BIT];
          wdt_clr    <= ram_rsp.rdata[TC_WDTCLR_BIT];
          ant_sel_m  <= ram_rsp.rdata[TC_ANTM_LSB +: 2];
          ant_sel_r  <= ram_rsp.rdata[TC_ANTR_LSB +: 2];
          state      <= T_PCREQ;
        end
        T_PCREQ: if (tick_1us) begin
          ram_req <= '{req: 1'b1, we: 1'b0, mem: 1'b1, addr: PCW_ADDR, wdata: '0};
          state   <= T_PCWAIT;
        end
        T_PCWAIT: if (ram_rsp.ack) begin
          ram_req <= RAM_REQ_IDLE;
          pcw     <= ram_rsp.rdata[PCW_W-1:0];
          done    <= 1'b1;
          state   <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
