// master_rt_sched: master RT scheduler of the TRRT FPGA.
//
// Starts once the init sequencer reports the end of the PROM initialization
// and then cycles its sub-schedulers by raising SubSeqFlag: data-ready read
// (RDDRDY), telecommand update (TC_UPDT) and, every RF_EN-th round, refresh
// (REFRESH) in place of the telecommand update. It also enables the analog/
// digital acquisition sequencer.
//
// States and transitions follow the source design: MASIDLE until
// `eof_prominit`; RDDRDY stays until the data-ready scheduler reports
// `dr_eof`, then goes to REFRESH if `rf_cnt` = RF_EN-1, else to TC_UPDT; both
// return to RDDRDY on the next scheduler tick. The scheduler runs on the
// 500 us (2 kHz) strobe, so a round without data ready is two ticks and the
// data-ready word is read every 1 ms; with RF_EN = 40 a refresh happens every
// 40 ms, as in the source design.
//
// This design's choices: `dr_eof` is a one-cycle pulse that is remembered
// until the next tick; `rf_cnt` counts completed RDDRDY states and restarts at
// REFRESH; each flag is issued as a one-cycle start pulse on entry to its
// state (`drdy_start`, `tc_start`, `refresh_start`) beside the level
// `subseq`; when `eof_prominit` falls (a re-initialization) the scheduler
// returns to MASIDLE at once. `an_seq_en` is high outside MASIDLE.
module master_rt_sched
  import trrt_pkg::*;
#(
  parameter int unsigned RF_EN = 40
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     tick,          // 500 us strobe
  input  logic     eof_prominit,
  input  logic     dr_eof,        // data-ready scheduler finished
  output subseq_e  subseq,        // SubSeqFlag_s
  output logic     drdy_start,
  output logic     tc_start,
  output logic     refresh_start,
  output logic     an_seq_en,     // an_seq_endissts_s
  output logic     busy           // not in MASIDLE
);

  typedef enum logic [1:0] {MASIDLE, RDDRDY, TC_UPDT, REFRESH} mas_state_e;

  localparam int unsigned RCW = $clog2(RF_EN + 1);

  mas_state_e      state;
  logic [RCW-1:0]  rf_cnt;
  logic            dr_eof_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= MASIDLE;
      rf_cnt        <= '0;
      dr_eof_q      <= 1'b0;
      drdy_start    <= 1'b0;
      tc_start      <= 1'b0;
      refresh_start <= 1'b0;
    end else begin
      drdy_start    <= 1'b0;
      tc_start      <= 1'b0;
      refresh_start <= 1'b0;
      if (dr_eof) dr_eof_q <= 1'b1;
      if (!eof_prominit) begin
        state    <= MASIDLE;
        rf_cnt   <= '0;
        dr_eof_q <= 1'b0;
      end else if (tick) begin
        unique case (state)
          MASIDLE: begin
            state      <= RDDRDY;
            drdy_start <= 1'b1;
            dr_eof_q   <= 1'b0;
          end
          RDDRDY: if (dr_eof_q || dr_eof) begin
            dr_eof_q <= 1'b0;
            if (rf_cnt == RCW'(RF_EN - 1)) begin
              state         <= REFRESH;
              rf_cnt        <= '0;
              refresh_start <= 1'b1;
            end else begin
              state    <= TC_UPDT;
              rf_cnt   <= rf_cnt + 1'b1;
              tc_start <= 1'b1;
            end
          end
          TC_UPDT, REFRESH: begin
            state      <= RDDRDY;
            drdy_start <= 1'b1;
          end
          default: state <= MASIDLE;
        endcase
      end
    end
  end

  always_comb begin
    unique case (state)
      RDDRDY:  subseq = DRDY_FLAG;
      TC_UPDT: subseq = TC_FLAG;
      REFRESH: subseq = REFRESH_FLAG;
      default: subseq = SUB_NONE;
    endcase
    busy      = (state != MASIDLE);
    an_seq_en = busy;
  end

endmodule
