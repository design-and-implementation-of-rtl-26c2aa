// an_dig_acq_seq: analog and digital data acquisition sequencer.
//
// Acquires eight analog channels (four tracking-receiver signals and four
// spares) one after the other through an external multiplexer and ADC, and
// keeps each result in its own latch; at the start of every sequence it also
// latches the digital status inputs. The data-ready scheduler copies those
// latches into the 1553 Tx buffer.
//
// The FSM follows the source design: IDLE, SOCGEN (multiplexer set, settling),
// SOCPW (start-of-conversion pulse), LATCHGEN (wait for the conversion, then
// latch) and NXTCHNL (next channel), with one counter `ancnt` that runs
// through the whole channel slot and the two count conditions SOCGEN_CNT and
// LATGEN_CNT. Which state each condition leaves, and the other moves, are
// this design's reading.
// The sequencer runs on the 26 us strobe, as in the source design, and one
// channel takes about 600 us, all eight about 4.8 ms. The counts are this
// design's reading of those times: with SOCGEN_CNT = 15 and LATGEN_CNT = 21 a
// channel slot is 16 ticks in SOCGEN, 1 in SOCPW, 5 in LATCHGEN and 1 in
// NXTCHNL (or IDLE after the last channel): 23 x 26 us = 598 us, and
// 8 x 598 us = 4.784 ms per sequence.
//
// Interface: `en` (from the master scheduler) starts a sequence from IDLE and,
// when dropped in SOCGEN, returns the FSM to IDLE. `amux_sel` selects the
// channel for the whole slot; `soc` is high for one 26 us tick; `adc_data`
// is sampled on the tick on which `ancnt` reaches LATGEN_CNT. `seq_done`
// pulses for one clock when the last channel is latched.
module an_dig_acq_seq
  import trrt_pkg::*;
#(
  parameter int unsigned SOCGEN_CNT = 15,
  parameter int unsigned LATGEN_CNT = 21,
  parameter int unsigned NCH        = N_ANCH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     tick,        // 26 us strobe
  input  logic                     en,          // an_seq_endissts
  input  adc_t                     adc_data,
  input  logic [N_DIG-1:0]         digital_in,
  output logic                     soc,
  output logic [$clog2(NCH)-1:0]   amux_sel,
  output adc_t                     an_latch [NCH],
  output logic [N_DIG-1:0]         dig_latch,
  output logic                     seq_done
);

  typedef enum logic [2:0] {IDLE, SOCGEN, SOCPW, LATCHGEN, NXTCHNL} acq_state_e;

  localparam int unsigned AW = $clog2(LATGEN_CNT + 1);

  acq_state_e      state;
  logic [AW-1:0]   ancnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      ancnt     <= '0;
      amux_sel  <= '0;
      soc       <= 1'b0;
      dig_latch <= '0;
      seq_done  <= 1'b0;
      for (int i = 0; i < NCH; i++) an_latch[i] <= '0;
    end else begin
      seq_done <= 1'b0;
      if (tick) begin
        unique case (state)
          IDLE: begin
            soc   <= 1'b0;
            ancnt <= '0;
            if (en) begin
              state     <= SOCGEN;
              amux_sel  <= '0;
              dig_latch <= digital_in;
            end
          end
          SOCGEN: begin
            if (!en) begin
              state <= IDLE;
              ancnt <= '0;
            end else begin
              ancnt <= ancnt + 1'b1;
              if (ancnt == AW'(SOCGEN_CNT)) begin
                state <= SOCPW;
                soc   <= 1'b1;
              end
            end
          end
          SOCPW: begin
            soc   <= 1'b0;
            ancnt <= ancnt + 1'b1;
            state <= LATCHGEN;
          end
          LATCHGEN: begin
            if (ancnt == AW'(LATGEN_CNT)) begin
              an_latch[amux_sel] <= adc_data;
              if (amux_sel == $bits(amux_sel)'(NCH - 1)) begin
                state    <= IDLE;
                seq_done <= 1'b1;
              end else begin
                state <= NXTCHNL;
              end
            end else begin
              ancnt <= ancnt + 1'b1;
            end
          end
          NXTCHNL: begin
            ancnt    <= '0;
            amux_sel <= amux_sel + 1'b1;
            state    <= SOCGEN;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
