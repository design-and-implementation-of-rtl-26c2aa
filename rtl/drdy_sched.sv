// drdy_sched: data-ready read and Tx update scheduler.
//
// The bus controller announces that it is about to read the Tx data by
// setting the LSB of the RT access word (data ready) in 1553 RAM. Each time
// the master scheduler starts this block (every 1 ms), it reads that word.
// If the LSB is 1 it takes a snapshot of the acquisition latches and writes
// the Tx buffer of subaddress 1: W0 at 0x0400 holds the digital inputs in
// bits 3..0, the watchdog-occurred status in bit 4 and the watchdog-enable
// status in bit 5; W1..W8 hold the eight analog channels. It then clears the
// data-ready word, pulses `drdy_pulse` to the watchdog and keeps off the
// shared RAM for HOLD_MS milliseconds (8 ms), so that the bus controller's
// read is not disturbed, before it reports `dr_eof`. If the LSB is 0 it
// reports `dr_eof` at once.
//
// Following the source design: the 1 ms polling, the data-ready LSB, the
// clearing of the word, the W0 location and status bits, the 8 ms wait and
// the 1 MHz pacing. This design's choices: the data-ready word address
// (DRDY_ADDR in trrt_pkg), the layout of W1..W8 (one 12-bit sample per word,
// right-aligned), the snapshot, and writing 0 to clear the word.
//
// Timing: one 1553 access per 1 us strobe. From the start pulse, the read of
// the data-ready word, nine Tx writes and the clearing write take about 11 us,
// well inside the 1.1 ms the bus controller allows after setting data ready.
module drdy_sched
  import trrt_pkg::*;
#(
  parameter int unsigned HOLD_MS = 8,
  parameter int unsigned NCH     = N_ANCH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick_1us,
  input  logic              tick_1ms,
  input  logic              start,        // from the master scheduler
  input  adc_t              an_latch [NCH],
  input  logic [N_DIG-1:0]  dig_latch,
  input  logic              wdt_occ_sts,
  input  logic              wdt_en_sts,
  output ram_req_t          ram_req,
  input  ram_rsp_t          ram_rsp,
  output logic              dr_eof,       // one-cycle pulse
  output logic              drdy_pulse,   // one-cycle pulse, data ready seen
  output logic              tx_active     // Tx update or hold in progress
);

  typedef enum logic [2:0] {D_IDLE, D_RDREQ, D_RDWAIT, D_TX, D_TXWAIT,
                            D_CLR, D_HOLD, D_EOF} drdy_state_e;

  localparam int unsigned IW = $clog2(NCH + 2);
  localparam int unsigned HW = $clog2(HOLD_MS + 1);

  drdy_state_e     state;
  logic [IW-1:0]   idx;
  logic [HW-1:0]   hcnt;
  adc_t            snap [NCH];
  word_t           w0_snap;
  word_t           tx_word;

  always_comb begin
    tx_word = w0_snap;
    for (int i = 0; i < NCH; i++)
      if (idx == IW'(i + 1)) tx_word = word_t'(snap[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= D_IDLE;
      idx        <= '0;
      hcnt       <= '0;
      w0_snap    <= '0;
      ram_req    <= RAM_REQ_IDLE;
      dr_eof     <= 1'b0;
      drdy_pulse <= 1'b0;
      for (int i = 0; i < NCH; i++) snap[i] <= '0;
    end else begin
      dr_eof     <= 1'b0;
      drdy_pulse <= 1'b0;
      unique case (state)
        D_IDLE:  if (start) state <= D_RDREQ;
        D_RDREQ: if (tick_1us) begin
          ram_req <= '{req: 1'b1, we: 1'b0, mem: 1'b1, addr: DRDY_ADDR, wdata: '0};
          state   <= D_RDWAIT;
        end
        D_RDWAIT: if (ram_rsp.ack) begin
          ram_req <= RAM_REQ_IDLE;
          if (ram_rsp.rdata[0]) begin
            drdy_pulse <= 1'b1;
            idx        <= '0;
            for (int i = 0; i < NCH; i++) snap[i] <= an_latch[i];
            w0_snap <= '0;
            w0_snap[N_DIG-1:0]     <= dig_latch;
            w0_snap[W0_WDT_OCC_BIT] <= wdt_occ_sts;
            w0_snap[W0_WDT_EN_BIT]  <= wdt_en_sts;
            state <= D_TX;
          end else begin
            state <= D_EOF;
          end
        end
        D_TX: if (tick_1us) begin
          ram_req <= '{req: 1'b1, we: 1'b1, mem: 1'b1,
                       addr: TX_SA1_W0_ADDR + addr_t'(idx), wdata: tx_word};
          state   <= D_TXWAIT;
        end
        D_TXWAIT: if (ram_rsp.ack) begin
          ram_req <= RAM_REQ_IDLE;
          if (idx == IW'(NCH)) begin
            state <= D_CLR;
          end else begin
            idx   <= idx + 1'b1;
            state <= D_TX;
          end
        end
        D_CLR: begin
          if (!ram_req.req && tick_1us) begin
            ram_req <= '{req: 1'b1, we: 1'b1, mem: 1'b1, addr: DRDY_ADDR, wdata: '0};
          end else if (ram_rsp.ack) begin
            ram_req <= RAM_REQ_IDLE;
            hcnt    <= '0;
            state   <= D_HOLD;
          end
        end
        D_HOLD: if (tick_1ms) begin
          hcnt <= hcnt + 1'b1;
          if (hcnt == HW'(HOLD_MS - 1)) state <= D_EOF;
        end
        D_EOF: begin
          dr_eof <= 1'b1;
          state  <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign tx_active = (state == D_TX) || (state == D_TXWAIT) ||
                     (state == D_CLR) || (state == D_HOLD);

endmodule
