// init_refresh_seq: 1553 initialization and refresh sequencer.
//
// Configures the 1553 device as a remote terminal: it walks an init table in
// PROM and carries out each entry as a register or 1553 RAM access, which
// loads the configuration registers and the RAM descriptor table. It runs on
// power-on reset and again on every rising edge of `init_start` (reset
// telecommand or watchdog pulse). While the table is walked `eof_prominit` is
// low; it rises when the end-of-init entry is reached, and the master
// scheduler waits for it.
//
// Refresh: when the master scheduler raises `refresh_flag` and refresh is
// enabled by telecommand, the same table is walked from where the previous
// refresh stopped, and the next REFRESH_LOCS (two) RAM-write entries are
// written again from PROM, repairing any upset in those locations. Entries
// that are not RAM writes are skipped; on reaching the end-of-init entry the
// walk wraps to entry 0 once, so a refresh never loops.
//
// Table format. Each entry is two PROM words. Bits 15..12 of the first word
// are the source design's control bits: 15 NOP, 14 read(1)/write(0),
// 13 1553 RAM(1)/device register(0), 12 end of initialization. Bits 11..0 of
// the first word hold the target address and the second word the data; that
// split, and the end-of-init entry being a marker with no access of its own,
// are this design's choices. Read entries are carried out and the data is
// dropped (reading device registers can clear their status).
//
// Timing: one PROM word is addressed per 1 us strobe and sampled on the next,
// as the source design runs this block at 1 MHz; an access entry then waits
// for the 1553 interface's `ack`. An entry takes about 4 us, a skipped one
// about 3 us.
module init_refresh_seq
  import trrt_pkg::*;
#(
  parameter int unsigned REFRESH_LOCS = 2
) (
  input  logic                clk,
  input  logic                rst,           // power-on reset: starts an init
  input  logic                tick,          // 1 us strobe
  input  logic                init_start,    // reset command OR watchdog pulse
  input  logic                refresh_flag,  // from the master scheduler
  input  logic                refresh_en,    // telecommand
  // PROM
  output logic [PROM_AW-1:0]  prom_addr,
  output logic                prom_oe,
  input  word_t               prom_data,
  // 1553 interface
  output ram_req_t            ram_req,
  input  ram_rsp_t            ram_rsp,
  // status
  output logic                eof_prominit,
  output logic                refresh_done   // one-cycle pulse
);

  typedef enum logic [2:0] {S_IDLE, S_RD0, S_LAT0, S_LAT1, S_DEC, S_ACC} seq_state_e;

  localparam int unsigned EW = PROM_AW - 1;       // entry index width
  localparam int unsigned RW = $clog2(REFRESH_LOCS + 1);

  seq_state_e     state;
  logic           init_flag;     // init_flag_s: an init is pending
  logic           refresh_flag_q;// refresh_flag_s, held until served
  logic           refresh_mode;
  logic           wrapped;
  logic           init_start_q;
  logic [EW-1:0]  ptr;
  logic [EW-1:0]  ref_ptr;
  logic [RW-1:0]  rcnt;
  word_t          w0, w1;

  wire eofinit = w0[PROM_EOFINIT_BIT];
  wire memregn = w0[PROM_MEMREGN_BIT];
  wire rdwrn   = w0[PROM_RDWRN_BIT];
  wire nop     = w0[PROM_NOP_BIT];

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      init_flag      <= 1'b1;
      refresh_flag_q <= 1'b0;
      refresh_mode   <= 1'b0;
      wrapped        <= 1'b0;
      init_start_q   <= 1'b0;
      ptr            <= '0;
      ref_ptr        <= '0;
      rcnt           <= '0;
      w0             <= '0;
      w1             <= '0;
      prom_addr      <= '0;
      prom_oe        <= 1'b0;
      ram_req        <= RAM_REQ_IDLE;
      eof_prominit   <= 1'b0;
      refresh_done   <= 1'b0;
    end else begin
      init_start_q <= init_start;
      refresh_done <= 1'b0;
      if (init_start && !init_start_q) begin
        init_flag    <= 1'b1;
        eof_prominit <= 1'b0;
      end
      if (refresh_flag) refresh_flag_q <= 1'b1;

      unique case (state)
        S_IDLE: if (tick) begin
          if (init_flag) begin
            init_flag    <= 1'b0;
            refresh_mode <= 1'b0;
            ptr          <= '0;
            state        <= S_RD0;
          end else if (refresh_flag_q) begin
            refresh_flag_q <= 1'b0;
            if (refresh_en) begin
              refresh_mode <= 1'b1;
              wrapped      <= 1'b0;
              rcnt         <= '0;
              ptr          <= ref_ptr;
              state        <= S_RD0;
            end
          end
        end
        S_RD0: if (tick) begin
          if (init_flag) begin
            // a new init request aborts the walk in progress
            state <= S_IDLE;
          end else begin
            prom_addr <= {ptr, 1'b0};
            prom_oe   <= 1'b1;
            state     <= S_LAT0;
          end
        end
        S_LAT0: if (tick) begin
          w0        <= prom_data;
          prom_addr <= {ptr, 1'b1};
          state     <= S_LAT1;
        end
        S_LAT1: if (tick) begin
          w1      <= prom_data;
          prom_oe <= 1'b0;
          state   <= S_DEC;
        end
        S_DEC: begin
          if (eofinit) begin
            ptr <= '0;
            if (!refresh_mode) begin
              eof_prominit <= 1'b1;
              ref_ptr      <= '0;
              state        <= S_IDLE;
            end else if (wrapped) begin
              ref_ptr      <= '0;
              refresh_done <= 1'b1;
              state        <= S_IDLE;
            end else begin
              wrapped <= 1'b1;
              state   <= S_RD0;
            end
          end else if (nop || (refresh_mode && (rdwrn || !memregn))) begin
            ptr   <= ptr + 1'b1;
            state <= S_RD0;
          end else begin
            ram_req <= '{req: 1'b1, we: !rdwrn, mem: memregn,
                         addr: addr_t'(w0[11:0]), wdata: w1};
            state   <= S_ACC;
          end
        end
        S_ACC: if (ram_rsp.ack) begin
          ram_req <= RAM_REQ_IDLE;
          ptr     <= ptr + 1'b1;
          if (refresh_mode) begin
            rcnt <= rcnt + 1'b1;
            if (rcnt == RW'(REFRESH_LOCS - 1)) begin
              ref_ptr      <= ptr + 1'b1;
              refresh_done <= 1'b1;
              state        <= S_IDLE;
            end else begin
              state <= S_RD0;
            end
          end else begin
            state <= S_RD0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
