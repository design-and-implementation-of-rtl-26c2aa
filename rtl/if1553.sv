// if1553: 1553 interface and shared-RAM arbitration.
//
// The 1553 remote-terminal device and the FPGA share one bus to the device's
// registers and to the 1553 RAM. This block owns the FPGA side of that bus.
// It arbitrates between the device (which keeps the RAM for its own 1553
// traffic) and the FPGA, and inside the FPGA between three clients: the
// init/refresh sequencer, the data-ready/Tx-update scheduler and the
// telecommand update scheduler.
//
// Arbitration is this design's choice; the source design only says that
// arbitration logic lets either the device or the FPGA sequencer logic reach
// the RAM. Between accesses, a device request (`dev_req`) wins and is held by
// `dev_gnt` for as long as it stays high; the FPGA bus drivers (`bus_oe`) are
// off meanwhile. Otherwise the clients are served in fixed priority, init/
// refresh first, then data ready, then telecommand. An FPGA access is never
// cut short by a device request.
//
// A request is taken on the clock after it rises. The access then takes
// 1 setup cycle (address and write data driven, access codes idle),
// STROBE_CYC cycles with the access code, 1 hold cycle and 1 cycle of `ack`
// to the client: `ack` is high in the 6th cycle after `req` rises (250 ns at
// 24 MHz) by default. Read data is
// sampled on the last strobe cycle. The access codes are the source design's
// 2-bit register and RAM access words: 01 idle/read state, 11 read,
// 10 write; `reg_access` is used for device registers, `ram_access` for the
// 1553 RAM.
//
// Client handshake: hold `req` and the access fields steady until `ack`, and
// drop `req` (or change the access) on the cycle after `ack`.
module if1553
  import trrt_pkg::*;
#(
  parameter int unsigned STROBE_CYC = 2
) (
  input  logic      clk,
  input  logic      rst,
  // FPGA clients
  input  ram_req_t  init_req,
  output ram_rsp_t  init_rsp,
  input  ram_req_t  drdy_req,
  output ram_rsp_t  drdy_rsp,
  input  ram_req_t  tc_req,
  output ram_rsp_t  tc_rsp,
  // arbitration with the 1553 device
  input  logic      dev_req,
  output logic      dev_gnt,
  // shared bus
  output addr_t     bus_addr,
  output word_t     bus_wdata,
  input  word_t     bus_rdata,
  output logic      bus_oe,
  output acc_code_e reg_access,
  output acc_code_e ram_access
);

  typedef enum logic [2:0] {A_IDLE, A_DEV, A_SETUP, A_STROBE, A_HOLD, A_ACK} arb_state_e;
  typedef enum logic [1:0] {C_INIT, C_DRDY, C_TC} client_e;

  localparam int unsigned SW = $clog2(STROBE_CYC + 1);

  arb_state_e     state;
  client_e        owner;
  ram_req_t       cur;
  logic [SW-1:0]  scnt;
  word_t          rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= A_IDLE;
      owner   <= C_INIT;
      cur     <= RAM_REQ_IDLE;
      scnt    <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        A_IDLE: begin
          if (dev_req) begin
            state <= A_DEV;
          end else if (init_req.req) begin
            state <= A_SETUP; owner <= C_INIT; cur <= init_req;
          end else if (drdy_req.req) begin
            state <= A_SETUP; owner <= C_DRDY; cur <= drdy_req;
          end else if (tc_req.req) begin
            state <= A_SETUP; owner <= C_TC;   cur <= tc_req;
          end
        end
        A_DEV:    if (!dev_req) state <= A_IDLE;
        A_SETUP: begin
          state <= A_STROBE;
          scnt  <= '0;
        end
        A_STROBE: begin
          scnt <= scnt + 1'b1;
          if (scnt == SW'(STROBE_CYC - 1)) begin
            state   <= A_HOLD;
            rdata_q <= bus_rdata;
          end
        end
        A_HOLD:   state <= A_ACK;
        A_ACK:    state <= A_IDLE;
        default:  state <= A_IDLE;
      endcase
    end
  end

  wire fpga_cycle = (state == A_SETUP) || (state == A_STROBE) || (state == A_HOLD);
  wire strobe     = (state == A_STROBE);
  wire ack        = (state == A_ACK);

  always_comb begin
    dev_gnt    = (state == A_DEV);
    bus_oe     = fpga_cycle;
    bus_addr   = cur.addr;
    bus_wdata  = cur.wdata;
    reg_access = ACC_IDLE;
    ram_access = ACC_IDLE;
    if (strobe) begin
      if (cur.mem) ram_access = cur.we ? ACC_WRITE : ACC_READ;
      else         reg_access = cur.we ? ACC_WRITE : ACC_READ;
    end
    init_rsp = '{ack: ack && owner == C_INIT, rdata: rdata_q};
    drdy_rsp = '{ack: ack && owner == C_DRDY, rdata: rdata_q};
    tc_rsp   = '{ack: ack && owner == C_TC,   rdata: rdata_q};
  end

  // A client keeps its request up until it is acknowledged.
  a_init_hold: assert property (@(posedge clk) disable iff (rst)
    init_req.req && !init_rsp.ack |=> init_req.req);
  a_drdy_hold: assert property (@(posedge clk) disable iff (rst)
    drdy_req.req && !drdy_rsp.ack |=> drdy_req.req);
  a_tc_hold: assert property (@(posedge clk) disable iff (rst)
    tc_req.req && !tc_rsp.ack |=> tc_req.req);
  // The FPGA never drives the bus while the device holds it.
  a_excl: assert property (@(posedge clk) disable iff (rst) !(dev_gnt && bus_oe));

endmodule
