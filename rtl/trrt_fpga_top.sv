// trrt_fpga_top: FPGA of the tracking receiver remote terminal (TRRT) card.
//
// The card lets the satellite's attitude and orbit control system (AOCS), as
// MIL-STD-1553 bus controller, read the tracking receiver's pointing-error
// signals and drive the antenna selection and phase control. The FPGA:
//   * loads the 1553 remote-terminal device's registers and RAM descriptor
//     table from PROM after power-on, a reset telecommand or a watchdog pulse
//     (init_refresh_seq), and, when enabled, rewrites two RAM locations from
//     PROM every 40 ms (refresh);
//   * acquires 8 analog channels (4 used, 4 spare) through an external mux and
//     ADC every 4.8 ms and latches 4 digital inputs (an_dig_acq_seq);
//   * every 1 ms reads the data-ready word and, when it is set, copies the
//     acquired data and the watchdog status into the Tx buffer (drdy_sched);
//   * reads the telecommands: refresh and watchdog enable, watchdog status
//     clear, antenna selections for switch matrices M and R, and the 12-bit
//     phase control word (tc_update);
//   * sequences all of this from one master scheduler (master_rt_sched),
//     shares the 1553 bus with the device (if1553), derives its timing from
//     the 24 MHz clock (clkgen) and watches for 3 minutes without data ready
//     (wdt).
//
// Everything runs on `clk` (24 MHz) with clock-enable strobes from clkgen.
// Resets are synchronous and active high. `por` resets the whole FPGA and
// starts an init. `cmd_rst` (reset telecommand) resets the timing generator
// and the watchdog, as the watchdog reset is the OR of power-on and reset
// command, and restarts the init; so does the watchdog pulse. The PROM,
// the 1553 device with its RAM, and the mux/ADC are outside; their signals
// are ports here.
module trrt_fpga_top
  import trrt_pkg::*;
#(
  parameter int unsigned DIV_1US      = 24,
  parameter int unsigned DIV_26US     = 624,
  parameter int unsigned WDT_LIMIT    = 22500,  // 3 min in 8 ms ticks
  parameter int unsigned WDT_PULSE_MS = 50,
  parameter int unsigned RF_EN        = 40,     // refresh every 40 rounds
  parameter int unsigned HOLD_MS      = 8,
  parameter int unsigned SOCGEN_CNT   = 15,
  parameter int unsigned LATGEN_CNT   = 21
) (
  input  logic                      clk,          // 24 MHz
  input  logic                      por,
  input  logic                      cmd_rst,
  // PROM
  output logic [PROM_AW-1:0]        prom_addr,
  output logic                      prom_oe,
  input  word_t                     prom_data,
  // 1553 device: arbitration and shared bus
  input  logic                      dev_req,
  output logic                      dev_gnt,
  output addr_t                     bus_addr,
  output word_t                     bus_wdata,
  input  word_t                     bus_rdata,
  output logic                      bus_oe,
  output logic [1:0]                reg_access,
  output logic [1:0]                ram_access,
  // analog mux / ADC and digital inputs
  input  adc_t                      adc_data,
  output logic                      soc,
  output logic [$clog2(N_ANCH)-1:0] amux_sel,
  input  logic [N_DIG-1:0]          digital_in,
  // outputs to the RF hardware
  output logic [PCW_W-1:0]          pcw,
  output logic [1:0]                ant_sel_m,
  output logic [1:0]                ant_sel_r,
  // divided clocks (Clk12 for the 1553 device, the others for viewing)
  output logic                      clk12m,
  output logic                      clk1m,
  output logic                      clk26us,
  output logic                      clk2k,
  output logic                      clk1ms,
  output logic                      clk8ms,
  // status
  output subseq_e                   subseq,
  output logic                      sched_busy,
  output logic                      acq_seq_done,
  output logic                      tx_active,
  output logic                      tc_done,
  output logic                      refresh_done,
  output logic                      wdt_pulse,
  output logic                      wdt_occ_sts,
  output logic                      eof_prominit
);

  logic wdtrst;
  assign wdtrst = por | cmd_rst;

  // timing
  logic tick_1us, tick_26us, tick_500us, tick_1ms, tick_8ms;

  clkgen #(.DIV_1US(DIV_1US), .DIV_26US(DIV_26US)) u_clkgen (
    .clk, .rst(wdtrst),
    .tick_1us, .tick_26us, .tick_500us, .tick_1ms, .tick_8ms,
    .clk12m, .clk1m, .clk26us, .clk2k, .clk1ms, .clk8ms
  );

  // 1553 clients
  ram_req_t init_req, drdy_req, tc_req;
  ram_rsp_t init_rsp, drdy_rsp, tc_rsp;
  acc_code_e reg_acc, ram_acc;

  if1553 u_if1553 (
    .clk, .rst(por),
    .init_req, .init_rsp, .drdy_req, .drdy_rsp, .tc_req, .tc_rsp,
    .dev_req, .dev_gnt,
    .bus_addr, .bus_wdata, .bus_rdata, .bus_oe,
    .reg_access(reg_acc), .ram_access(ram_acc)
  );
  assign reg_access = reg_acc;
  assign ram_access = ram_acc;

  // telecommands
  logic refresh_en, wdt_en, wdt_clr;
  logic drdy_start, tc_start, refresh_start, an_seq_en, dr_eof;

  tc_update u_tc (
    .clk, .rst(por), .tick_1us, .start(tc_start),
    .ram_req(tc_req), .ram_rsp(tc_rsp),
    .refresh_en, .wdt_en, .wdt_clr, .ant_sel_m, .ant_sel_r, .pcw,
    .done(tc_done)
  );

  // watchdog
  logic drdy_pulse, wdt_en_sts;

  wdt #(.WDT_LIMIT(WDT_LIMIT), .PULSE_MS(WDT_PULSE_MS)) u_wdt (
    .clk, .rst(wdtrst), .tick_8ms, .tick_1ms, .drdy_pulse,
    .tc_wdt_en(wdt_en), .tc_wdt_clr(wdt_clr),
    .wdt_occ_sts, .wdt_en_sts, .wdt_pulse
  );

  // init and refresh

  init_refresh_seq u_init (
    .clk, .rst(por), .tick(tick_1us),
    .init_start(cmd_rst | wdt_pulse),
    .refresh_flag(refresh_start), .refresh_en,
    .prom_addr, .prom_oe, .prom_data,
    .ram_req(init_req), .ram_rsp(init_rsp),
    .eof_prominit, .refresh_done
  );

  // scheduling
  master_rt_sched #(.RF_EN(RF_EN)) u_master (
    .clk, .rst(por), .tick(tick_500us), .eof_prominit, .dr_eof,
    .subseq, .drdy_start, .tc_start, .refresh_start, .an_seq_en,
    .busy(sched_busy)
  );

  // acquisition
  adc_t             an_latch [N_ANCH];
  logic [N_DIG-1:0] dig_latch;

  an_dig_acq_seq #(.SOCGEN_CNT(SOCGEN_CNT), .LATGEN_CNT(LATGEN_CNT)) u_acq (
    .clk, .rst(por), .tick(tick_26us), .en(an_seq_en),
    .adc_data, .digital_in, .soc, .amux_sel, .an_latch, .dig_latch, .seq_done(acq_seq_done)
  );

  // data ready and Tx update

  drdy_sched #(.HOLD_MS(HOLD_MS)) u_drdy (
    .clk, .rst(por), .tick_1us, .tick_1ms, .start(drdy_start),
    .an_latch, .dig_latch, .wdt_occ_sts, .wdt_en_sts,
    .ram_req(drdy_req), .ram_rsp(drdy_rsp),
    .dr_eof, .drdy_pulse, .tx_active
  );

endmodule
