// tb_trrt_fpga_top: end-to-end test of the TRRT FPGA at 24 MHz with its
// real timing, except a short watchdog (12 ticks of 8 ms = 96 ms, 5 ms pulse)
// so that a watchdog event fits in the run. Around the FPGA: a PROM with an
// init table (register writes, a register read, a NOP and four RAM writes),
// the 1553 device and RAM model, an ADC whose sample carries the channel
// number, and a bus-controller process that writes telecommands and data
// ready into the RAM and grabs the bus at random as the device would.
//
// Mechanisms made to happen, and counted: power-on init, telecommand update
// (phase control word, antenna selects, refresh and watchdog enables),
// acquisition sequences, data-ready Tx updates with the 8 ms hold, refreshes
// repairing corrupted RAM, device bus grants, a watchdog event with its
// re-initialization and status bit, the status clear telecommand and a reset
// telecommand. A mechanism that never happened counts as a failure.
`timescale 1ns/1ps
module tb_trrt_fpga_top;
  import trrt_pkg::*;
  localparam real HALF = 20.833;               // 24 MHz
  localparam longint CYC_PER_MS = 24000;
  logic clk = 1'b0, por = 1'b1, cmd_rst = 1'b0;
  logic [PROM_AW-1:0] prom_addr; logic prom_oe; word_t prom_data;
  logic dev_req = 1'b0, dev_gnt, bus_oe;
  addr_t bus_addr; word_t bus_wdata, bus_rdata;
  logic [1:0] reg_access, ram_access;
  adc_t adc_data; logic soc; logic [2:0] amux_sel;
  logic [N_DIG-1:0] digital_in = 4'b0111;
  logic [PCW_W-1:0] pcw; logic [1:0] ant_sel_m, ant_sel_r;
  logic clk12m, clk1m, clk26us, clk2k, clk1ms, clk8ms;
  subseq_e subseq; logic sched_busy, acq_seq_done, tx_active, tc_done, refresh_done;
  logic wdt_pulse, wdt_occ_sts, eof_prominit;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #HALF clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  trrt_fpga_top #(.WDT_LIMIT(12), .WDT_PULSE_MS(5)) dut (.*);

  prom_model u_prom (.addr(prom_addr), .oe(prom_oe), .data(prom_data));
  dev1553_model u_dev (.clk, .bus_addr, .bus_wdata, .bus_rdata, .reg_access, .ram_access);

  // ADC: bits 10..8 channel, bits 7..0 number of conversions so far
  logic [7:0] nconv = 0;
  always @(posedge clk) if (soc) nconv <= nconv + 1;
  assign adc_data = {1'b0, amux_sel, nconv};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- mechanism counters
  int m_init = 0, m_tc = 0, m_acq = 0, m_tx = 0, m_refresh = 0, m_devgnt = 0;
  int m_wdt = 0, m_clr = 0, m_cmdrst = 0, m_hold = 0;
  logic eof_q = 0, wdt_q = 0, gnt_q = 0;
  always @(posedge clk) if (!por) begin
    eof_q <= eof_prominit; wdt_q <= wdt_pulse; gnt_q <= dev_gnt;
    if (eof_prominit && !eof_q) m_init++;
    if (tc_done) m_tc++;
    if (acq_seq_done) m_acq++;
    if (refresh_done) m_refresh++;
    if (dev_gnt && !gnt_q) m_devgnt++;
    if (wdt_pulse && !wdt_q) m_wdt++;
    check(!(dev_gnt && bus_oe), "FPGA drove the bus during a device grant");
  end

  // ---- init table
  localparam int NE = 9;
  word_t tbl [2 * NE] = '{
    16'h0001, 16'h8000,   // register 1 <= 8000
    16'h0002, 16'h0123,   // register 2 <= 0123
    16'h8000, 16'hFFFF,   // NOP
    16'h2000, 16'h1111,   // RAM 000 <= 1111
    16'h2001, 16'h2222,   // RAM 001 <= 2222
    16'h2002, 16'h3333,   // RAM 002 <= 3333
    16'h4003, 16'h0000,   // read register 3
    16'h2003, 16'h4444,   // RAM 003 <= 4444
    16'h1000, 16'h0000    // end of init
  };
  function automatic int ram_ok();
    int n = 0;
    for (int i = 0; i < 4; i++) if (u_dev.ram[i] == word_t'(16'h1111 * (i + 1))) n++;
    return n;
  endfunction
  task automatic corrupt();
    for (int i = 0; i < 4; i++) u_dev.ram[i] = 16'h0BAD;
  endtask

  // ---- bus controller helpers
  task automatic wait_ms(input real ms);
    repeat (longint'(ms * CYC_PER_MS)) @(posedge clk);
  endtask
  task automatic send_tc(input bit rfen, input bit wdten, input bit clr,
                         input logic [1:0] am, input logic [1:0] ar, input logic [11:0] p);
    u_dev.ram[TC_ADDR[11:0]]  = word_t'({ar, am, 1'b0, clr, wdten, rfen});
    u_dev.ram[PCW_ADDR[11:0]] = word_t'(p);
  endtask
  // set data ready and wait for the Tx update; returns latency in clocks
  task automatic data_ready(output longint lat);
    longint t0;
    u_dev.ram[DRDY_ADDR[11:0]] = 16'h0001;
    t0 = cyc;
    while (u_dev.ram[DRDY_ADDR[11:0]] != 0 && cyc - t0 < 3 * CYC_PER_MS) @(posedge clk);
    lat = cyc - t0;
    check(u_dev.ram[DRDY_ADDR[11:0]] == 0, "data ready served");
    if (u_dev.ram[DRDY_ADDR[11:0]] == 0) m_tx++;
  endtask
  task automatic check_tx(input bit occ, input bit en);
    word_t w0;
    w0 = u_dev.ram[TX_SA1_W0_ADDR[11:0]];
    check(w0 == word_t'({en, occ, digital_in}), $sformatf("Tx W0 %h", w0));
    for (int ch = 0; ch < N_ANCH; ch++)
      check(u_dev.ram[TX_SA1_W0_ADDR[11:0] + 1 + ch][11:8] == 4'(ch),
            $sformatf("Tx W%0d %h", ch + 1, u_dev.ram[TX_SA1_W0_ADDR[11:0] + 1 + ch]));
  endtask

  // ---- device grabs the bus now and then
  bit dev_on = 1;
  initial begin
    @(negedge por);
    while (1) begin
      repeat ($urandom_range(2000, 30000)) @(posedge clk);
      if (dev_on) begin
        dev_req <= 1'b1;
        repeat ($urandom_range(10, 200)) @(posedge clk);
        dev_req <= 1'b0;
      end
    end
  end

  longint lat, t_hold0;
  int n_bus;
  initial begin
    for (int i = 0; i < 2 * NE; i++) u_prom.mem[i] = tbl[i];
    repeat (10) @(posedge clk);
    por <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 4096; i++) u_dev.ram[i] = '0;
    for (int i = 0; i < 32; i++) u_dev.regs[i] = '0;

    // 1. power-on init
    while (!eof_prominit) @(posedge clk);
    check(cyc < 100 * 24, $sformatf("init done after %0d clocks", cyc));
    check(ram_ok() == 4, "descriptor table loaded");
    check(u_dev.regs[1] == 16'h8000 && u_dev.regs[2] == 16'h0123, "registers loaded");
    check(u_dev.ram[12'h000 + 16'hFFF & 12'hFFF] == 0, "NOP entry skipped");

    // 2. telecommands
    send_tc(1'b1, 1'b1, 1'b0, 2'd2, 2'd1, 12'hABC);
    wait_ms(2.5);
    check(pcw == 12'hABC, $sformatf("phase control word %h", pcw));
    check(ant_sel_m == 2'd2 && ant_sel_r == 2'd1, "antenna selects");

    // 3. acquisition: wait for a whole sequence
    while (m_acq < 1) @(posedge clk);

    // 4. data ready and Tx update
    data_ready(lat);
    check(lat <= 11 * CYC_PER_MS / 10, $sformatf("Tx ready %0d clocks after data ready", lat));
    check_tx(1'b0, 1'b1);
    // 8 ms hold: the FPGA leaves the bus alone for at least 7 ms
    repeat (8) @(posedge clk);   // end of the clearing write
    t_hold0 = cyc; n_bus = 0;
    while (cyc - t_hold0 < 7 * CYC_PER_MS) begin @(posedge clk); if (bus_oe) n_bus++; end
    check(n_bus == 0, $sformatf("%0d FPGA bus cycles during the hold", n_bus));
    if (n_bus == 0) m_hold++;

    // 5. refresh repairs the RAM, data ready every 20 ms keeps the watchdog quiet
    corrupt();
    for (int k = 0; k < 6; k++) begin
      wait_ms(20);
      data_ready(lat);
      check(lat <= 11 * CYC_PER_MS / 10, $sformatf("Tx ready %0d clocks after data ready", lat));
    end
    check(ram_ok() == 4, $sformatf("refresh restored %0d of 4", ram_ok()));
    check(m_wdt == 0, "no watchdog while data ready arrives");

    // 6. data ready stops: watchdog fires, re-init, status reported
    corrupt();
    send_tc(1'b0, 1'b1, 1'b0, 2'd3, 2'd0, 12'h5A5);   // refresh off: only re-init repairs
    while (m_wdt == 0 && cyc < 400 * CYC_PER_MS) @(posedge clk);
    check(m_wdt == 1, "watchdog fired");
    while (!eof_prominit) @(posedge clk);
    @(posedge clk);
    while (!eof_prominit) @(posedge clk);
    check(m_init >= 2, "re-initialised after the watchdog");
    check(ram_ok() == 4, "re-init restored the RAM");
    check(wdt_occ_sts, "watchdog occurred status");
    wait_ms(60);                                  // pulse over, scheduler running
    data_ready(lat);
    check_tx(1'b1, 1'b1);
    // clear the status by telecommand
    send_tc(1'b0, 1'b1, 1'b1, 2'd3, 2'd0, 12'h5A5);
    wait_ms(12);
    check(!wdt_occ_sts, "status cleared by telecommand");
    if (!wdt_occ_sts) m_clr++;
    send_tc(1'b0, 1'b1, 1'b0, 2'd3, 2'd0, 12'h5A5);
    wait_ms(2);
    data_ready(lat);
    check_tx(1'b0, 1'b1);
    check(pcw == 12'h5A5 && ant_sel_m == 2'd3 && ant_sel_r == 2'd0, "second telecommand applied");

    // 7. reset telecommand: re-init
    corrupt();
    wait_ms(9);
    cmd_rst <= 1'b1; repeat (5) @(posedge clk); cmd_rst <= 1'b0;
    @(posedge clk);
    check(!eof_prominit, "init restarted by reset command");
    while (!eof_prominit) @(posedge clk);
    check(ram_ok() == 4, "reset command reloaded the RAM");
    m_cmdrst++;
    wait_ms(2);
    data_ready(lat);
    check_tx(1'b0, 1'b1);

    // mechanisms
    check(m_init >= 3, $sformatf("init x%0d", m_init));
    check(m_tc > 0, $sformatf("telecommand updates x%0d", m_tc));
    check(m_acq > 0, $sformatf("acquisition sequences x%0d", m_acq));
    check(m_tx >= 9, $sformatf("Tx updates x%0d", m_tx));
    check(m_hold > 0, "8 ms hold");
    check(m_refresh >= 2, $sformatf("refreshes x%0d", m_refresh));
    check(m_devgnt > 0, $sformatf("device grants x%0d", m_devgnt));
    check(m_wdt == 1, $sformatf("watchdog events x%0d", m_wdt));
    check(m_clr > 0, "status clear");
    check(m_cmdrst > 0, "reset command");
    $display("mechanisms: init %0d tc %0d acq %0d tx %0d hold %0d refresh %0d devgnt %0d wdt %0d clr %0d cmdrst %0d",
             m_init, m_tc, m_acq, m_tx, m_hold, m_refresh, m_devgnt, m_wdt, m_clr, m_cmdrst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800 * CYC_PER_MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
