// tb_trrt_fpga_full: the TRRT FPGA with every parameter at its default
// (24 MHz clock, 3-minute watchdog) through one complete operation:
// power-on init from PROM, telecommand update, analog/digital acquisition,
// a data-ready Tx update and two refreshes. Checks the timing the design is
// built to: data-ready polling every 1 ms, an acquisition sequence every
// 184 x 26 us = 4.784 ms, Tx data ready within 1.1 ms of data ready, no FPGA
// bus traffic for the 8 ms after the update, and a refresh every 40 ms.
`timescale 1ns/1ps
module tb_trrt_fpga_full;
  import trrt_pkg::*;
  localparam real HALF = 20.833;
  localparam longint CYC_PER_MS = 24000;
  logic clk = 1'b0, por = 1'b1, cmd_rst = 1'b0;
  logic [PROM_AW-1:0] prom_addr; logic prom_oe; word_t prom_data;
  logic dev_req = 1'b0, dev_gnt, bus_oe;
  addr_t bus_addr; word_t bus_wdata, bus_rdata;
  logic [1:0] reg_access, ram_access;
  adc_t adc_data; logic soc; logic [2:0] amux_sel;
  logic [N_DIG-1:0] digital_in = 4'b1010;
  logic [PCW_W-1:0] pcw; logic [1:0] ant_sel_m, ant_sel_r;
  logic clk12m, clk1m, clk26us, clk2k, clk1ms, clk8ms;
  subseq_e subseq; logic sched_busy, acq_seq_done, tx_active, tc_done, refresh_done;
  logic wdt_pulse, wdt_occ_sts, eof_prominit;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #HALF clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  trrt_fpga_top dut (.*);

  prom_model u_prom (.addr(prom_addr), .oe(prom_oe), .data(prom_data));
  dev1553_model u_dev (.clk, .bus_addr, .bus_wdata, .bus_rdata, .reg_access, .ram_access);
  assign adc_data = {1'b0, amux_sel, 8'h5A};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // polling period of the data-ready word (reads of DRDY_ADDR)
  longint last_poll = -1; int n_poll = 0, n_poll_ok = 0;
  logic [1:0] ram_q = ACC_IDLE;
  bit tx_since = 0;
  always @(posedge clk) begin
    ram_q <= ram_access;
    if (tx_active) tx_since = 1;
    if (ram_access == ACC_READ && ram_q != ACC_READ && bus_addr == DRDY_ADDR) begin
      if (last_poll >= 0 && !tx_since) begin
        n_poll++;
        // 1 ms, give or take the 1 us pacing of the sub-scheduler
        if (cyc - last_poll >= CYC_PER_MS - 48 && cyc - last_poll <= CYC_PER_MS + 48) n_poll_ok++;
      end
      last_poll = cyc;
      tx_since = 0;
    end
  end
  // acquisition period
  longint last_acq = -1; int n_acq = 0;
  always @(posedge clk) if (!por && acq_seq_done) begin
    if (last_acq >= 0) begin
      check(cyc - last_acq == 184 * 624, $sformatf("acquisition period %0d clocks", cyc - last_acq));
      n_acq++;
    end
    last_acq = cyc;
  end
  // refresh period
  longint last_rf = -1; int n_rf = 0; bit rf_clean = 0;
  always @(posedge clk) if (!por && refresh_done) begin
    if (last_rf >= 0 && rf_clean) begin
      check(cyc - last_rf > 40 * CYC_PER_MS - 600 && cyc - last_rf < 40 * CYC_PER_MS + 600,
            $sformatf("refresh period %0d clocks", cyc - last_rf));
      n_rf++;
    end
    last_rf = cyc;
    rf_clean = 1;
  end
  always @(posedge clk) if (tx_active) rf_clean <= 0;

  longint t0, lat;
  int n_bus;
  initial begin
    // init table: two register writes, five RAM writes, end marker
    u_prom.mem[0]  = 16'h0001; u_prom.mem[1]  = 16'h8001;
    u_prom.mem[2]  = 16'h0004; u_prom.mem[3]  = 16'h00F0;
    for (int i = 0; i < 5; i++) begin
      u_prom.mem[4 + 2 * i] = 16'h2010 + 16'(i);
      u_prom.mem[5 + 2 * i] = 16'hC000 + 16'(i);
    end
    u_prom.mem[14] = 16'h1000; u_prom.mem[15] = 16'h0000;
    repeat (10) @(posedge clk);
    por <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 4096; i++) u_dev.ram[i] = '0;

    while (!eof_prominit) @(posedge clk);
    check(u_dev.regs[1] == 16'h8001 && u_dev.regs[4] == 16'h00F0, "registers loaded");
    for (int i = 0; i < 5; i++) check(u_dev.ram[12'h010 + i] == 16'hC000 + 16'(i), "descriptor table loaded");

    // telecommand: refresh on, watchdog on, antennas 1 and 3, phase word 0x3C5
    u_dev.ram[TC_ADDR[11:0]]  = 16'b11_01_0_0_1_1;
    u_dev.ram[PCW_ADDR[11:0]] = 16'h03C5;
    repeat (3 * CYC_PER_MS) @(posedge clk);
    check(pcw == 12'h3C5 && ant_sel_m == 2'd1 && ant_sel_r == 2'd3, "telecommand outputs");
    while (n_acq < 1) @(posedge clk);

    // data ready
    u_dev.ram[12'h010] = 16'hDEAD;              // upset, to be refreshed
    u_dev.ram[DRDY_ADDR[11:0]] = 16'h0001;
    t0 = cyc;
    while (u_dev.ram[DRDY_ADDR[11:0]] != 0 && cyc - t0 < 3 * CYC_PER_MS) @(posedge clk);
    lat = cyc - t0;
    check(lat <= 11 * CYC_PER_MS / 10, $sformatf("Tx ready %0d clocks after data ready", lat));
    check(u_dev.ram[TX_SA1_W0_ADDR[11:0]] == 16'h002A, $sformatf("W0 %h", u_dev.ram[TX_SA1_W0_ADDR[11:0]]));
    for (int ch = 0; ch < N_ANCH; ch++)
      check(u_dev.ram[TX_SA1_W0_ADDR[11:0] + 1 + ch] == word_t'({1'b0, 3'(ch), 8'h5A}), $sformatf("W%0d", ch + 1));
    repeat (8) @(posedge clk);
    n_bus = 0;
    repeat (7 * CYC_PER_MS) begin @(posedge clk); if (bus_oe) n_bus++; end
    check(n_bus == 0, "no FPGA bus traffic in the 8 ms hold");

    // two refreshes 40 ms apart
    while (n_rf < 1) @(posedge clk);
    check(u_dev.ram[12'h010] == 16'hC000, "refresh repaired the upset location");
    check(n_poll > 20 && n_poll_ok == n_poll, $sformatf("polling %0d of %0d at 1 ms", n_poll_ok, n_poll));
    check(!wdt_pulse && !wdt_occ_sts, "no watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * CYC_PER_MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
