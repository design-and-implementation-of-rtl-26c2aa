// tb_drdy_sched: data-ready scheduler on the 1553 interface with the device
// model. Strobes are scaled: 1 us every 8 clocks, 1 ms every 200 clocks.
// Checks: with the data-ready LSB clear, `dr_eof` comes at once and nothing
// is written; with it set, Tx SA1 W0 (0x0400) gets the digital inputs and the
// watchdog bits 4 and 5, W1..W8 get the eight analog latches as they were
// when data ready was seen, the data-ready word is cleared, `drdy_pulse` fires
// once, the Tx buffer is complete within 1.1 ms of the start, and the RAM is
// left alone for the 8 ms hold before `dr_eof`.
`timescale 1ns/1ps
module tb_drdy_sched;
  import trrt_pkg::*;
  localparam int TUS = 8, TMS = 200;
  logic clk = 1'b0, rst = 1'b1, tick_1us, tick_1ms, start = 1'b0;
  adc_t an_latch [N_ANCH];
  logic [N_DIG-1:0] dig_latch;
  logic wdt_occ_sts, wdt_en_sts;
  ram_req_t drdy_req, nreq; ram_rsp_t drdy_rsp, rsp0, rsp2;
  logic dr_eof, drdy_pulse, tx_active;
  addr_t bus_addr; word_t bus_wdata, bus_rdata; logic bus_oe, dev_gnt;
  acc_code_e reg_access, ram_access;
  int checks = 0, failures = 0;
  int cu = 0, cm = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cu <= (cu == TUS - 1) ? 0 : cu + 1;
    cm <= (cm == TMS - 1) ? 0 : cm + 1;
    cyc <= cyc + 1;
  end
  assign tick_1us = (cu == TUS - 1);
  assign tick_1ms = (cm == TMS - 1);
  assign nreq = RAM_REQ_IDLE;

  drdy_sched dut (.clk, .rst, .tick_1us, .tick_1ms, .start, .an_latch, .dig_latch,
    .wdt_occ_sts, .wdt_en_sts, .ram_req(drdy_req), .ram_rsp(drdy_rsp),
    .dr_eof, .drdy_pulse, .tx_active);
  if1553 u_if (.clk, .rst, .init_req(nreq), .init_rsp(rsp0), .drdy_req, .drdy_rsp,
    .tc_req(nreq), .tc_rsp(rsp2), .dev_req(1'b0), .dev_gnt,
    .bus_addr, .bus_wdata, .bus_rdata, .bus_oe, .reg_access, .ram_access);
  dev1553_model u_dev (.clk, .bus_addr, .bus_wdata, .bus_rdata, .reg_access, .ram_access);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_pulse = 0;
  always @(posedge clk) if (!rst && drdy_pulse) n_pulse++;

  adc_t exp_an [N_ANCH];
  word_t exp_w0;
  initial begin
    longint t0, t_clr, t_eof, t_last_acc;
    for (int i = 0; i < N_ANCH; i++) an_latch[i] = '0;
    dig_latch = '0; wdt_occ_sts = 0; wdt_en_sts = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    u_dev.ram_wr_cnt = 0; u_dev.ram_rd_cnt = 0;
    for (int i = 0; i < 4096; i++) u_dev.ram[i] = '0;
    for (int round = 0; round < 6; round++) begin
      automatic bit dr = (round % 2 == 1) || (round == 4);
      automatic int wr0;
      for (int i = 0; i < N_ANCH; i++) an_latch[i] = adc_t'($urandom);
      dig_latch = 4'($urandom); wdt_occ_sts = round[1]; wdt_en_sts = round[0] ^ round[2];
      for (int i = 0; i < N_ANCH; i++) exp_an[i] = an_latch[i];
      exp_w0 = word_t'({wdt_en_sts, wdt_occ_sts, dig_latch});
      u_dev.ram[DRDY_ADDR[11:0]] = dr ? 16'h0001 : 16'h0000;
      for (int i = 0; i < 9; i++) u_dev.ram[TX_SA1_W0_ADDR[11:0] + i] = 16'hDEAD;
      wr0 = u_dev.ram_wr_cnt;
      @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
      t0 = cyc;
      // change the latches while the update runs: snapshot must be used
      fork
        begin repeat (4 * TUS) @(posedge clk); for (int i = 0; i < N_ANCH; i++) an_latch[i] = ~exp_an[i]; end
      join_none
      t_last_acc = cyc; t_clr = -1;
      while (!dr_eof) begin
        @(posedge clk);
        if (ram_access != ACC_IDLE) t_last_acc = cyc;
        if (t_clr < 0 && dr && u_dev.ram[DRDY_ADDR[11:0]] == 0) t_clr = cyc;
      end
      t_eof = cyc;
      if (!dr) begin
        check(t_eof - t0 < 4 * TUS, $sformatf("no data ready: dr_eof after %0d clocks", t_eof - t0));
        check(u_dev.ram_wr_cnt == wr0, "no data ready: nothing written");
        check(u_dev.ram[TX_SA1_W0_ADDR[11:0]] == 16'hDEAD, "no data ready: Tx untouched");
      end else begin
        check(u_dev.ram[TX_SA1_W0_ADDR[11:0]] == exp_w0,
              $sformatf("W0 %h expected %h", u_dev.ram[TX_SA1_W0_ADDR[11:0]], exp_w0));
        for (int i = 0; i < N_ANCH; i++)
          check(u_dev.ram[TX_SA1_W0_ADDR[11:0] + 1 + i] == word_t'(exp_an[i]), $sformatf("W%0d %h exp %h", i + 1, u_dev.ram[TX_SA1_W0_ADDR[11:0] + 1 + i], exp_an[i]));
        check(u_dev.ram[DRDY_ADDR[11:0]] == 0, "data ready cleared");
        check(u_dev.ram_wr_cnt - wr0 == 10, $sformatf("%0d writes", u_dev.ram_wr_cnt - wr0));
        check(t_clr - t0 < 11 * TMS / 10, $sformatf("Tx ready %0d clocks after start", t_clr - t0));
        check(t_eof - t_last_acc >= 7 * TMS && t_eof - t_last_acc <= 8 * TMS + 4,
              $sformatf("hold %0d clocks", t_eof - t_last_acc));
      end
      repeat (6 * TUS) @(posedge clk);
    end
    check(n_pulse == 4, $sformatf("%0d data-ready pulses", n_pulse));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
