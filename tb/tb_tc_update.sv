// tb_tc_update: telecommand update on the 1553 interface with the device
// model; the 1 us strobe comes every 8 clocks. Each round writes a random
// telecommand word and phase control word into the model RAM, starts the
// block and checks every decoded output, the one-cycle status-clear pulse,
// and that the update is complete within a few microseconds. Outputs must
// hold their values between updates.
`timescale 1ns/1ps
module tb_tc_update;
  import trrt_pkg::*;
  localparam int TUS = 8;
  logic clk = 1'b0, rst = 1'b1, tick_1us, start = 1'b0;
  ram_req_t tc_req, nreq; ram_rsp_t tc_rsp, rsp0, rsp1;
  logic refresh_en, wdt_en, wdt_clr, done;
  logic [1:0] ant_sel_m, ant_sel_r;
  logic [PCW_W-1:0] pcw;
  addr_t bus_addr; word_t bus_wdata, bus_rdata; logic bus_oe, dev_gnt;
  acc_code_e reg_access, ram_access;
  int checks = 0, failures = 0;
  int cu = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cu <= (cu == TUS - 1) ? 0 : cu + 1;
  assign tick_1us = (cu == TUS - 1);
  assign nreq = RAM_REQ_IDLE;

  tc_update dut (.clk, .rst, .tick_1us, .start, .ram_req(tc_req), .ram_rsp(tc_rsp),
    .refresh_en, .wdt_en, .wdt_clr, .ant_sel_m, .ant_sel_r, .pcw, .done);
  if1553 u_if (.clk, .rst, .init_req(nreq), .init_rsp(rsp0), .drdy_req(nreq), .drdy_rsp(rsp1),
    .tc_req, .tc_rsp, .dev_req(1'b0), .dev_gnt,
    .bus_addr, .bus_wdata, .bus_rdata, .bus_oe, .reg_access, .ram_access);
  dev1553_model u_dev (.clk, .bus_addr, .bus_wdata, .bus_rdata, .reg_access, .ram_access);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_clr = 0;
  always @(posedge clk) if (!rst && wdt_clr) n_clr++;

  initial begin
    int t, clr0;
    word_t tcw, pw;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(!refresh_en && !wdt_en && ant_sel_m == 0 && ant_sel_r == 0 && pcw == 0, "reset values");
    for (int r = 0; r < 40; r++) begin
      tcw = word_t'($urandom); pw = word_t'($urandom);
      u_dev.ram[TC_ADDR[11:0]] = tcw;
      u_dev.ram[PCW_ADDR[11:0]] = pw;
      clr0 = n_clr;
      @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
      t = 0;
      while (!done) begin @(posedge clk); t++; end
      @(posedge clk);
      check(t <= 3 * TUS, $sformatf("update took %0d clocks", t));
      check(refresh_en == tcw[0], "refresh enable");
      check(wdt_en == tcw[1], "watchdog enable");
      check(n_clr - clr0 == int'(tcw[2]), "status clear pulse");
      check(ant_sel_m == tcw[5:4], "antenna M");
      check(ant_sel_r == tcw[7:6], "antenna R");
      check(pcw == pw[11:0], $sformatf("phase control word %h expected %h", pcw, pw[11:0]));
      // hold between updates
      u_dev.ram[TC_ADDR[11:0]] = ~tcw;
      u_dev.ram[PCW_ADDR[11:0]] = ~pw;
      repeat (5 * TUS) @(posedge clk);
      check(pcw == pw[11:0] && ant_sel_m == tcw[5:4], "outputs hold without a start");
    end
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
