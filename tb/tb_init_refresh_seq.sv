// tb_init_refresh_seq: init/refresh sequencer on the 1553 interface, with
// PROM and device models. The 1 us strobe comes every 8 clocks. The PROM
// table is generated here: register writes, a register read, NOPs and RAM
// writes to distinct addresses, then the end-of-init entry. Checks: power-on
// init carries out every entry and skips the NOPs; `eof_prominit` rises at the
// end and not n_before; refresh rewrites exactly the next two RAM-write
// entries each time, wrapping round the table; refresh does nothing when
// disabled; a rising `init_start` reloads the whole table.
`timescale 1ns/1ps
module tb_init_refresh_seq;
  import trrt_pkg::*;
  localparam int TP = 8;
  localparam int NE = 24;               // entries n_before the end marker
  logic clk = 1'b0, rst = 1'b1, tick;
  logic init_start = 1'b0, refresh_flag = 1'b0, refresh_en = 1'b0;
  logic [PROM_AW-1:0] prom_addr; logic prom_oe; word_t prom_data;
  ram_req_t init_req, nreq; ram_rsp_t init_rsp, rsp1, rsp2;
  logic eof_prominit, refresh_done;
  addr_t bus_addr; word_t bus_wdata, bus_rdata; logic bus_oe, dev_gnt;
  acc_code_e reg_access, ram_access;
  int checks = 0, failures = 0;
  int tc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tc <= (tc == TP - 1) ? 0 : tc + 1;
  assign tick = (tc == TP - 1);
  assign nreq = RAM_REQ_IDLE;

  init_refresh_seq dut (.clk, .rst, .tick, .init_start, .refresh_flag, .refresh_en,
    .prom_addr, .prom_oe, .prom_data, .ram_req(init_req), .ram_rsp(init_rsp),
    .eof_prominit, .refresh_done);
  if1553 u_if (.clk, .rst, .init_req, .init_rsp, .drdy_req(nreq), .drdy_rsp(rsp1),
    .tc_req(nreq), .tc_rsp(rsp2), .dev_req(1'b0), .dev_gnt,
    .bus_addr, .bus_wdata, .bus_rdata, .bus_oe, .reg_access, .ram_access);
  prom_model u_prom (.addr(prom_addr), .oe(prom_oe), .data(prom_data));
  dev1553_model u_dev (.clk, .bus_addr, .bus_wdata, .bus_rdata, .reg_access, .ram_access);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // table: kind 0 reg write, 1 reg read, 2 NOP, 3 RAM write
  int    kind [NE];
  addr_t eaddr [NE];
  word_t edata [NE];
  int    memw [$];                      // entry numbers of RAM writes
  int    n_regw = 0, n_regr = 0;

  task automatic build_table();
    for (int e = 0; e < NE; e++) begin
      word_t w0;
      kind[e] = (e % 6 == 1) ? 2 : (e % 6 == 4) ? 1 : (e % 6 == 0) ? 0 : 3;
      edata[e] = word_t'($urandom);
      case (kind[e])
        0: begin eaddr[e] = addr_t'(e % 32); w0 = 16'h0000; n_regw++; end
        1: begin eaddr[e] = addr_t'(e % 32); w0 = 16'h4000; n_regr++; end
        2: begin eaddr[e] = addr_t'(12'h300 + e); w0 = 16'hA000; end   // NOP with RAM-write bits set
        default: begin eaddr[e] = addr_t'(12'h100 + 3 * e); w0 = 16'h2000; memw.push_back(e); end
      endcase
      u_prom.mem[2 * e]     = w0 | word_t'(eaddr[e][11:0]);
      u_prom.mem[2 * e + 1] = edata[e];
    end
    u_prom.mem[2 * NE]     = 16'h1000;
    u_prom.mem[2 * NE + 1] = 16'h0000;
  endtask

  function automatic int n_ok();
    int n = 0;
    foreach (memw[i]) if (u_dev.ram[eaddr[memw[i]][11:0]] == edata[memw[i]]) n++;
    return n;
  endfunction

  task automatic corrupt_all();
    foreach (memw[i]) u_dev.ram[eaddr[memw[i]][11:0]] = ~edata[memw[i]];
  endtask

  int t0;
  initial begin
    build_table();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // forget bus activity of the random power-up state before reset
    u_dev.reg_wr_cnt = 0; u_dev.reg_rd_cnt = 0; u_dev.ram_wr_cnt = 0; u_dev.ram_rd_cnt = 0;
    for (int i = 0; i < 4096; i++) u_dev.ram[i] = '0;
    t0 = 0;
    while (!eof_prominit) begin
      @(posedge clk); t0++;
    end
    // init time: at most 5 strobes per entry
    check(t0 <= (NE + 1) * 5 * TP, $sformatf("init took %0d clocks", t0));
    check(n_ok() == memw.size(), $sformatf("%0d of %0d RAM writes done", n_ok(), memw.size()));
    for (int e = 0; e < NE; e++) begin
      if (kind[e] == 0) check(u_dev.regs[eaddr[e][4:0]] == edata[e], $sformatf("register %0d", e));
      if (kind[e] == 2) check(u_dev.ram[12'h300 + e] == 0, "NOP entry not executed");
    end
    check(u_dev.reg_wr_cnt == n_regw, $sformatf("register writes %0d expected %0d", u_dev.reg_wr_cnt, n_regw));
    check(u_dev.reg_rd_cnt == n_regr, $sformatf("register reads %0d", u_dev.reg_rd_cnt));
    check(u_dev.ram_wr_cnt == memw.size(), $sformatf("RAM writes %0d", u_dev.ram_wr_cnt));

    // refresh disabled: nothing happens
    corrupt_all();
    refresh_flag <= 1'b1; @(posedge clk); refresh_flag <= 1'b0;
    repeat (40 * TP) @(posedge clk);
    check(n_ok() == 0, "no refresh while disabled");

    // refresh enabled: two locations per refresh, in table order, wrapping
    refresh_en <= 1'b1;
    for (int r = 0; r < 12; r++) begin
      int n_before, wr0;
      n_before = n_ok(); wr0 = u_dev.ram_wr_cnt;
      refresh_flag <= 1'b1; @(posedge clk); refresh_flag <= 1'b0;
      while (!refresh_done) @(posedge clk);
      @(posedge clk);
      check(u_dev.ram_wr_cnt - wr0 == 2, $sformatf("refresh %0d wrote %0d", r, u_dev.ram_wr_cnt - wr0));
      for (int k = 0; k < 2; k++) begin
        automatic int e = memw[(2 * r + k) % memw.size()];
        check(u_dev.ram[eaddr[e][11:0]] == edata[e], $sformatf("refresh %0d entry %0d", r, e));
      end
      if (2 * (r + 1) <= memw.size())
        check(n_ok() == n_before + 2, $sformatf("refresh %0d restored %0d", r, n_ok() - n_before));
      if ((2 * (r + 1)) % memw.size() == 0) corrupt_all();
    end

    // re-init on a rising init_start
    corrupt_all();
    init_start <= 1'b1;
    @(posedge clk); @(posedge clk);
    check(!eof_prominit, "eof drops on re-init");
    repeat (100 * TP) @(posedge clk);   // held high: only one init
    while (!eof_prominit) @(posedge clk);
    check(n_ok() == memw.size(), "re-init restored all RAM writes");
    init_start <= 1'b0;
    repeat (20 * TP) @(posedge clk);
    check(eof_prominit, "eof stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
