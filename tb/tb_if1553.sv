// tb_if1553: 1553 interface with the device/RAM model. Three client
// processes issue random register and RAM reads and writes while a device
// process grabs the bus at random. Checks: every write reaches the right
// store, every read returns what a reference copy holds, an FPGA access is
// 6 clocks from request to ack, simultaneous requests are served init first,
// then data ready, then telecommand, the FPGA never drives the bus while the
// device holds it, and the access codes are 01 idle, 11 read, 10 write.
`timescale 1ns/1ps
module tb_if1553;
  import trrt_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ram_req_t req [3];
  ram_rsp_t rsp [3];
  logic dev_req = 1'b0, dev_gnt, bus_oe;
  addr_t bus_addr; word_t bus_wdata, bus_rdata;
  acc_code_e reg_access, ram_access;
  int checks = 0, failures = 0;
  int served_order [$];
  int dev_grants = 0;

  always #5 clk = ~clk;

  if1553 dut (.clk, .rst,
    .init_req(req[0]), .init_rsp(rsp[0]), .drdy_req(req[1]), .drdy_rsp(rsp[1]),
    .tc_req(req[2]), .tc_rsp(rsp[2]), .dev_req, .dev_gnt,
    .bus_addr, .bus_wdata, .bus_rdata, .bus_oe, .reg_access, .ram_access);

  dev1553_model u_dev (.clk, .bus_addr, .bus_wdata, .bus_rdata,
    .reg_access(reg_access), .ram_access(ram_access));

  word_t ref_ram [4096];
  word_t ref_reg [32];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bus rules, every cycle
  always @(posedge clk) if (!rst) begin
    check(!(dev_gnt && bus_oe), "bus driven during device grant");
    check(!(reg_access != ACC_IDLE && ram_access != ACC_IDLE), "both strobes at once");
    check(reg_access inside {ACC_IDLE, ACC_READ, ACC_WRITE} &&
          ram_access inside {ACC_IDLE, ACC_READ, ACC_WRITE}, "illegal access code");
    if (!bus_oe) check(reg_access == ACC_IDLE && ram_access == ACC_IDLE, "strobe without drive");
    for (int i = 0; i < 3; i++) if (rsp[i].ack) served_order.push_back(i);
  end

  // one access from client c; returns the number of clocks to ack
  task automatic access(input int c, input bit we, input bit mem, input addr_t a,
                        input word_t d, output word_t rd, output int lat);
    lat = 0;
    req[c] <= '{req: 1'b1, we: we, mem: mem, addr: a, wdata: d};
    @(posedge clk);
    while (!rsp[c].ack) begin @(posedge clk); lat++; end
    rd = rsp[c].rdata;
    req[c] <= RAM_REQ_IDLE;
    @(posedge clk);
  endtask

  task automatic client(input int c, input int n);
    word_t rd; int lat;
    for (int k = 0; k < n; k++) begin
      bit we = $urandom_range(0, 1) == 1;
      bit mem = $urandom_range(0, 3) != 0;
      // each client owns its own slice of addresses, so the reference stays exact
      addr_t a = mem ? addr_t'(c * 1024 + $urandom_range(0, 1023)) : addr_t'(c * 8 + $urandom_range(0, 7));
      word_t d = word_t'($urandom);
      access(c, we, mem, a, d, rd, lat);
      if (we) begin
        if (mem) ref_ram[a[11:0]] = d; else ref_reg[a[4:0]] = d;
        if (mem) check(u_dev.ram[a[11:0]] == d, "RAM write landed");
        else     check(u_dev.regs[a[4:0]] == d, "register write landed");
      end else begin
        check(rd == (mem ? ref_ram[a[11:0]] : ref_reg[a[4:0]]),
              $sformatf("client %0d read %h at %h", c, rd, a));
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  endtask

  initial begin
    word_t rd; int lat;
    for (int i = 0; i < 4096; i++) ref_ram[i] = '0;
    for (int i = 0; i < 32; i++) ref_reg[i] = '0;
    for (int i = 0; i < 3; i++) req[i] = RAM_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // latency of a lone access: setup, 2 strobes, hold, then ack
    access(1, 1'b1, 1'b1, 16'h0123, 16'hBEEF, rd, lat);
    ref_ram[12'h123] = 16'hBEEF;
    check(lat == 5, $sformatf("ack %0d clocks after request", lat + 1));
    check(u_dev.ram_wr_cnt == 1 && u_dev.reg_wr_cnt == 0, "one RAM write strobe");
    // priority: all three at once
    served_order.delete();
    for (int i = 0; i < 3; i++) req[i] <= '{req: 1'b1, we: 1'b0, mem: 1'b1, addr: 16'h0123, wdata: '0};
    @(posedge clk);
    fork
      begin while (!rsp[0].ack) @(posedge clk); req[0] <= RAM_REQ_IDLE; end
      begin while (!rsp[1].ack) @(posedge clk); req[1] <= RAM_REQ_IDLE; end
      begin while (!rsp[2].ack) @(posedge clk); req[2] <= RAM_REQ_IDLE; end
    join
    @(posedge clk);
    check(served_order.size() == 3 && served_order[0] == 0 && served_order[1] == 1 &&
          served_order[2] == 2, "served init, data ready, telecommand in that order");
    // device wins between accesses
    dev_req <= 1'b1;
    req[2] <= '{req: 1'b1, we: 1'b0, mem: 1'b0, addr: 16'h0003, wdata: '0};
    repeat (2) @(posedge clk);
    check(dev_gnt, "device granted");
    repeat (20) begin @(posedge clk); check(!rsp[2].ack, "no FPGA access during device grant"); end
    dev_req <= 1'b0;
    while (!rsp[2].ack) @(posedge clk);
    req[2] <= RAM_REQ_IDLE;
    @(posedge clk);
    // random traffic
    fork
      client(0, 200);
      client(1, 200);
      client(2, 200);
      begin
        repeat (60) begin
          repeat ($urandom_range(5, 40)) @(posedge clk);
          dev_req <= 1'b1; dev_grants++;
          repeat ($urandom_range(1, 10)) @(posedge clk);
          dev_req <= 1'b0;
        end
      end
    join
    check(u_dev.reg_rd_cnt > 0 && u_dev.reg_wr_cnt > 0 && u_dev.ram_rd_cnt > 0, "all access kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
