// dev1553_model: behavioural model of the 1553 remote-terminal device and its
// shared RAM as seen from the FPGA bus (the real part is an external chip).
// The register file has 32 words (address bits 4..0), the RAM 4096 words
// (address bits 11..0). A read returns data combinationally while the access
// code is 11; a write stores on every clock edge while the code is 10. The
// model counts register and RAM writes and reads so that a testbench can see
// which kind of access happened. Testbenches reach `ram` and `regs` directly
// to play the bus controller's part.
module dev1553_model
  import trrt_pkg::*;
(
  input  logic       clk,
  input  addr_t      bus_addr,
  input  word_t      bus_wdata,
  output word_t      bus_rdata,
  input  logic [1:0] reg_access,
  input  logic [1:0] ram_access
);
  word_t ram  [4096];
  word_t regs [32];
  int unsigned reg_wr_cnt = 0, reg_rd_cnt = 0, ram_wr_cnt = 0, ram_rd_cnt = 0;
  logic [1:0] reg_q = ACC_IDLE, ram_q = ACC_IDLE;

  initial begin
    for (int i = 0; i < 4096; i++) ram[i] = '0;
    for (int i = 0; i < 32; i++) regs[i] = '0;
  end

  always_comb begin
    bus_rdata = '0;
    if (ram_access == ACC_READ)      bus_rdata = ram[bus_addr[11:0]];
    else if (reg_access == ACC_READ) bus_rdata = regs[bus_addr[4:0]];
  end

  always @(posedge clk) begin
    reg_q <= reg_access;
    ram_q <= ram_access;
    if (ram_access == ACC_WRITE) ram[bus_addr[11:0]] <= bus_wdata;
    if (reg_access == ACC_WRITE) regs[bus_addr[4:0]] <= bus_wdata;
    // count each strobe once, on its first cycle
    if (ram_access == ACC_WRITE && ram_q != ACC_WRITE) ram_wr_cnt <= ram_wr_cnt + 1;
    if (ram_access == ACC_READ  && ram_q != ACC_READ)  ram_rd_cnt <= ram_rd_cnt + 1;
    if (reg_access == ACC_WRITE && reg_q != ACC_WRITE) reg_wr_cnt <= reg_wr_cnt + 1;
    if (reg_access == ACC_READ  && reg_q != ACC_READ)  reg_rd_cnt <= reg_rd_cnt + 1;
  end
endmodule
