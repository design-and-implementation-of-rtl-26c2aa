// trrt_pkg: types and constants shared by the blocks of the tracking receiver
// remote terminal (TRRT) FPGA.
//
// The FPGA sits between a MIL-STD-1553 remote-terminal device (its registers
// and its shared 1553 RAM), a configuration PROM, an analog multiplexer/ADC and
// a handful of discrete inputs and outputs. Every block talks to the 1553 side
// through the same request/response bundle, defined here as two packed
// structs: a client raises `req` with the access it wants and holds it until
// the 1553 interface returns `ack` for one cycle, with read data in `rdata`.
//
// What follows the source design: the PROM control bits 12..15 of the first
// word of an init entry, the 2-bit register/RAM access codes, the Tx SA1 W0
// location 0x0400 and its status bits 4 and 5, eight analog channels (four
// used plus four spare) and the scheduler flag names. Addresses other than
// 0x0400, the word layout of the telecommand and the widths of ADC data and
// digital inputs are this design's own choices.
package trrt_pkg;

  localparam int unsigned ADDR_W    = 16;  // 1553 RAM / register address width
  localparam int unsigned DATA_W    = 16;  // 1553 data word
  localparam int unsigned PROM_AW   = 12;  // PROM word address width
  localparam int unsigned ADC_W     = 12;  // ADC sample width
  localparam int unsigned N_ANCH    = 8;   // 4 analog + 4 spare channels
  localparam int unsigned N_DIG     = 4;   // digital (SIL) inputs
  localparam int unsigned PCW_W     = 12;  // phase control word

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADC_W-1:0]  adc_t;

  // 1553 memory map used by the schedulers.
  localparam addr_t TX_SA1_W0_ADDR = 16'h0400;  // digital data + WDT status
  localparam addr_t DRDY_ADDR      = 16'h0200;  // RT access word (data ready)
  localparam addr_t TC_ADDR        = 16'h0220;  // internal-logic telecommand
  localparam addr_t PCW_ADDR       = 16'h0221;  // phase control word

  // Bit positions in Tx SA1 W0.
  localparam int unsigned W0_WDT_OCC_BIT  = 4;
  localparam int unsigned W0_WDT_EN_BIT   = 5;

  // Bit positions in the telecommand word.
  localparam int unsigned TC_RFEN_BIT   = 0;  // refresh logic enable
  localparam int unsigned TC_WDTEN_BIT  = 1;  // watchdog enable
  localparam int unsigned TC_WDTCLR_BIT = 2;  // clear WDT-occurred status
  localparam int unsigned TC_ANTM_LSB   = 4;  // antenna select, matrix M (2 bits)
  localparam int unsigned TC_ANTR_LSB   = 6;  // antenna select, matrix R (2 bits)

  // PROM init entry, first word: bits 15..12 control, 11..0 target address.
  localparam int unsigned PROM_EOFINIT_BIT = 12;  // end of initialization
  localparam int unsigned PROM_MEMREGN_BIT = 13;  // 0 register, 1 1553 SRAM
  localparam int unsigned PROM_RDWRN_BIT   = 14;  // 0 write, 1 read
  localparam int unsigned PROM_NOP_BIT     = 15;  // no operation

  // 2-bit access codes on the 1553 side, bit 1 = select, bit 0 = read.
  typedef enum logic [1:0] {
    ACC_IDLE  = 2'b01,  // disabled, read state (default)
    ACC_READ  = 2'b11,
    ACC_WRITE = 2'b10
  } acc_code_e;

  // Flag the master scheduler raises for its sub-schedulers (SubSeqFlag_s).
  typedef enum logic [1:0] {
    SUB_NONE    = 2'd0,
    DRDY_FLAG   = 2'd1,
    TC_FLAG     = 2'd2,
    REFRESH_FLAG = 2'd3
  } subseq_e;

  // Client request to the 1553 interface.
  typedef struct packed {
    logic  req;     // held until ack
    logic  we;      // 1 write, 0 read
    logic  mem;     // 1 1553 SRAM, 0 device register
    addr_t addr;
    word_t wdata;
  } ram_req_t;

  // Response from the 1553 interface.
  typedef struct packed {
    logic  ack;     // one cycle, access complete
    word_t rdata;   // valid with ack on reads
  } ram_rsp_t;

  localparam ram_req_t RAM_REQ_IDLE = '{req: 1'b0, we: 1'b0, mem: 1'b0,
                                        addr: '0, wdata: '0};

endpackage
