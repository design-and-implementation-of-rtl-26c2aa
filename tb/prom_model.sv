// prom_model: behavioural model of the configuration PROM (not synthesizable
// as a part of the FPGA; the real part is an external PROM). Asynchronous
// read: `data` follows `addr` whenever `oe` is high, and reads 0 otherwise.
// Testbenches fill `mem` directly.
module prom_model
  import trrt_pkg::*;
(
  input  logic [PROM_AW-1:0] addr,
  input  logic               oe,
  output word_t              data
);
  word_t mem [2**PROM_AW];

  initial for (int i = 0; i < 2**PROM_AW; i++) mem[i] = '0;

  assign data = oe ? mem[addr] : '0;
endmodule
