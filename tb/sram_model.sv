// sram_model: behavioural model of the two 256K x 16 asynchronous SRAM chips
// used side by side as one 32-bit word (shared address, CE, OE and WE). Reads are
// asynchronous while CE and OE are low; a write takes the data present when WE
// rises with CE low. Contents start random, as in a real part.
module sram_model
  import calc_pkg::*;
(
  input  addr_t sram_addr,
  input  logic  sram_ce_n,
  input  logic  sram_oe_n,
  input  logic  sram_we_n,
  input  word_t sram_dq_o,     // data driven by the FPGA
  input  logic  sram_dq_oe,
  output word_t sram_dq_i      // data seen by the FPGA
);
  word_t mem [2**ADDR_W];
  int unsigned writes = 0;

  assign sram_dq_i = (!sram_ce_n && !sram_oe_n && sram_we_n) ? mem[sram_addr] : 32'hDEAD_BEEF;

  always @(posedge sram_we_n) begin
    if (!sram_ce_n && sram_dq_oe) begin
      mem[sram_addr] <= sram_dq_o;
      writes <= writes + 1;
    end
  end
endmodule
