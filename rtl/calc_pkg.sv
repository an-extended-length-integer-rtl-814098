// calc_pkg: types and constants shared by the extended-length integer calculator.
//
// The calculator keeps its numbers in an external 256K x 32 bit SRAM (two 16-bit
// chips side by side), split into four equal registers of 64K words:
//   register 0  BCD digits of the number on the display
//   register 1  binary operand A
//   register 2  binary operand B
//   register 3  binary answer
// The split into four registers, their roles and the 32-bit word follow the design
// description. The layout inside a register is this design's own choice:
//   word 0  length (BCD register: digits; binary registers: 32-bit words)
//   word 1  sign, bit 0 (1 = negative); zero is always stored as positive
//   word 2+ the magnitude, least significant word first; in the BCD register
//           digit i (weight 10^i) sits in word 2 + i/8, nibble i%8
// With two header words a register holds 65534 data words, which is exactly the
// 524,272-digit limit (65534 * 8) of the specification.
//
// Every unit that touches memory does so through a request/acknowledge port:
// it raises req with we/addr/wdata and holds them until ack is high for one
// cycle; on a read, rdata is valid in that ack cycle.
package calc_pkg;

  localparam int unsigned WORD_W  = 32;
  localparam int unsigned ADDR_W  = 18;   // 256K words
  localparam int unsigned OFS_W   = 16;   // word offset inside a register

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [OFS_W-1:0]  ofs_t;
  typedef logic [1:0]        regsel_t;

  localparam regsel_t REG_BCD = 2'd0;
  localparam regsel_t REG_A   = 2'd1;
  localparam regsel_t REG_B   = 2'd2;
  localparam regsel_t REG_ANS = 2'd3;

  localparam ofs_t HDR_LEN   = 16'd0;
  localparam ofs_t HDR_SIGN  = 16'd1;
  localparam ofs_t DATA_BASE = 16'd2;

  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  typedef struct packed {
    logic  ack;
    word_t rdata;
  } mem_rsp_t;

  localparam mem_req_t MEM_IDLE = '{req: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  function automatic addr_t reg_addr(regsel_t r, ofs_t o);
    return {r, o};
  endfunction

  // Commands of the display controller.
  typedef enum logic [2:0] {
    DC_APPEND  = 3'd0,   // append digit arg as the new least significant digit
    DC_BACK    = 3'd1,   // delete the least significant digit
    DC_CLEAR   = 3'd2,   // number becomes 0, window back to the right end
    DC_NEG     = 3'd3,   // change the sign
    DC_SHL     = 3'd4,   // move the number left (show less significant digits)
    DC_SHR     = 3'd5,   // move the number right (show more significant digits)
    DC_REFRESH = 3'd6    // redraw only
  } dc_cmd_t;

  // Operations of the convert/transfer unit.
  typedef enum logic [1:0] {
    CTU_BCD2BIN = 2'd0,  // register 0 -> binary register dst
    CTU_BIN2BCD = 2'd1,  // binary register src -> register 0 (src is consumed)
    CTU_COPY    = 2'd2   // binary register src -> binary register dst
  } ctu_op_t;

  // Operations of the ALU: register 3 = register 1 op register 2.
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_MUL = 2'd2
  } alu_op_t;

  // Key codes reported by the keypad interface: row * 5 + column.
  // What each key does is this design's own assignment.
  localparam logic [4:0] KEY_PLUS  = 5'd10;
  localparam logic [4:0] KEY_MINUS = 5'd11;
  localparam logic [4:0] KEY_MUL   = 5'd12;
  localparam logic [4:0] KEY_DIV   = 5'd13;  // no divider in hardware: ignored
  localparam logic [4:0] KEY_MOD   = 5'd14;  // no divider in hardware: ignored
  localparam logic [4:0] KEY_EQ    = 5'd15;
  localparam logic [4:0] KEY_NEG   = 5'd16;
  localparam logic [4:0] KEY_BACK  = 5'd17;
  localparam logic [4:0] KEY_C     = 5'd18;
  localparam logic [4:0] KEY_CE    = 5'd19;
  localparam logic [4:0] KEY_SHL   = 5'd20;
  localparam logic [4:0] KEY_SHR   = 5'd21;

endpackage
