// calc_top: the extended-length integer calculator.
//
// Seven units, wired as in the design's block diagram:
//   keypad_interface   -> control_unit        key presses
//   control_unit       -> display_controller, convert_transfer_unit, alu
//   display_controller -> display_interface   -> LCD pins
//   display_controller, convert_transfer_unit, alu -> memory_interface -> SRAM pins
// The numbers never sit in the FPGA: all four registers (display BCD, operand A,
// operand B, answer) are in the external 256K x 32 SRAM, each REG_WORDS words
// long; REG_WORDS = 65536 gives the 524,272-digit limit. The SRAM data bus is
// brought out as separate output, output-enable and input signals; the
// tri-state pad belongs to the board-level wrapper. The memory clients are in
// fixed priority display controller, CTU, ALU; the control unit only ever runs
// one of them at a time.
//
// Clock: 50 MHz; reset: synchronous, active high. The LCD and keypad timing
// parameters are given in clock cycles and can be shortened for simulation.
module calc_top
  import calc_pkg::*;
#(
  parameter int unsigned REG_WORDS      = 65536,
  parameter int unsigned SCAN_CYCLES    = 50000,
  parameter int unsigned DEBOUNCE_SCANS = 4,
  parameter int unsigned E_CYCLES       = 16,
  parameter int unsigned CMD_WAIT       = 2500,
  parameter int unsigned CLEAR_WAIT     = 100000,
  parameter int unsigned POWERUP_WAIT   = 1000000
) (
  input  logic       clk,
  input  logic       rst,
  // keypad
  output logic [4:0] kp_col,
  input  logic [4:0] kp_row,
  // LCD
  output logic [7:0] lcd_db,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  // SRAM (two 16-bit chips as one 32-bit word)
  output addr_t      sram_addr,
  output logic       sram_ce_n,
  output logic       sram_oe_n,
  output logic       sram_we_n,
  output word_t      sram_dq_o,
  output logic       sram_dq_oe,
  input  word_t      sram_dq_i,
  // status
  output logic       busy
);

  localparam int unsigned CHARS = 20;

  logic       key_valid;
  logic [4:0] key_code;

  logic       dc_valid, dc_ready, dc_done;
  dc_cmd_t    dc_cmd;
  logic [3:0] dc_digit;
  logic [7:0] op_char;

  logic       ctu_start, ctu_busy, ctu_done, ctu_error;
  ctu_op_t    ctu_op;
  regsel_t    ctu_src, ctu_dst;

  logic       alu_start, alu_busy, alu_done, alu_error;
  alu_op_t    alu_op;

  logic                     lcd_valid, lcd_ready;
  logic [$clog2(CHARS)-1:0] lcd_pos;
  logic [7:0]               lcd_char;

  mem_req_t cl_req [3];
  mem_rsp_t cl_rsp [3];

  keypad_interface #(
    .ROWS(5), .COLS(5), .SCAN_CYCLES(SCAN_CYCLES), .DEBOUNCE_SCANS(DEBOUNCE_SCANS)
  ) u_keypad (
    .clk, .rst, .kp_col, .kp_row, .key_valid, .key_code
  );

  control_unit u_control (
    .clk, .rst, .key_valid, .key_code,
    .dc_valid, .dc_ready, .dc_cmd, .dc_digit, .op_char, .dc_done,
    .ctu_start, .ctu_op, .ctu_src, .ctu_dst, .ctu_done, .ctu_error,
    .alu_start, .alu_op, .alu_done, .alu_error,
    .busy
  );

  display_controller #(
    .REG_WORDS(REG_WORDS), .DIGITS_SHOWN(18), .CHARS(CHARS)
  ) u_dispctl (
    .clk, .rst,
    .cmd_valid(dc_valid), .cmd_ready(dc_ready), .cmd(dc_cmd), .cmd_digit(dc_digit),
    .op_char, .done(dc_done),
    .mreq(cl_req[0]), .mrsp(cl_rsp[0]),
    .lcd_valid, .lcd_ready, .lcd_pos, .lcd_char
  );

  display_interface #(
    .CHARS(CHARS), .E_CYCLES(E_CYCLES), .CMD_WAIT(CMD_WAIT),
    .CLEAR_WAIT(CLEAR_WAIT), .POWERUP_WAIT(POWERUP_WAIT)
  ) u_dispif (
    .clk, .rst,
    .req_valid(lcd_valid), .req_ready(lcd_ready), .req_pos(lcd_pos), .req_char(lcd_char),
    .lcd_db, .lcd_rs, .lcd_rw, .lcd_e
  );

  convert_transfer_unit #(.REG_WORDS(REG_WORDS)) u_ctu (
    .clk, .rst, .start(ctu_start), .op(ctu_op), .src(ctu_src), .dst(ctu_dst),
    .busy(ctu_busy), .done(ctu_done), .error(ctu_error),
    .mreq(cl_req[1]), .mrsp(cl_rsp[1])
  );

  alu #(.REG_WORDS(REG_WORDS)) u_alu (
    .clk, .rst, .start(alu_start), .op(alu_op),
    .busy(alu_busy), .done(alu_done), .error(alu_error),
    .mreq(cl_req[2]), .mrsp(cl_rsp[2])
  );

  memory_interface #(.NCLIENT(3)) u_mem (
    .clk, .rst, .cl_req, .cl_rsp,
    .sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i
  );

  // The control unit starts one unit at a time and waits for it.
  a_one_unit: assert property (@(posedge clk) disable iff (rst) !(ctu_busy && alu_busy));

endmodule
