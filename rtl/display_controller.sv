// display_controller: keeps the BCD register (register 0) and the LCD in step.
//
// Every command that changes or moves the number on the display comes here, as
// the design description assigns it: append a digit, delete the last digit (BACK),
// clear, change the sign, shift the 18-digit window left or right, or only
// redraw. The number itself lives in memory (see calc_pkg for the layout), so each
// command first reads the register's length and sign words, then works on the
// digit words, writes the header back and redraws the whole LCD line.
//
// Appending a digit shifts the digit string up by one nibble, word by word from
// the least significant word (a digit enters at the bottom, the top nibble of
// each word carries into the next). BACK shifts it down by one nibble, from the
// top word. Both cost one read and one write per word of the number. Leading
// zeros are not entered; more than (REG_WORDS-2)*8 digits are refused.
//
// The LCD line has CHARS = 20 positions: position 0 shows op_char (given by the
// control unit: the pending operation, or an error mark), position 1 the sign,
// positions 2..19 18 digits. The rightmost position shows digit number `offset`
// (0 = units); SHL lowers and SHR raises offset, within the number. CLEAR and
// REFRESH put the window back at the units digit. The character layout and the
// meaning of the two shift directions are this design's choices.
//
// Handshake: a command is taken when cmd_valid is high while cmd_ready is high;
// done pulses for one cycle when the LCD requests for it have all been issued.
module display_controller
  import calc_pkg::*;
#(
  parameter int unsigned REG_WORDS    = 65536,
  parameter int unsigned DIGITS_SHOWN = 18,
  parameter int unsigned CHARS        = 20
) (
  input  logic                     clk,
  input  logic                     rst,
  // from the control unit
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  dc_cmd_t                  cmd,
  input  logic [3:0]               cmd_digit,
  input  logic [7:0]               op_char,
  output logic                     done,
  // memory port
  output mem_req_t                 mreq,
  input  mem_rsp_t                 mrsp,
  // to the display interface
  output logic                     lcd_valid,
  input  logic                     lcd_ready,
  output logic [$clog2(CHARS)-1:0] lcd_pos,
  output logic [7:0]               lcd_char
);

  localparam int unsigned POS_W = $clog2(CHARS);
  localparam word_t MAX_DIGITS  = word_t'((REG_WORDS - 2) * 8);

  typedef enum logic [4:0] {
    S_IDLE, S_MEM, S_RD_LEN, S_RD_SIGN, S_DISPATCH,
    S_APP_RD, S_APP_WR, S_BACK_RD, S_BACK_WR,
    S_WR_LEN, S_WR_SIGN, S_DRAW, S_DRAW_RD, S_DRAW_SEND, S_DONE
  } state_t;

  state_t           state, ret;
  dc_cmd_t          cmd_q;
  logic [3:0]       digit_q;
  word_t            rd_q;
  word_t            len;
  logic             sign;
  word_t            offset;
  word_t            widx;       // word index being worked on
  word_t            nwords;
  logic [3:0]       carry;
  logic [POS_W-1:0] pos;
  logic [7:0]       ch;

  assign cmd_ready = (state == S_IDLE);

  // Digit shown at LCD position p (p >= 2).
  word_t didx;
  assign didx = offset + word_t'(CHARS - 1) - word_t'(pos);

  function automatic ofs_t data_ofs(word_t w);
    return ofs_t'(w) + DATA_BASE;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      ret       <= S_IDLE;
      cmd_q     <= DC_REFRESH;
      digit_q   <= '0;
      rd_q      <= '0;
      len       <= '0;
      sign      <= 1'b0;
      offset    <= '0;
      widx      <= '0;
      nwords    <= '0;
      carry     <= '0;
      pos       <= '0;
      ch        <= '0;
      mreq      <= MEM_IDLE;
      done      <= 1'b0;
      lcd_valid <= 1'b0;
      lcd_pos   <= '0;
      lcd_char  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          digit_q <= cmd_digit;
          mreq    <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_BCD, HDR_LEN), wdata: '0};
          ret     <= S_RD_LEN;
          state   <= S_MEM;
        end
        S_MEM: if (mrsp.ack) begin
          mreq.req <= 1'b0;
          rd_q     <= mrsp.rdata;
          state    <= ret;
        end
        S_RD_LEN: begin
          len   <= (rd_q > MAX_DIGITS) ? '0 : rd_q;   // guard against an unset register
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_BCD, HDR_SIGN), wdata: '0};
          ret   <= S_RD_SIGN;
          state <= S_MEM;
        end
        S_RD_SIGN: begin
          sign  <= rd_q[0] && (len != '0);
          state <= S_DISPATCH;
        end
        S_DISPATCH: begin
          state <= S_WR_LEN;
          unique case (cmd_q)
            DC_APPEND: if (len < MAX_DIGITS && !(len == '0 && digit_q == 4'd0)) begin
              carry  <= digit_q;
              widx   <= '0;
              nwords <= (len >> 3) + 1'b1;
              state  <= S_APP_RD;
            end
            DC_BACK: if (len != '0) begin
              carry  <= '0;
              widx   <= ((len + 32'd7) >> 3) - 1'b1;
              state  <= S_BACK_RD;
            end
            DC_CLEAR: begin
              len    <= '0;
              sign   <= 1'b0;
              offset <= '0;
            end
            DC_NEG:  if (len != '0) sign <= !sign;
            DC_SHL:  if (offset != '0) offset <= offset - 1'b1;
            DC_SHR:  if (offset + word_t'(DIGITS_SHOWN) < len) offset <= offset + 1'b1;
            default: offset <= '0;   // DC_REFRESH
          endcase
        end
        // append: word widx gets the carry nibble at the bottom
        S_APP_RD: begin
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_BCD, data_ofs(widx)), wdata: '0};
          ret   <= S_APP_WR;
          state <= S_MEM;
        end
        S_APP_WR: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_BCD, data_ofs(widx)),
                     wdata: {rd_q[27:0], carry}};
          carry <= rd_q[31:28];
          widx  <= widx + 1'b1;
          if (widx + 1'b1 == nwords) begin
            len <= len + 1'b1;
            ret <= S_WR_LEN;
          end else begin
            ret <= S_APP_RD;
          end
          state <= S_MEM;
        end
        // back: word widx gets the carry nibble at the top
        S_BACK_RD: begin
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_BCD, data_ofs(widx)), wdata: '0};
          ret   <= S_BACK_WR;
          state <= S_MEM;
        end
        S_BACK_WR: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_BCD, data_ofs(widx)),
                     wdata: {carry, rd_q[31:4]}};
          carry <= rd_q[3:0];
          widx  <= widx - 1'b1;
          if (widx == '0) begin
            len <= len - 1'b1;
            if (len == 32'd1) sign <= 1'b0;
            if (offset != '0 && offset + word_t'(DIGITS_SHOWN) >= len) offset <= offset - 1'b1;
            ret <= S_WR_LEN;
          end else begin
            ret <= S_BACK_RD;
          end
          state <= S_MEM;
        end
        S_WR_LEN: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_BCD, HDR_LEN), wdata: len};
          ret   <= S_WR_SIGN;
          state <= S_MEM;
        end
        S_WR_SIGN: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_BCD, HDR_SIGN), wdata: word_t'(sign)};
          ret   <= S_DRAW;
          pos   <= '0;
          state <= S_MEM;
        end
        // redraw: one character per position, left to right
        S_DRAW: begin
          if (pos == POS_W'(0)) begin
            ch    <= op_char;
            state <= S_DRAW_SEND;
          end else if (pos == POS_W'(1)) begin
            ch    <= sign ? "-" : " ";
            state <= S_DRAW_SEND;
          end else if (len == '0) begin
            ch    <= (pos == POS_W'(CHARS - 1)) ? "0" : " ";
            state <= S_DRAW_SEND;
          end else if (didx < len) begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_BCD, data_ofs(didx >> 3)), wdata: '0};
            ret   <= S_DRAW_RD;
            state <= S_MEM;
          end else begin
            ch    <= " ";
            state <= S_DRAW_SEND;
          end
        end
        S_DRAW_RD: begin
          ch    <= 8'h30 | 8'(4'(rd_q >> {didx[2:0], 2'b00}));
          state <= S_DRAW_SEND;
        end
        S_DRAW_SEND: begin
          if (!lcd_valid) begin
            lcd_valid <= 1'b1;
            lcd_pos   <= pos;
            lcd_char  <= ch;
          end else if (lcd_ready) begin
            lcd_valid <= 1'b0;
            if (pos == POS_W'(CHARS - 1)) begin
              state <= S_DONE;
            end else begin
              pos   <= pos + 1'b1;
              state <= S_DRAW;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
