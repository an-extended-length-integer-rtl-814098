// convert_transfer_unit (CTU): converts the BCD display register to and from a
// binary register, and copies binary registers.
//
// Operations (calc_pkg::ctu_op_t), all register-to-register through memory:
//   CTU_BCD2BIN  register 0 -> register dst. The BCD words are taken from the most
//                significant down; each holds 8 digits, which are turned into a
//                value v < 10^8 at once, and the binary number B is updated as
//                B = B * 10^8 + v in one pass over its words with a 64-bit
//                multiply-accumulate register (acc = word * 10^8 + carry; the low
//                half is written back, the high half is the next carry). This is
//                the design description's 64-bit internal register working on
//                staggered groups of digits; the grouping by 8 is this design's.
//   CTU_BIN2BCD  register src -> register 0, consuming src. Each pass divides the
//                binary number by 10^8 in place, from its top word down, with a
//                bit-serial long division whose remainder never exceeds 28 bits;
//                the final remainder becomes the next 8 BCD digits (least
//                significant first). The number shrinks by at most one word per
//                pass. More digits than register 0 holds raise error.
//   CTU_COPY     register src -> register dst, header included.
// Costs, with one memory access taking 4 clocks here: BCD2BIN about 10*n clocks per
// BCD word for an n-word number; BIN2BCD about 42*n clocks per 8 digits; COPY
// about 8*n clocks.
//
// Handshake: start is taken while busy is low; done pulses for one cycle at the
// end, with error valid in the same cycle.
module convert_transfer_unit
  import calc_pkg::*;
#(
  parameter int unsigned REG_WORDS = 65536
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  ctu_op_t  op,
  input  regsel_t  src,
  input  regsel_t  dst,
  output logic     busy,
  output logic     done,
  output logic     error,
  output mem_req_t mreq,
  input  mem_rsp_t mrsp
);

  localparam word_t CAP        = word_t'(REG_WORDS - 2);
  localparam word_t MAX_DIGITS = word_t'((REG_WORDS - 2) * 8);
  localparam logic [27:0] TEN8 = 28'd100_000_000;

  typedef enum logic [4:0] {
    S_IDLE, S_MEM, S_HDR_LEN, S_HDR_SIGN,
    // BCD -> binary
    S_B2_NEXT, S_B2_GROUP, S_B2_RD, S_B2_WR, S_B2_APPEND,
    // binary -> BCD
    S_D_PASS, S_D_RD, S_D_DIV, S_D_WR, S_D_DIGITS,
    // copy
    S_C_RD, S_C_WR,
    // headers
    S_WR_LEN, S_WR_SIGN, S_FINISH
  } state_t;

  state_t     state, ret;
  ctu_op_t    op_q;
  regsel_t    src_q, dst_q;
  word_t      rd_q;
  word_t      hlen;        // length read from the source header
  logic       hsign;
  word_t      nw;          // binary words in use
  word_t      k;           // BCD word index
  word_t      i;           // binary word index
  logic [31:0] carry;      // BCD2BIN: high half of the accumulator
  logic [27:0] rem;        // BIN2BCD: running remainder, < 2 * 10^8
  logic [31:0] quo;
  logic [5:0]  bitc;
  logic        drop_top;
  logic [31:0] last_bcd;
  word_t       out_len;    // header to write
  regsel_t     out_reg;
  logic        err_q;

  assign busy = (state != S_IDLE);

  // Eight BCD digits (nibble 7 most significant) to binary.
  function automatic logic [26:0] bcd8_to_bin(logic [31:0] b);
    logic [26:0] v;
    v = '0;
    for (int d = 7; d >= 0; d--) v = v * 27'd10 + 27'(b[d*4 +: 4]);
    return v;
  endfunction

  // A value below 10^8 to eight BCD digits (shift-and-add-3).
  function automatic logic [31:0] bin_to_bcd8(logic [26:0] v);
    logic [31:0] b;
    b = '0;
    for (int s = 26; s >= 0; s--) begin
      for (int d = 0; d < 8; d++)
        if (b[d*4 +: 4] >= 4'd5) b[d*4 +: 4] = b[d*4 +: 4] + 4'd3;
      b = {b[30:0], v[s]};
    end
    return b;
  endfunction

  // Number of significant digits of a BCD word (0 for zero).
  function automatic word_t bcd_digits(logic [31:0] b);
    word_t n;
    n = '0;
    for (int d = 0; d < 8; d++) if (b[d*4 +: 4] != 4'd0) n = word_t'(d + 1);
    return n;
  endfunction

  // BCD2BIN: the group in rd_q with digits at and above hlen removed.
  word_t       grp_digits;
  logic [31:0] grp_mask;
  assign grp_digits = hlen - (k << 3);
  assign grp_mask   = (grp_digits >= 32'd8) ? 32'hFFFF_FFFF : ((32'd1 << {grp_digits[2:0], 2'b00}) - 1'b1);

  logic [63:0] acc;
  assign acc = 64'(rd_q) * 64'(TEN8) + 64'(carry);

  // BIN2BCD: one step of the long division.
  logic [28:0] rem_sh;
  assign rem_sh = {rem, quo[31]};

  function automatic ofs_t data_ofs(word_t w);
    return ofs_t'(w) + DATA_BASE;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ret      <= S_IDLE;
      op_q     <= CTU_COPY;
      src_q    <= '0;
      dst_q    <= '0;
      rd_q     <= '0;
      hlen     <= '0;
      hsign    <= 1'b0;
      nw       <= '0;
      k        <= '0;
      i        <= '0;
      carry    <= '0;
      rem      <= '0;
      quo      <= '0;
      bitc     <= '0;
      drop_top <= 1'b0;
      last_bcd <= '0;
      out_len  <= '0;
      out_reg  <= '0;
      err_q    <= 1'b0;
      mreq     <= MEM_IDLE;
      done     <= 1'b0;
      error    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          src_q <= (op == CTU_BCD2BIN) ? REG_BCD : src;
          dst_q <= (op == CTU_BIN2BCD) ? REG_BCD : dst;
          err_q <= 1'b0;
          mreq  <= '{req: 1'b1, we: 1'b0,
                     addr: reg_addr((op == CTU_BCD2BIN) ? REG_BCD : src, HDR_LEN), wdata: '0};
          ret   <= S_HDR_LEN;
          state <= S_MEM;
        end
        S_MEM: if (mrsp.ack) begin
          mreq.req <= 1'b0;
          rd_q     <= mrsp.rdata;
          state    <= ret;
        end
        S_HDR_LEN: begin
          // an unset or corrupt length reads as zero
          if (op_q == CTU_BCD2BIN) hlen <= (rd_q > MAX_DIGITS) ? '0 : rd_q;
          else                     hlen <= (rd_q > CAP) ? '0 : rd_q;
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(src_q, HDR_SIGN), wdata: '0};
          ret   <= S_HDR_SIGN;
          state <= S_MEM;
        end
        S_HDR_SIGN: begin
          hsign <= rd_q[0];
          unique case (op_q)
            CTU_BCD2BIN: begin
              nw    <= '0;
              k     <= (hlen + 32'd7) >> 3;   // one above the top BCD word
              state <= S_B2_NEXT;
            end
            CTU_BIN2BCD: begin
              nw    <= hlen;
              k     <= '0;
              state <= S_D_PASS;
            end
            default: begin
              i     <= '0;
              state <= S_C_RD;
            end
          endcase
        end

        // ---------------- BCD -> binary ----------------
        S_B2_NEXT: begin
          if (k == '0) begin
            out_len <= nw;
            out_reg <= dst_q;
            state   <= S_WR_LEN;
          end else begin
            k     <= k - 1'b1;
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_BCD, data_ofs(k - 1'b1)), wdata: '0};
            ret   <= S_B2_GROUP;
            state <= S_MEM;
          end
        end
        S_B2_GROUP: begin
          carry <= 32'(bcd8_to_bin(rd_q & grp_mask));
          i     <= '0;
          state <= S_B2_RD;
        end
        S_B2_RD: begin
          if (i == nw) begin
            state <= S_B2_APPEND;
          end else begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(dst_q, data_ofs(i)), wdata: '0};
            ret   <= S_B2_WR;
            state <= S_MEM;
          end
        end
        S_B2_WR: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(dst_q, data_ofs(i)), wdata: acc[31:0]};
          carry <= acc[63:32];
          i     <= i + 1'b1;
          ret   <= S_B2_RD;
          state <= S_MEM;
        end
        S_B2_APPEND: begin
          if (carry != '0) begin
            mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(dst_q, data_ofs(nw)), wdata: carry};
            nw    <= nw + 1'b1;
            ret   <= S_B2_NEXT;
            state <= S_MEM;
          end else begin
            state <= S_B2_NEXT;
          end
        end

        // ---------------- binary -> BCD ----------------
        S_D_PASS: begin
          if (nw == '0) begin
            out_len <= (k == '0) ? '0 : ((k - 1'b1) << 3) + bcd_digits(last_bcd);
            out_reg <= REG_BCD;
            state   <= S_WR_LEN;
          end else if (k == CAP) begin
            err_q   <= 1'b1;             // more digits than register 0 holds
            out_len <= '0;
            out_reg <= REG_BCD;
            state   <= S_WR_LEN;
          end else begin
            rem      <= '0;
            i        <= nw - 1'b1;
            drop_top <= 1'b0;
            state    <= S_D_RD;
          end
        end
        S_D_RD: begin
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(src_q, data_ofs(i)), wdata: '0};
          ret   <= S_D_DIV;
          bitc  <= 6'd32;
          state <= S_MEM;
        end
        S_D_DIV: begin
          // the word to divide arrives in rd_q; quo shifts it out and the
          // quotient bits in
          if (bitc == 6'd32) begin
            quo  <= rd_q;
            bitc <= bitc - 1'b1;
          end else begin
            if (rem_sh >= 29'(TEN8)) begin
              rem <= 28'(rem_sh - 29'(TEN8));
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= rem_sh[27:0];
              quo <= {quo[30:0], 1'b0};
            end
            if (bitc == 6'd0) state <= S_D_WR;
            else              bitc  <= bitc - 1'b1;
          end
        end
        S_D_WR: begin
          mreq <= '{req: 1'b1, we: 1'b1, addr: reg_addr(src_q, data_ofs(i)), wdata: quo};
          if (i == nw - 1'b1 && quo == '0) drop_top <= 1'b1;
          if (i == '0) ret <= S_D_DIGITS;
          else         ret <= S_D_RD;
          i     <= i - 1'b1;
          state <= S_MEM;
        end
        S_D_DIGITS: begin
          last_bcd <= bin_to_bcd8(rem[26:0]);
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_BCD, data_ofs(k)),
                     wdata: bin_to_bcd8(rem[26:0])};
          k     <= k + 1'b1;
          if (drop_top) nw <= nw - 1'b1;
          ret   <= S_D_PASS;
          state <= S_MEM;
        end

        // ---------------- copy ----------------
        S_C_RD: begin
          if (i == hlen) begin
            out_len <= hlen;
            out_reg <= dst_q;
            state   <= S_WR_LEN;
          end else begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(src_q, data_ofs(i)), wdata: '0};
            ret   <= S_C_WR;
            state <= S_MEM;
          end
        end
        S_C_WR: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(dst_q, data_ofs(i)), wdata: rd_q};
          i     <= i + 1'b1;
          ret   <= S_C_RD;
          state <= S_MEM;
        end

        // ---------------- result header ----------------
        S_WR_LEN: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(out_reg, HDR_LEN), wdata: out_len};
          ret   <= S_WR_SIGN;
          state <= S_MEM;
        end
        S_WR_SIGN: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(out_reg, HDR_SIGN),
                     wdata: word_t'(hsign && out_len != '0)};
          ret   <= S_FINISH;
          state <= S_MEM;
        end
        S_FINISH: begin
          done  <= 1'b1;
          error <= err_q;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
