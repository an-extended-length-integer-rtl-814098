// alu: extended-length integer arithmetic on the binary registers in memory:
// register 3 = register 1 op register 2, for op = add, subtract or multiply.
//
// Numbers are sign and magnitude, 32-bit words least significant first (layout in
// calc_pkg). Addition and subtraction reduce to one magnitude pass: equal
// effective signs add the magnitudes; otherwise the magnitudes are compared (by
// length, then word by word from the top) and the smaller is subtracted from the
// larger, the result taking the larger one's sign. A pass reads one word of each
// operand, writes one result word and keeps a one-bit carry or borrow; leading
// zero words of a difference are dropped, and zero is always positive.
//
// Multiplication is shift-and-add, as in the design description's own code: the
// words of register 2 are fetched one at a time into the multiplier data
// register and its bits examined from bit 0 up; for a 1 bit register 1 is added
// into register 3, and after every bit register 1 is shifted left by one bit.
// Register 3 starts at zero; the last multiplier word stops at its highest set
// bit. Register 1 is consumed (left shifted). A result that does not fit in a
// register (REG_WORDS-2 words) raises error and leaves register 3 at zero.
//
// Timing: one memory access is 4 clocks here, so an add or subtract costs about
// 12 clocks per word of the longer operand, and a multiply about
// (12*(nA+nR) + 8*nA) clocks per set bit of register 2.
//
// Handshake: start is taken while busy is low; done pulses for one cycle at the
// end, with error valid in the same cycle.
module alu
  import calc_pkg::*;
#(
  parameter int unsigned REG_WORDS = 65536
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  alu_op_t  op,
  output logic     busy,
  output logic     done,
  output logic     error,
  output mem_req_t mreq,
  input  mem_rsp_t mrsp
);

  localparam word_t CAP = word_t'(REG_WORDS - 2);

  typedef enum logic [5:0] {
    S_IDLE, S_MEM, S_H_ALEN, S_H_ASIGN, S_H_BLEN, S_H_BSIGN, S_DECIDE,
    S_CMP_RDA, S_CMP_RDB, S_CMP_TEST, S_SUB_SETUP,
    S_P_RDX, S_P_RDY, S_P_WR, S_P_END,
    S_M_WORD, S_M_LOAD, S_M_BIT, S_M_SHIFT, S_M_SH_RD, S_M_SH_WR, S_M_SH_END,
    S_WR_LEN, S_WR_SIGN, S_FINISH
  } state_t;

  state_t      state, ret, pass_ret;
  alu_op_t     op_q;
  word_t       rd_q;
  word_t       na, nb, nr;
  logic        sa, sb;
  logic        rsign;
  logic        err_q;
  // magnitude pass: dest = x +/- y
  regsel_t     xr, yr;
  word_t       nx, ny, np;
  logic        sub;
  logic        cy;          // carry or borrow
  word_t       xv;
  word_t       i;
  word_t       top;         // index of the highest nonzero result word, plus one
  logic        a_ge;        // compare result: |A| >= |B|
  // multiply
  word_t       j;
  word_t       md;          // multiplier data register (one word of register 2)
  logic [5:0]  bit_index;

  assign busy = (state != S_IDLE);

  function automatic ofs_t data_ofs(word_t w);
    return ofs_t'(w) + DATA_BASE;
  endfunction

  logic [32:0] sum;
  always_comb begin
    if (sub) sum = {1'b0, xv} - {1'b0, rd_q} - 33'(cy);
    else     sum = {1'b0, xv} + {1'b0, rd_q} + 33'(cy);
  end

  wire last_word     = (j + 1'b1 == nb);
  wire md_rest_zero  = ((md >> bit_index) == '0);          // no set bit from here up
  wire md_after_zero = ((md >> (bit_index + 1'b1)) == '0); // none above this one

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      ret       <= S_IDLE;
      pass_ret  <= S_IDLE;
      op_q      <= ALU_ADD;
      rd_q      <= '0;
      na        <= '0;
      nb        <= '0;
      nr        <= '0;
      sa        <= 1'b0;
      sb        <= 1'b0;
      rsign     <= 1'b0;
      err_q     <= 1'b0;
      xr        <= '0;
      yr        <= '0;
      nx        <= '0;
      ny        <= '0;
      np        <= '0;
      sub       <= 1'b0;
      cy        <= 1'b0;
      xv        <= '0;
      i         <= '0;
      top       <= '0;
      a_ge      <= 1'b0;
      j         <= '0;
      md        <= '0;
      bit_index <= '0;
      mreq      <= MEM_IDLE;
      done      <= 1'b0;
      error     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          err_q <= 1'b0;
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_A, HDR_LEN), wdata: '0};
          ret   <= S_H_ALEN;
          state <= S_MEM;
        end
        S_MEM: if (mrsp.ack) begin
          mreq.req <= 1'b0;
          rd_q     <= mrsp.rdata;
          state    <= ret;
        end
        S_H_ALEN: begin
          na    <= (rd_q > CAP) ? '0 : rd_q;
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_A, HDR_SIGN), wdata: '0};
          ret   <= S_H_ASIGN;
          state <= S_MEM;
        end
        S_H_ASIGN: begin
          sa    <= rd_q[0];
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_B, HDR_LEN), wdata: '0};
          ret   <= S_H_BLEN;
          state <= S_MEM;
        end
        S_H_BLEN: begin
          nb    <= (rd_q > CAP) ? '0 : rd_q;
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_B, HDR_SIGN), wdata: '0};
          ret   <= S_H_BSIGN;
          state <= S_MEM;
        end
        S_H_BSIGN: begin
          sb    <= rd_q[0] ^ (op_q == ALU_SUB);   // effective sign of B
          state <= S_DECIDE;
        end
        S_DECIDE: begin
          if (op_q == ALU_MUL) begin
            rsign <= sa ^ sb;
            nr    <= '0;
            j     <= '0;
            state <= (na == '0 || nb == '0) ? S_WR_LEN : S_M_WORD;
          end else if (sa == sb) begin
            xr <= REG_A; nx <= na; yr <= REG_B; ny <= nb;
            sub      <= 1'b0;
            rsign    <= sa;
            i        <= '0;
            cy       <= 1'b0;
            top      <= '0;
            np       <= (na > nb) ? na : nb;
            pass_ret <= S_WR_LEN;
            state    <= S_P_RDX;
          end else if (na != nb) begin
            a_ge  <= (na > nb);
            state <= S_SUB_SETUP;
          end else begin
            i     <= na;
            state <= S_CMP_RDA;
          end
        end

        // ---------------- compare equal-length magnitudes, top word first ----
        S_CMP_RDA: begin
          if (i == '0) begin
            a_ge  <= 1'b1;                  // equal magnitudes
            state <= S_SUB_SETUP;
          end else begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_A, data_ofs(i - 1'b1)), wdata: '0};
            ret   <= S_CMP_RDB;
            state <= S_MEM;
          end
        end
        S_CMP_RDB: begin
          xv    <= rd_q;
          mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_B, data_ofs(i - 1'b1)), wdata: '0};
          ret   <= S_CMP_TEST;
          state <= S_MEM;
        end
        S_CMP_TEST: begin
          if (xv != rd_q) begin
            a_ge  <= (xv > rd_q);
            state <= S_SUB_SETUP;
          end else begin
            i     <= i - 1'b1;
            state <= S_CMP_RDA;
          end
        end
        S_SUB_SETUP: begin
          if (a_ge) begin
            xr <= REG_A; nx <= na; yr <= REG_B; ny <= nb; rsign <= sa;
          end else begin
            xr <= REG_B; nx <= nb; yr <= REG_A; ny <= na; rsign <= sb;
          end
          sub      <= 1'b1;
          cy       <= 1'b0;
          top      <= '0;
          i        <= '0;
          np       <= (na > nb) ? na : nb;
          pass_ret <= S_WR_LEN;
          state    <= S_P_RDX;
        end

        // ---------------- magnitude pass: register 3 = x +/- y -------------
        S_P_RDX: begin
          if (i == np) begin
            state <= S_P_END;
          end else if (i < nx) begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(xr, data_ofs(i)), wdata: '0};
            ret   <= S_P_RDY;
            state <= S_MEM;
          end else begin
            rd_q  <= '0;
            state <= S_P_RDY;
          end
        end
        S_P_RDY: begin
          xv <= rd_q;
          if (i < ny) begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(yr, data_ofs(i)), wdata: '0};
            ret   <= S_P_WR;
            state <= S_MEM;
          end else begin
            rd_q  <= '0;
            state <= S_P_WR;
          end
        end
        S_P_WR: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_ANS, data_ofs(i)), wdata: sum[31:0]};
          cy    <= sum[32];
          if (sum[31:0] != '0) top <= i + 1'b1;
          i     <= i + 1'b1;
          ret   <= S_P_RDX;
          state <= S_MEM;
        end
        S_P_END: begin
          if (!sub && cy) begin
            if (np >= CAP) begin
              err_q <= 1'b1;
              nr    <= '0;
              state <= S_WR_LEN;
            end else begin
              mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_ANS, data_ofs(np)), wdata: 32'd1};
              nr    <= np + 1'b1;
              ret   <= pass_ret;
              state <= S_MEM;
            end
          end else begin
            nr    <= top;
            state <= pass_ret;
          end
        end

        // ---------------- multiply: shift and add ---------------------------
        S_M_WORD: begin
          if (j == nb) begin
            state <= S_WR_LEN;
          end else begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_B, data_ofs(j)), wdata: '0};
            ret   <= S_M_LOAD;
            state <= S_MEM;
          end
        end
        S_M_LOAD: begin
          md        <= rd_q;
          bit_index <= '0;
          state     <= S_M_BIT;
        end
        // decide whether or not to add register 1 to the answer
        S_M_BIT: begin
          if (bit_index > 6'd31 || (last_word && md_rest_zero)) begin
            j     <= j + 1'b1;              // next multiplier word
            state <= S_M_WORD;
          end else if (md[bit_index[4:0]]) begin
            xr <= REG_ANS; nx <= nr; yr <= REG_A; ny <= na;
            sub      <= 1'b0;
            cy       <= 1'b0;
            top      <= '0;
            i        <= '0;
            np       <= (nr > na) ? nr : na;
            pass_ret <= S_M_SHIFT;
            state    <= S_P_RDX;            // add, then shift
          end else begin
            state <= S_M_SHIFT;
          end
        end
        S_M_SHIFT: begin
          i  <= '0;
          cy <= 1'b0;
          if (err_q) begin
            state <= S_WR_LEN;
          end else if (last_word && md_after_zero) begin
            bit_index <= bit_index + 1'b1;  // no shift after the last set bit
            state     <= S_M_BIT;
          end else begin
            state <= S_M_SH_RD;
          end
        end
        // shift register 1 left by one bit
        S_M_SH_RD: begin
          if (i == na) begin
            state <= S_M_SH_END;
          end else begin
            mreq  <= '{req: 1'b1, we: 1'b0, addr: reg_addr(REG_A, data_ofs(i)), wdata: '0};
            ret   <= S_M_SH_WR;
            state <= S_MEM;
          end
        end
        S_M_SH_WR: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_A, data_ofs(i)), wdata: {rd_q[30:0], cy}};
          cy    <= rd_q[31];
          i     <= i + 1'b1;
          ret   <= S_M_SH_RD;
          state <= S_MEM;
        end
        S_M_SH_END: begin
          bit_index <= bit_index + 1'b1;
          if (cy) begin
            if (na >= CAP) begin
              err_q <= 1'b1;                // the product cannot fit either
              state <= S_WR_LEN;
            end else begin
              mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_A, data_ofs(na)), wdata: 32'd1};
              na    <= na + 1'b1;
              ret   <= S_M_BIT;
              state <= S_MEM;
            end
          end else begin
            state <= S_M_BIT;
          end
        end

        // ---------------- result header ------------------------------------
        S_WR_LEN: begin
          if (err_q) nr <= '0;
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_ANS, HDR_LEN), wdata: err_q ? '0 : nr};
          ret   <= S_WR_SIGN;
          state <= S_MEM;
        end
        S_WR_SIGN: begin
          mreq  <= '{req: 1'b1, we: 1'b1, addr: reg_addr(REG_ANS, HDR_SIGN),
                     wdata: word_t'(rsign && nr != '0)};
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
