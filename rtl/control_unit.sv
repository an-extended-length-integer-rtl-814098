// control_unit: turns key presses into work for the other units.
//
// The control unit owns no memory port; it sequences the display controller
// (DC), the convert/transfer unit (CTU) and the ALU, one at a time, the way a
// desktop calculator behaves:
//   digit       append to the display; the first digit after an operation key or
//               a result first clears the display
//   BACK, NEG   delete the last digit / change the sign of the displayed number
//   SHL, SHR    move the 18-digit window
//   C           clear the displayed number;  CE  also forget the pending operation
//   + - *       convert the display to register 1 (skipped when register 1 already
//               holds the displayed result), remember the operation; pressed
//               again right after another operation key it replaces it; pressed
//               after a second number it first evaluates the pending one (chaining)
//   =           convert the display to register 2, run the ALU (register 3 =
//               register 1 op register 2), copy register 3 to register 1 so the
//               result can be the next first operand without a conversion, convert
//               register 3 to the display, redraw
// An ALU or CTU error (a result too long for a register) clears the display and
// shows "E" in the operation position. Division and modulo keys are ignored: this
// hardware has no divider. Key presses that arrive while a command runs are
// dropped. The key assignments and the chaining rules are this design's own.
//
// Each sub-unit is started with a one-cycle start (DC: valid while ready) and
// the control unit waits for its done pulse. Register 3 is the only source this
// sequencing ever gives the CTU (copy and binary-to-BCD), so ctu_src is constant;
// the port stays so that the CTU keeps its general register-to-register form.
module control_unit
  import calc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // keypad interface
  input  logic       key_valid,
  input  logic [4:0] key_code,
  // display controller
  output logic       dc_valid,
  input  logic       dc_ready,
  output dc_cmd_t    dc_cmd,
  output logic [3:0] dc_digit,
  output logic [7:0] op_char,
  input  logic       dc_done,
  // convert/transfer unit
  output logic       ctu_start,
  output ctu_op_t    ctu_op,
  output regsel_t    ctu_src,
  output regsel_t    ctu_dst,
  input  logic       ctu_done,
  input  logic       ctu_error,
  // ALU
  output logic       alu_start,
  output alu_op_t    alu_op,
  input  logic       alu_done,
  input  logic       alu_error,
  // status
  output logic       busy
);

  typedef enum logic [4:0] {
    S_INIT, S_IDLE,
    S_DC_ISSUE, S_DC_WAIT, S_CTU_WAIT, S_ALU_WAIT,
    S_DIGIT, S_OP_CONV, S_OP_SET,
    S_EV_B, S_EV_ALU, S_EV_COPY, S_EV_BCD, S_EV_END, S_ERROR
  } state_t;

  state_t     state, ret;
  logic       pending;        // an operation waits for its second operand
  alu_op_t    pend_op;
  logic       then_valid;     // operation key that triggered a chained evaluation
  alu_op_t    then_op;
  logic       new_entry;      // next digit starts a new number
  logic       ans_in_a;       // register 1 holds the number on the display
  logic [3:0] digit_q;

  function automatic logic [7:0] op_symbol(alu_op_t o);
    unique case (o)
      ALU_ADD: return "+";
      ALU_SUB: return "-";
      default: return "*";
    endcase
  endfunction

  function automatic alu_op_t key_op(logic [4:0] k);
    if (k == KEY_PLUS)       return ALU_ADD;
    else if (k == KEY_MINUS) return ALU_SUB;
    else                     return ALU_MUL;
  endfunction

  wire is_op_key = (key_code == KEY_PLUS) || (key_code == KEY_MINUS) || (key_code == KEY_MUL);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      ret        <= S_IDLE;
      pending    <= 1'b0;
      pend_op    <= ALU_ADD;
      then_valid <= 1'b0;
      then_op    <= ALU_ADD;
      new_entry  <= 1'b0;
      ans_in_a   <= 1'b0;
      digit_q    <= '0;
      op_char    <= " ";
      dc_valid   <= 1'b0;
      dc_cmd     <= DC_CLEAR;
      dc_digit   <= '0;
      ctu_start  <= 1'b0;
      ctu_op     <= CTU_COPY;
      ctu_src    <= REG_ANS;
      ctu_dst    <= REG_A;
      alu_start  <= 1'b0;
      alu_op     <= ALU_ADD;
    end else begin
      ctu_start <= 1'b0;
      alu_start <= 1'b0;
      unique case (state)
        // clear register 0 and draw the display once after reset
        S_INIT: begin
          dc_cmd <= DC_CLEAR;
          ret    <= S_IDLE;
          state  <= S_DC_ISSUE;
        end
        S_IDLE: if (key_valid) begin
          if (key_code < 5'd10) begin
            digit_q  <= key_code[3:0];
            ans_in_a <= 1'b0;
            if (!pending) op_char <= " ";   // an error mark goes with new input
            if (new_entry) begin
              new_entry <= 1'b0;
              dc_cmd    <= DC_CLEAR;
              ret       <= S_DIGIT;
              state     <= S_DC_ISSUE;
            end else begin
              state <= S_DIGIT;
            end
          end else if (is_op_key) begin
            if (pending && !new_entry) begin
              then_valid <= 1'b1;
              then_op    <= key_op(key_code);
              state      <= S_EV_B;
            end else if (pending) begin
              pend_op <= key_op(key_code);
              op_char <= op_symbol(key_op(key_code));
              dc_cmd  <= DC_REFRESH;
              ret     <= S_IDLE;
              state   <= S_DC_ISSUE;
            end else begin
              pend_op <= key_op(key_code);
              state   <= ans_in_a ? S_OP_SET : S_OP_CONV;
            end
          end else if (key_code == KEY_EQ) begin
            if (pending) begin
              then_valid <= 1'b0;
              state      <= S_EV_B;
            end
          end else if (key_code == KEY_BACK || key_code == KEY_NEG) begin
            ans_in_a  <= 1'b0;
            new_entry <= 1'b0;
            dc_cmd    <= (key_code == KEY_BACK) ? DC_BACK : DC_NEG;
            ret       <= S_IDLE;
            state     <= S_DC_ISSUE;
          end else if (key_code == KEY_SHL || key_code == KEY_SHR) begin
            dc_cmd <= (key_code == KEY_SHL) ? DC_SHL : DC_SHR;
            ret    <= S_IDLE;
            state  <= S_DC_ISSUE;
          end else if (key_code == KEY_C || key_code == KEY_CE) begin
            ans_in_a  <= 1'b0;
            new_entry <= 1'b0;
            if (key_code == KEY_CE) begin
              pending <= 1'b0;
              op_char <= " ";
            end
            dc_cmd <= DC_CLEAR;
            ret    <= S_IDLE;
            state  <= S_DC_ISSUE;
          end
          // KEY_DIV, KEY_MOD and unassigned keys: nothing
        end

        // ---- calls ----
        S_DC_ISSUE: begin
          if (dc_valid && dc_ready) begin
            dc_valid <= 1'b0;
            state    <= S_DC_WAIT;
          end else begin
            dc_valid <= 1'b1;
          end
        end
        S_DC_WAIT:  if (dc_done) state <= ret;
        S_CTU_WAIT: if (ctu_done) state <= ctu_error ? S_ERROR : ret;
        S_ALU_WAIT: if (alu_done) state <= alu_error ? S_ERROR : ret;

        S_DIGIT: begin
          dc_cmd   <= DC_APPEND;
          dc_digit <= digit_q;
          ret      <= S_IDLE;
          state    <= S_DC_ISSUE;
        end

        // ---- operation key: first operand ----
        S_OP_CONV: begin
          ctu_start <= 1'b1;
          ctu_op    <= CTU_BCD2BIN;
          ctu_dst   <= REG_A;
          ret       <= S_OP_SET;
          state     <= S_CTU_WAIT;
        end
        S_OP_SET: begin
          pending   <= 1'b1;
          new_entry <= 1'b1;
          op_char   <= op_symbol(pend_op);
          dc_cmd    <= DC_REFRESH;
          ret       <= S_IDLE;
          state     <= S_DC_ISSUE;
        end

        // ---- evaluation ----
        S_EV_B: begin
          ctu_start <= 1'b1;
          ctu_op    <= CTU_BCD2BIN;
          ctu_dst   <= REG_B;
          ret       <= S_EV_ALU;
          state     <= S_CTU_WAIT;
        end
        S_EV_ALU: begin
          alu_start <= 1'b1;
          alu_op    <= pend_op;
          ret       <= S_EV_COPY;
          state     <= S_ALU_WAIT;
        end
        S_EV_COPY: begin
          ctu_start <= 1'b1;
          ctu_op    <= CTU_COPY;
          ctu_src   <= REG_ANS;
          ctu_dst   <= REG_A;
          ret       <= S_EV_BCD;
          state     <= S_CTU_WAIT;
        end
        S_EV_BCD: begin
          ctu_start <= 1'b1;
          ctu_op    <= CTU_BIN2BCD;
          ctu_src   <= REG_ANS;
          ret       <= S_EV_END;
          state     <= S_CTU_WAIT;
        end
        S_EV_END: begin
          ans_in_a  <= 1'b1;
          new_entry <= 1'b1;
          pending   <= then_valid;
          pend_op   <= then_op;
          op_char   <= then_valid ? op_symbol(then_op) : " ";
          dc_cmd    <= DC_REFRESH;
          ret       <= S_IDLE;
          state     <= S_DC_ISSUE;
        end
        S_ERROR: begin
          pending   <= 1'b0;
          ans_in_a  <= 1'b0;
          new_entry <= 1'b1;
          op_char   <= "E";
          dc_cmd    <= DC_CLEAR;
          ret       <= S_IDLE;
          state     <= S_DC_ISSUE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
