// tb_control_unit: the control unit with stand-in display controller, CTU and
// ALU that only log what they are asked to do and answer after a few clocks
// (the ALU stand-in can be told to report an error). Key sequences are fed in and
// the log of sub-unit commands, and the operation character shown, are compared
// with the sequences the calculator's behaviour calls for: entry, operation
// keys, =, chaining, reuse of the result, operation replacement, C, CE, BACK,
// NEG, shifts, ignored division keys, an error, and a key pressed while busy.
module tb_control_unit;
  import calc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = !clk;

  logic       key_valid = 1'b0;
  logic [4:0] key_code = '0;
  logic       dc_valid, dc_ready, dc_done;
  dc_cmd_t    dc_cmd;
  logic [3:0] dc_digit;
  logic [7:0] op_char;
  logic       ctu_start, ctu_done, ctu_error;
  ctu_op_t    ctu_op;
  regsel_t    ctu_src, ctu_dst;
  logic       alu_start, alu_done, alu_error;
  alu_op_t    alu_op;
  logic       busy;

  control_unit u_dut (.*);

  // stand-ins
  string log_q [$];
  bit    alu_fail = 0;
  int    dc_cnt = 0, ctu_cnt = 0, alu_cnt = 0;
  assign dc_ready = (dc_cnt == 0);
  always @(posedge clk) begin
    dc_done   <= 1'b0;
    ctu_done  <= 1'b0;
    alu_done  <= 1'b0;
    ctu_error <= 1'b0;
    alu_error <= 1'b0;
    if (rst) begin
      dc_cnt <= 0; ctu_cnt <= 0; alu_cnt <= 0;
    end else begin
      if (dc_valid && dc_ready) begin
        case (dc_cmd)
          DC_APPEND: log_q.push_back($sformatf("A%0d", dc_digit));
          DC_BACK:   log_q.push_back("B");
          DC_CLEAR:  log_q.push_back("X");
          DC_NEG:    log_q.push_back("N");
          DC_SHL:    log_q.push_back("<");
          DC_SHR:    log_q.push_back(">");
          default:   log_q.push_back("R");
        endcase
        dc_cnt <= 5;
      end else if (dc_cnt > 0) begin
        dc_cnt <= dc_cnt - 1;
        if (dc_cnt == 1) dc_done <= 1'b1;
      end
      if (ctu_start) begin
        case (ctu_op)
          CTU_BCD2BIN: log_q.push_back($sformatf("C%0d", ctu_dst));
          CTU_BIN2BCD: log_q.push_back($sformatf("V%0d", ctu_src));
          default:     log_q.push_back($sformatf("K%0d%0d", ctu_src, ctu_dst));
        endcase
        ctu_cnt <= 4;
      end else if (ctu_cnt > 0) begin
        ctu_cnt <= ctu_cnt - 1;
        if (ctu_cnt == 1) ctu_done <= 1'b1;
      end
      if (alu_start) begin
        log_q.push_back((alu_op == ALU_ADD) ? "L+" : (alu_op == ALU_SUB) ? "L-" : "L*");
        alu_cnt <= 6;
      end else if (alu_cnt > 0) begin
        alu_cnt <= alu_cnt - 1;
        if (alu_cnt == 1) begin
          alu_done  <= 1'b1;
          alu_error <= alu_fail;
        end
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic key(logic [4:0] k);
    @(negedge clk);
    while (busy) @(negedge clk);
    key_code  = k;
    key_valid = 1'b1;
    @(negedge clk);
    key_valid = 1'b0;
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic expect_log(string exp, byte op, string what);
    string got = "";
    foreach (log_q[i]) got = {got, (i == 0) ? "" : " ", log_q[i]};
    log_q.delete();
    checks++;
    if (got != exp || op_char != op) begin
      failures++;
      $display("FAIL %s: \"%s\" op '%s', expected \"%s\" op '%s'", what, got, op_char, exp, op);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
    expect_log("X", " ", "reset");

    key(5);             expect_log("A5", " ", "first digit");
    key(KEY_PLUS);      expect_log("C1 R", "+", "plus");
    key(3);             expect_log("X A3", "+", "second operand starts fresh");
    key(1);             expect_log("A1", "+", "second digit");
    key(KEY_EQ);        expect_log("C2 L+ K31 V3 R", " ", "equals");
    key(KEY_MUL);       expect_log("R", "*", "result reused, no conversion");
    key(KEY_MINUS);     expect_log("R", "-", "operation replaced");
    key(2);             expect_log("X A2", "-", "digit");
    key(KEY_MUL);       expect_log("C2 L- K31 V3 R", "*", "chained evaluation");
    key(KEY_DIV);       expect_log("", "*", "division key ignored");
    key(KEY_MOD);       expect_log("", "*", "modulo key ignored");
    key(KEY_EQ);        expect_log("C2 L* K31 V3 R", " ", "= right after an operation");
    key(KEY_NEG);       expect_log("N", " ", "neg");
    key(KEY_PLUS);      expect_log("C1 R", "+", "edited result is converted again");
    key(KEY_BACK);      expect_log("B", "+", "back");
    key(KEY_SHR);       expect_log(">", "+", "shift right");
    key(KEY_SHL);       expect_log("<", "+", "shift left");
    key(KEY_C);         expect_log("X", "+", "C keeps the operation");
    key(9);             expect_log("A9", "+", "digit after C");
    alu_fail = 1;
    key(KEY_EQ);        expect_log("C2 L+ X", "E", "ALU error");
    alu_fail = 0;
    key(KEY_EQ);        expect_log("", "E", "= without an operation");
    key(4);             expect_log("X A4", " ", "new entry after error");
    key(KEY_MINUS);     expect_log("C1 R", "-", "minus");
    key(KEY_CE);        expect_log("X", " ", "CE");
    key(KEY_EQ);        expect_log("", " ", "CE forgot the operation");

    // a key while busy is dropped
    @(negedge clk);
    key_code = 6; key_valid = 1'b1;
    @(negedge clk);
    key_code = 8;
    @(negedge clk);
    key_valid = 1'b0;
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
    expect_log("A6", " ", "key while busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
