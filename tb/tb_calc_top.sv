// tb_calc_top: end-to-end test of the calculator. Keys are pressed on a keypad
// model, the LCD line is read back from an LCD model, and the numbers live in an
// SRAM model. Timing parameters are shortened and the registers are 6 words
// (32 decimal digits, 128-bit binary) so that the overflow paths can be reached
// with a few dozen key presses. Expected lines are computed here from the key
// sequence with 256-bit arithmetic. Each mechanism of the design is counted and
// must have happened at least once.
module tb_calc_top;
  import calc_pkg::*;

  localparam int unsigned REG_WORDS = 6;
  localparam int unsigned MAXD      = (REG_WORDS - 2) * 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = !clk;

  logic [4:0] kp_col, kp_row;
  logic [7:0] lcd_db;
  logic       lcd_rs, lcd_rw, lcd_e;
  addr_t      sram_addr;
  logic       sram_ce_n, sram_oe_n, sram_we_n, sram_dq_oe;
  word_t      sram_dq_o, sram_dq_i;
  logic       busy;
  int         pressed = -1;

  calc_top #(
    .REG_WORDS(REG_WORDS), .SCAN_CYCLES(4), .DEBOUNCE_SCANS(2),
    .E_CYCLES(2), .CMD_WAIT(3), .CLEAR_WAIT(6), .POWERUP_WAIT(10)
  ) u_dut (.*);

  keypad_model u_kp  (.kp_col, .kp_row, .pressed);
  lcd_model    u_lcd (.rst, .lcd_db, .lcd_rs, .lcd_rw, .lcd_e);
  sram_model   u_ram (.sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_dq_o,
                      .sram_dq_oe, .sram_dq_i);

  int checks = 0, failures = 0;

  // ---------------- mechanism counters ----------------
  int n_append, n_back, n_clear, n_neg, n_shl, n_shr, n_refresh;
  int n_b2b, n_b2d, n_copy, n_add, n_sub, n_mul, n_alu_err, n_ctu_err;
  int n_chain, n_reuse, n_swap, n_refused_digit;
  int unsigned app_writes = 0;
  dc_cmd_t     app_cmd    = DC_REFRESH;
  initial begin
    {n_append, n_back, n_clear, n_neg, n_shl, n_shr, n_refresh} = '0;
    {n_b2b, n_b2d, n_copy, n_add, n_sub, n_mul, n_alu_err, n_ctu_err} = '0;
    {n_chain, n_reuse, n_swap, n_refused_digit} = '0;
  end
  always @(posedge clk) if (!rst) begin
    if (u_dut.dc_valid && u_dut.dc_ready) begin
      case (u_dut.dc_cmd)
        DC_APPEND:  n_append++;
        DC_BACK:    n_back++;
        DC_CLEAR:   n_clear++;
        DC_NEG:     n_neg++;
        DC_SHL:     n_shl++;
        DC_SHR:     n_shr++;
        default:    n_refresh++;
      endcase
    end
    if (u_dut.ctu_start) begin
      case (u_dut.ctu_op)
        CTU_BCD2BIN: n_b2b++;
        CTU_BIN2BCD: n_b2d++;
        default:     n_copy++;
      endcase
    end
    if (u_dut.alu_start) begin
      case (u_dut.alu_op)
        ALU_ADD: n_add++;
        ALU_SUB: n_sub++;
        default: n_mul++;
      endcase
    end
    if (u_dut.alu_done && u_dut.alu_error) n_alu_err++;
    if (u_dut.ctu_done && u_dut.ctu_error) n_ctu_err++;
    if (!busy && u_dut.key_valid &&
        u_dut.u_control.is_op_key) begin
      if (u_dut.u_control.pending && !u_dut.u_control.new_entry) n_chain++;
      else if (!u_dut.u_control.pending && u_dut.u_control.ans_in_a) n_reuse++;
    end
    // a subtraction that had to take |B| - |A|
    if (u_dut.alu_done && u_dut.u_alu.sub && u_dut.u_alu.xr == REG_B) n_swap++;
    // an append that wrote only the two header words: digit refused
    if (u_dut.dc_valid && u_dut.dc_ready) begin
      app_writes = u_ram.writes;
      app_cmd    = u_dut.dc_cmd;
    end
    if (u_dut.dc_done && app_cmd == DC_APPEND && u_ram.writes - app_writes == 2) n_refused_digit++;
  end

  // ---------------- stimulus helpers ----------------
  task automatic settle();
    repeat (5) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (60) @(posedge clk);   // LCD finishes its last write
  endtask

  task automatic press(int code);
    settle();
    pressed = code;
    repeat (80) @(posedge clk);   // > DEBOUNCE_SCANS scans
    pressed = -1;
    repeat (80) @(posedge clk);
    settle();
  endtask

  task automatic type_digits(string s);
    for (int i = 0; i < s.len(); i++) press(int'(s[i]) - 48);
  endtask

  // Expected 20-character line: op char, sign, 18 digits right aligned with
  // the digit of weight 10^offset at the right end.
  function automatic string line_of(byte op, bit neg, string digits, int offset);
    string s;
    int    n = digits.len();
    s = {string'(op), neg ? "-" : " "};
    for (int p = 2; p < 20; p++) begin
      int idx = offset + 19 - p;
      if (n == 0) s = {s, (p == 19) ? "0" : " "};
      else if (idx < n) s = {s, string'(digits[n - 1 - idx])};
      else s = {s, " "};
    end
    return s;
  endfunction

  function automatic string dec(logic [255:0] v);
    return (v == 0) ? "" : $sformatf("%0d", v);
  endfunction

  task automatic expect_line(string exp, string what);
    string got;
    got = u_lcd.text();
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: LCD \"%s\" expected \"%s\"", what, got, exp);
    end
  endtask

  // ---------------- the test ----------------
  logic [255:0] a, b, r;
  string        sa;

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    settle();
    checks++;
    if (!u_lcd.init_ok) begin failures++; $display("FAIL LCD initialisation sequence"); end
    expect_line(line_of(" ", 0, "", 0), "after reset");

    // entry and BACK; a leading zero is not entered
    type_digits("0123");
    expect_line(line_of(" ", 0, "123", 0), "typed 0123");
    press(KEY_BACK);
    expect_line(line_of(" ", 0, "12", 0), "BACK");

    // 12 + 45 = 57
    press(KEY_PLUS);
    expect_line(line_of("+", 0, "12", 0), "plus pending");
    type_digits("45");
    expect_line(line_of("+", 0, "45", 0), "second operand");
    press(KEY_EQ);
    expect_line(line_of(" ", 0, "57", 0), "12+45");

    // result reused as first operand: 57 - 100 = -43
    press(KEY_MINUS);
    type_digits("100");
    press(KEY_EQ);
    expect_line(line_of(" ", 1, "43", 0), "57-100");

    // NEG, then 43 * 2 = 86
    press(KEY_NEG);
    expect_line(line_of(" ", 0, "43", 0), "NEG");
    press(KEY_MUL);
    type_digits("2");
    press(KEY_NEG);     // second operand -2
    press(KEY_EQ);
    expect_line(line_of(" ", 1, "86", 0), "43*-2");

    // chaining: 7 * 6 + 8 = 50; a second operation key replaces the first
    press(KEY_CE);
    type_digits("7");
    press(KEY_PLUS);
    press(KEY_MUL);
    expect_line(line_of("*", 0, "7", 0), "operation replaced");
    type_digits("6");
    press(KEY_PLUS);
    expect_line(line_of("+", 0, "42", 0), "chained 7*6");
    type_digits("8");
    press(KEY_EQ);
    expect_line(line_of(" ", 0, "50", 0), "42+8");

    // x - x = 0 is shown unsigned
    press(KEY_MINUS);
    type_digits("50");
    press(KEY_EQ);
    expect_line(line_of(" ", 0, "", 0), "50-50");

    // C clears only the entry
    type_digits("99");
    press(KEY_C);
    expect_line(line_of(" ", 0, "", 0), "C");

    // long numbers and the window
    sa = "1234567890123456789012345";
    type_digits(sa);
    expect_line(line_of(" ", 0, sa, 0), "25 digits");
    repeat (3) press(KEY_SHR);
    expect_line(line_of(" ", 0, sa, 3), "SHR x3");
    repeat (9) press(KEY_SHR);      // stops at the most significant digit
    expect_line(line_of(" ", 0, sa, 7), "SHR limit");
    press(KEY_SHL);
    expect_line(line_of(" ", 0, sa, 6), "SHL");

    // big multiply and subtract with 256-bit reference
    a = 256'd1234567890123456789012345;
    press(KEY_MUL);
    type_digits("987654");
    b = 256'd987654;
    press(KEY_EQ);
    r = a * b;
    expect_line(line_of(" ", 0, dec(r), 0), "25-digit * 6-digit");
    // answer - bigger number: magnitude swap, negative result
    press(KEY_MINUS);
    type_digits("99999999999999999999999999999999");
    press(KEY_EQ);
    b = 256'd99999999999999999999999999999999;
    r = b - r;
    expect_line(line_of(" ", 1, dec(r), 0), "subtract larger");

    // the 33rd digit is refused
    press(KEY_CE);
    type_digits("123456789012345678901234567890123");
    expect_line(line_of(" ", 0, "12345678901234567890123456789012", 0), "digit limit");

    // product longer than a binary register: ALU error
    press(KEY_CE);
    type_digits("99999999999999999999");
    press(KEY_MUL);
    type_digits("99999999999999999999");
    press(KEY_EQ);
    expect_line(line_of("E", 0, "", 0), "ALU overflow");

    // product fits 128 bits but has more than 32 digits: conversion error
    type_digits("99999999999999999");
    press(KEY_MUL);
    type_digits("99999999999999999");
    press(KEY_EQ);
    expect_line(line_of("E", 0, "", 0), "BCD overflow");

    // recovers: 3 - 5 = -2
    type_digits("3");
    press(KEY_MINUS);
    type_digits("5");
    press(KEY_EQ);
    expect_line(line_of(" ", 1, "2", 0), "3-5 after error");

    // every mechanism must have happened
    check_seen("append", n_append);   check_seen("back", n_back);
    check_seen("clear", n_clear);     check_seen("neg", n_neg);
    check_seen("shift left", n_shl);  check_seen("shift right", n_shr);
    check_seen("refresh", n_refresh); check_seen("bcd->bin", n_b2b);
    check_seen("bin->bcd", n_b2d);    check_seen("copy", n_copy);
    check_seen("add", n_add);         check_seen("sub", n_sub);
    check_seen("mul", n_mul);         check_seen("alu overflow", n_alu_err);
    check_seen("ctu overflow", n_ctu_err);
    check_seen("chaining", n_chain);  check_seen("answer reuse", n_reuse);
    check_seen("magnitude swap", n_swap);
    check_seen("digit refused", n_refused_digit);

    $display("mechanisms: append=%0d back=%0d clear=%0d neg=%0d shl=%0d shr=%0d refresh=%0d",
             n_append, n_back, n_clear, n_neg, n_shl, n_shr, n_refresh);
    $display("mechanisms: bcd2bin=%0d bin2bcd=%0d copy=%0d add=%0d sub=%0d mul=%0d",
             n_b2b, n_b2d, n_copy, n_add, n_sub, n_mul);
    $display("mechanisms: alu_err=%0d ctu_err=%0d chain=%0d reuse=%0d swap=%0d refused=%0d",
             n_alu_err, n_ctu_err, n_chain, n_reuse, n_swap, n_refused_digit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
