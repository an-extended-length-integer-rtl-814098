// tb_calc_top_full: the calculator at its real sizes and timing: 65536-word
// registers (524,272 digits), a 50 MHz clock, 1 ms keypad strobing with 4-scan
// debounce, and the LCD's power-up, command and clear waits. It keys in
// 12 + 34 = and then * 2 = on the keypad model and reads 46 and 92 back from the
// LCD model. Key presses are held 30 ms and released for 30 ms, as a person would.
module tb_calc_top_full;
  import calc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = !clk;     // 50 MHz

  logic [4:0] kp_col, kp_row;
  logic [7:0] lcd_db;
  logic       lcd_rs, lcd_rw, lcd_e;
  addr_t      sram_addr;
  logic       sram_ce_n, sram_oe_n, sram_we_n, sram_dq_oe;
  word_t      sram_dq_o, sram_dq_i;
  logic       busy;
  int         pressed = -1;

  calc_top u_dut (.*);

  keypad_model u_kp  (.kp_col, .kp_row, .pressed);
  lcd_model    u_lcd (.rst, .lcd_db, .lcd_rs, .lcd_rw, .lcd_e);
  sram_model   u_ram (.sram_addr, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_dq_o,
                      .sram_dq_oe, .sram_dq_i);

  int checks = 0, failures = 0;

  task automatic settle();
    repeat (5) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (20_000) @(posedge clk);        // last LCD write and its wait
  endtask

  task automatic press(int code);
    settle();
    pressed = code;
    repeat (1_500_000) @(posedge clk);     // 30 ms
    pressed = -1;
    repeat (1_500_000) @(posedge clk);
    settle();
  endtask

  task automatic expect_line(string exp, string what);
    checks++;
    if (u_lcd.text() != exp) begin
      failures++;
      $display("FAIL %s: LCD \"%s\" expected \"%s\"", what, u_lcd.text(), exp);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    settle();
    checks++;
    if (!u_lcd.init_ok) begin failures++; $display("FAIL LCD initialisation"); end
    expect_line("                   0", "after reset");
    press(1);
    press(2);
    expect_line("                  12", "12 entered");
    press(KEY_PLUS);
    expect_line("+                 12", "plus");
    press(3);
    press(4);
    press(KEY_EQ);
    expect_line("                  46", "12+34");
    press(KEY_MUL);
    press(2);
    press(KEY_EQ);
    expect_line("                  92", "46*2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
