// tb_display_interface: checks the LCD bus produced by the display interface.
// Every write (RS, DB at the fall of E) is recorded with its E-high time and the
// gap before the next write. Expected: nothing before POWERUP_WAIT clocks; the
// four set-up instructions 0x38, 0x0C, 0x06, 0x01; then for each request an
// address instruction 0x80|pos followed by the character on the data register.
// E must stay high E_CYCLES clocks, writes must be CMD_WAIT apart (CLEAR_WAIT
// after a clear), and the LCD model's line must end up holding the characters.
module tb_display_interface;
  localparam int unsigned E_CYCLES = 3, CMD_WAIT = 7, CLEAR_WAIT = 25, POWERUP_WAIT = 40;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = !clk;

  logic       req_valid = 1'b0, req_ready;
  logic [4:0] req_pos = '0;
  logic [7:0] req_char = '0;
  logic [7:0] lcd_db;
  logic       lcd_rs, lcd_rw, lcd_e;

  display_interface #(.CHARS(20), .E_CYCLES(E_CYCLES), .CMD_WAIT(CMD_WAIT),
                      .CLEAR_WAIT(CLEAR_WAIT), .POWERUP_WAIT(POWERUP_WAIT)) u_dut (.*);
  lcd_model u_lcd (.rst, .lcd_db, .lcd_rs, .lcd_rw, .lcd_e);

  int checks = 0, failures = 0;

  typedef struct { bit rs; logic [7:0] db; int high; int start; } wr_t;
  wr_t writes [$];
  int  cyc = 0, e_rise = 0, high = 0;
  always @(posedge clk) begin
    cyc++;
    if (lcd_e && cyc > 4) high++;
    if (!rst && cyc > 4 && $fell(lcd_e)) begin
      writes.push_back('{rs: lcd_rs, db: lcd_db, high: high, start: e_rise});
      high = 0;
    end
    if ($rose(lcd_e)) e_rise = cyc;
  end

  task automatic request(int pos, byte ch);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_pos   = 5'(pos);
    req_char  = ch;
    req_valid = 1'b1;
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  function automatic void fail(string m);
    failures++;
    $display("FAIL %s", m);
  endfunction

  initial begin
    string msg = "HELLO";
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < msg.len(); i++) request(3 + i, msg[i]);
    request(19, "9");
    repeat (CMD_WAIT * 4) @(posedge clk);

    checks++;
    if (writes.size() != 4 + 2 * 6) fail($sformatf("%0d writes", writes.size()));
    else begin
      logic [7:0] init [4] = '{8'h38, 8'h0C, 8'h06, 8'h01};
      checks++;
      if (writes[0].start < POWERUP_WAIT) fail("write before the power-up wait");
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (writes[i].rs || writes[i].db != init[i]) fail($sformatf("init %0d: %h", i, writes[i].db));
      end
      for (int i = 0; i < 6; i++) begin
        wr_t a, d;
        a = writes[4 + 2 * i];
        d = writes[5 + 2 * i];
        checks++;
        if (a.rs || a.db != (8'h80 | 8'((i < 5) ? 3 + i : 19)) || !d.rs ||
            d.db != ((i < 5) ? msg[i] : "9"))
          fail($sformatf("request %0d: %0d/%h %0d/%h", i, a.rs, a.db, d.rs, d.db));
      end
      for (int i = 0; i < writes.size(); i++) begin
        checks++;
        if (writes[i].high != E_CYCLES) fail($sformatf("E high %0d clocks", writes[i].high));
        if (i > 0) begin
          int need = (i == 4) ? CLEAR_WAIT : CMD_WAIT;
          checks++;
          if (writes[i].start - writes[i-1].start < E_CYCLES + need)
            fail($sformatf("write %0d only %0d clocks after the previous", i,
                           writes[i].start - writes[i-1].start));
        end
      end
    end
    checks++;
    if (u_lcd.text() != "   HELLO           9") fail({"line \"", u_lcd.text(), "\""});
    checks++;
    if (lcd_rw) fail("RW high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
