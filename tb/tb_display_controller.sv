// tb_display_controller: drives the display controller with random command
// sequences against a reference model kept here (digit string, sign, window
// offset). After every command the 20 characters sent towards the LCD must match
// the model's line, and register 0 in memory must hold the model's number
// (length word, sign word, one BCD nibble per digit). Registers are 6 words, so
// the 32-digit limit is reached; leading zeros must be refused. The LCD side
// answers with a random delay to exercise the valid/ready handshake.
module tb_display_controller;
  import calc_pkg::*;

  localparam int unsigned REG_WORDS = 6;
  localparam int unsigned MAXD      = (REG_WORDS - 2) * 8;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  always #5 clk = !clk;

  logic       cmd_valid = 1'b0, cmd_ready, done;
  dc_cmd_t    cmd = DC_REFRESH;
  logic [3:0] cmd_digit = '0;
  logic [7:0] op_char = " ";
  mem_req_t   mreq;
  mem_rsp_t   mrsp;
  logic       lcd_valid, lcd_ready;
  logic [4:0] lcd_pos;
  logic [7:0] lcd_char;

  display_controller #(.REG_WORDS(REG_WORDS), .DIGITS_SHOWN(18), .CHARS(20)) u_dut (.*);
  word_mem u_mem (.clk, .mreq, .mrsp);

  // LCD side: ready comes and goes at random
  logic [7:0] line [20];
  int         sent = 0;
  initial lcd_ready = 1'b0;
  always @(posedge clk) begin
    lcd_ready <= ($urandom % 3) == 0;
    if (lcd_valid && lcd_ready) begin
      line[lcd_pos] <= lcd_char;
      sent++;
    end
  end

  int checks = 0, failures = 0;

  // reference model
  string m_digits = "";
  bit    m_neg    = 0;
  int    m_off    = 0;

  function automatic string line_text();
    string s = "";
    for (int i = 0; i < 20; i++) s = {s, string'(line[i])};
    return s;
  endfunction

  function automatic string line_of();
    string s;
    int    n = m_digits.len();
    s = {string'(op_char), m_neg ? "-" : " "};
    for (int p = 2; p < 20; p++) begin
      int idx = m_off + 19 - p;
      if (n == 0) s = {s, (p == 19) ? "0" : " "};
      else if (idx < n) s = {s, string'(m_digits[n - 1 - idx])};
      else s = {s, " "};
    end
    return s;
  endfunction

  task automatic issue(dc_cmd_t c, int d = 0);
    int n;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_digit = 4'(d); cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    sent = 0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    // model
    n = m_digits.len();
    case (c)
      DC_APPEND: if (n < MAXD && !(n == 0 && d == 0)) m_digits = {m_digits, string'(8'(48 + d))};
      DC_BACK:   if (n > 0) begin
                   m_digits = m_digits.substr(0, n - 2);
                   if (m_digits.len() == 0) m_neg = 0;
                   if (m_off > 0 && m_off + 18 > m_digits.len()) m_off--;
                 end
      DC_CLEAR:  begin m_digits = ""; m_neg = 0; m_off = 0; end
      DC_NEG:    if (n > 0) m_neg = !m_neg;
      DC_SHL:    if (m_off > 0) m_off--;
      DC_SHR:    if (m_off + 18 < n) m_off++;
      default:   m_off = 0;
    endcase
    compare(c);
  endtask

  task automatic compare(dc_cmd_t c);
    string got;
    int    n;
    checks++;
    if (sent != 20) begin failures++; $display("FAIL cmd %0d sent %0d characters", c, sent); end
    checks++;
    if (line_text() != line_of()) begin
      failures++;
      $display("FAIL cmd %0d: line \"%s\" expected \"%s\"", c, line_text(), line_of());
    end
    n = int'(u_mem.mem[reg_addr(REG_BCD, HDR_LEN)]);
    got = "";
    for (int i = n - 1; i >= 0 && i < 64; i--) begin
      word_t w;
      w = u_mem.mem[reg_addr(REG_BCD, DATA_BASE + ofs_t'(i / 8))];
      got = {got, string'(8'(48 + w[(i % 8) * 4 +: 4]))};
    end
    checks++;
    if (got != m_digits || u_mem.mem[reg_addr(REG_BCD, HDR_SIGN)][0] != m_neg) begin
      failures++;
      $display("FAIL cmd %0d: memory \"%s\" sign %0d expected \"%s\" %0d", c, got,
               u_mem.mem[reg_addr(REG_BCD, HDR_SIGN)][0], m_digits, m_neg);
    end
  endtask

  initial begin
    foreach (line[i]) line[i] = "?";
    repeat (3) @(posedge clk);
    rst = 1'b0;
    issue(DC_CLEAR);
    issue(DC_APPEND, 0);              // leading zero refused
    issue(DC_APPEND, 7);
    issue(DC_APPEND, 0);
    issue(DC_NEG);
    op_char = "+";
    issue(DC_REFRESH);
    issue(DC_BACK);
    issue(DC_BACK);                   // number becomes 0, sign drops
    issue(DC_BACK);                   // nothing left to delete
    for (int i = 0; i < 35; i++) issue(DC_APPEND, 1 + $urandom % 9);   // 33rd+ refused
    for (int i = 0; i < 16; i++) issue(DC_SHR);                        // stops at 14
    issue(DC_SHL);
    issue(DC_BACK);                   // window follows the shorter number
    issue(DC_REFRESH);
    op_char = " ";
    // random mix
    for (int t = 0; t < 300; t++) begin
      int r;
      r = $urandom % 16;
      if (r < 8)       issue(DC_APPEND, $urandom % 10);
      else if (r < 10) issue(DC_BACK);
      else if (r < 11) issue(DC_NEG);
      else if (r < 13) issue(DC_SHR);
      else if (r < 14) issue(DC_SHL);
      else if (r < 15) issue(DC_REFRESH);
      else if (($urandom % 4) == 0) issue(DC_CLEAR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
