// tb_convert_transfer_unit: the CTU against reference conversions done here with
// 128-bit arithmetic and $sformatf. Registers are 6 words (4 data words: 32
// decimal digits, 128 bits). Checked:
//   BCD -> binary for random numbers of 0 to 32 digits, with garbage in the
//   unused nibbles above the last digit;
//   binary -> BCD for random numbers of 0 to 4 words, including numbers with
//   more than 32 digits, which must raise error;
//   copy between binary registers;
//   length and sign words of every result, and a cycle budget for BCD -> binary.
module tb_convert_transfer_unit;
  import calc_pkg::*;

  localparam int unsigned REG_WORDS = 6;
  localparam int unsigned CAP       = REG_WORDS - 2;
  localparam int unsigned MAXD      = CAP * 8;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  always #5 clk = !clk;

  logic     start = 1'b0;
  ctu_op_t  op = CTU_COPY;
  regsel_t  src = REG_ANS, dst = REG_A;
  logic     busy, done, error;
  mem_req_t mreq;
  mem_rsp_t mrsp;

  convert_transfer_unit #(.REG_WORDS(REG_WORDS)) u_dut (.*);
  word_mem u_mem (.clk, .mreq, .mrsp);

  int checks = 0, failures = 0;
  int unsigned cycles;

  task automatic run(ctu_op_t o, regsel_t s, regsel_t d);
    @(posedge clk);
    op <= o; src <= s; dst <= d;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
  endtask

  function automatic word_t mem_at(regsel_t r, ofs_t o);
    return u_mem.mem[reg_addr(r, o)];
  endfunction

  // write a decimal string (most significant first) into register 0
  task automatic put_bcd(string s, bit neg);
    int n = s.len();
    int words = (n + 7) / 8;
    for (int w = 0; w < words; w++) begin
      word_t v = $urandom;                      // garbage above the last digit
      for (int d = 0; d < 8; d++) begin
        int i = w * 8 + d;
        if (i < n) v[d*4 +: 4] = 4'(int'(s[n - 1 - i]) - 48);
      end
      u_mem.mem[reg_addr(REG_BCD, DATA_BASE + ofs_t'(w))] = v;
    end
    u_mem.mem[reg_addr(REG_BCD, HDR_LEN)]  = word_t'(n);
    u_mem.mem[reg_addr(REG_BCD, HDR_SIGN)] = word_t'(neg);
  endtask

  task automatic put_bin(regsel_t r, logic [127:0] v, bit neg);
    int n = 0;
    for (int w = 0; w < 4; w++) if (v[w*32 +: 32] != 0) n = w + 1;
    for (int w = 0; w < n; w++) u_mem.mem[reg_addr(r, DATA_BASE + ofs_t'(w))] = v[w*32 +: 32];
    u_mem.mem[reg_addr(r, HDR_LEN)]  = word_t'(n);
    u_mem.mem[reg_addr(r, HDR_SIGN)] = word_t'(neg && n != 0);
  endtask

  task automatic expect_bin(regsel_t r, logic [127:0] v, bit neg, string what);
    int n = 0;
    for (int w = 0; w < 4; w++) if (v[w*32 +: 32] != 0) n = w + 1;
    checks++;
    if (mem_at(r, HDR_LEN) != word_t'(n) || mem_at(r, HDR_SIGN) != word_t'(neg && n != 0)) begin
      failures++;
      $display("FAIL %s: len %0d sign %0d, expected %0d %0d (value %0d)", what,
               mem_at(r, HDR_LEN), mem_at(r, HDR_SIGN), n, neg && n != 0, v);
      return;
    end
    for (int w = 0; w < n; w++) begin
      if (mem_at(r, DATA_BASE + ofs_t'(w)) != v[w*32 +: 32]) begin
        failures++;
        $display("FAIL %s: word %0d = %h expected %h", what, w,
                 mem_at(r, DATA_BASE + ofs_t'(w)), v[w*32 +: 32]);
        return;
      end
    end
  endtask

  function automatic string rnd_dec(int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(8'(48 + ((i == 0) ? 1 + $urandom % 9 : $urandom % 10)))};
    return s;
  endfunction

  function automatic logic [127:0] dec_value(string s);
    logic [127:0] v = '0;
    for (int i = 0; i < s.len(); i++) v = v * 10 + 128'(int'(s[i]) - 48);
    return v;
  endfunction

  initial begin
    string        s, got;
    logic [127:0] v;
    bit           neg;
    int           n;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // ---- BCD -> binary ----
    for (int t = 0; t < 60; t++) begin
      n   = (t < 33) ? t : $urandom % (MAXD + 1);
      s   = rnd_dec(n);
      neg = 1'($urandom);
      put_bcd(s, neg);
      run(CTU_BCD2BIN, REG_BCD, (t % 2) ? REG_A : REG_B);
      checks++;
      if (error) begin failures++; $display("FAIL bcd2bin raised error"); end
      expect_bin((t % 2) ? REG_A : REG_B, dec_value(s), neg, $sformatf("bcd2bin %s", s));
    end
    // cycle budget: 32 digits = 4 groups over at most 4 words
    put_bcd("99999999999999999999999999999999", 0);
    run(CTU_BCD2BIN, REG_BCD, REG_A);
    checks++;
    if (cycles > 4 * (3 * 2 * 4 + 10) + 30) begin
      failures++;
      $display("FAIL bcd2bin of 32 digits took %0d clocks", cycles);
    end

    // ---- binary -> BCD ----
    for (int t = 0; t < 60; t++) begin
      int words;
      words = $urandom % 5;
      v = '0;
      for (int w = 0; w < words; w++) v[w*32 +: 32] = $urandom;
      if (t == 0) v = '0;
      if (t == 1) v = 128'd100000000;                  // exactly one group
      if (t == 2) v = dec_value("99999999999999999999999999999999");  // 32 digits
      if (t == 3) v = dec_value("99999999999999999999999999999999") + 1; // 33 digits
      neg = 1'($urandom);
      put_bin(REG_ANS, v, neg);
      run(CTU_BIN2BCD, REG_ANS, REG_BCD);
      s = (v == 0) ? "" : $sformatf("%0d", v);
      checks++;
      if (error != (s.len() > MAXD)) begin
        failures++;
        $display("FAIL bin2bcd of %0d: error=%0d", v, error);
      end else if (!error) begin
        n = int'(mem_at(REG_BCD, HDR_LEN));
        got = "";
        for (int i = n - 1; i >= 0; i--) begin
          word_t wv;
          wv = mem_at(REG_BCD, DATA_BASE + ofs_t'(i / 8));
          got = {got, string'(8'(48 + wv[(i % 8) * 4 +: 4]))};
        end
        checks++;
        if (got != s || mem_at(REG_BCD, HDR_SIGN) != word_t'(neg && v != 0)) begin
          failures++;
          $display("FAIL bin2bcd: \"%s\" sign %0d, expected \"%s\" %0d", got,
                   mem_at(REG_BCD, HDR_SIGN), s, neg && v != 0);
        end
      end
    end

    // ---- copy ----
    for (int t = 0; t < 10; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom} >> (32 * (t % 5));
      neg = 1'($urandom);
      put_bin(REG_ANS, v, neg);
      run(CTU_COPY, REG_ANS, (t % 2) ? REG_A : REG_B);
      expect_bin((t % 2) ? REG_A : REG_B, v, neg, "copy");
      expect_bin(REG_ANS, v, neg, "copy source kept");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
