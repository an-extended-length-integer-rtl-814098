// tb_alu: the ALU against 300-bit reference arithmetic. Registers are 10 words
// (8 data words, 256 bits). Random signed operands of 0 to 4 words are written
// into registers 1 and 2 of a behavioural memory, the ALU runs add, subtract or
// multiply, and register 3 (length, sign, words) is compared with the expected
// sign and magnitude. Edge cases: zero operands, equal magnitudes, carries out
// of the top word, and results too long for a register (error expected). The
// time of an addition is checked against the 12-clocks-per-word budget.
module tb_alu;
  import calc_pkg::*;

  localparam int unsigned REG_WORDS = 10;
  localparam int unsigned CAP       = REG_WORDS - 2;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  always #5 clk = !clk;

  logic     start = 1'b0;
  alu_op_t  op = ALU_ADD;
  logic     busy, done, error;
  mem_req_t mreq;
  mem_rsp_t mrsp;

  alu #(.REG_WORDS(REG_WORDS)) u_dut (.*);
  word_mem u_mem (.clk, .mreq, .mrsp);

  int checks = 0, failures = 0;

  typedef logic [299:0] big_t;

  task automatic put(regsel_t r, bit neg, big_t mag);
    int n = 0;
    for (int w = 0; w < 9; w++) if (mag[w*32 +: 32] != 0) n = w + 1;
    u_mem.mem[reg_addr(r, HDR_LEN)]  = word_t'(n);
    u_mem.mem[reg_addr(r, HDR_SIGN)] = word_t'(neg && n != 0);
    for (int w = 0; w < n; w++) u_mem.mem[reg_addr(r, DATA_BASE + ofs_t'(w))] = mag[w*32 +: 32];
  endtask

  function automatic big_t rnd_mag(int words);
    big_t m = '0;
    for (int w = 0; w < words; w++) m[w*32 +: 32] = $urandom;
    if (words > 0 && ($urandom % 4) == 0) m[(words-1)*32 +: 32] = 32'hFFFF_FFFF;
    return m;
  endfunction

  int unsigned cycles;
  task automatic run(alu_op_t o);
    @(posedge clk);
    op    <= o;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cycles = 0;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
  endtask

  // signed reference on 300 bits, then compare register 3
  task automatic check(alu_op_t o, bit na, big_t ma, bit nb, big_t mb);
    logic signed [300:0] a, b, r;
    big_t  rmag;
    bit    rneg, exp_err;
    int    n, exp_n;
    put(REG_A, na, ma);
    put(REG_B, nb, mb);
    a = na ? -$signed({1'b0, ma}) : $signed({1'b0, ma});
    b = nb ? -$signed({1'b0, mb}) : $signed({1'b0, mb});
    case (o)
      ALU_ADD: r = a + b;
      ALU_SUB: r = a - b;
      default: r = a * b;
    endcase
    rneg = r < 0;
    rmag = big_t'(rneg ? -r : r);
    exp_n = 0;
    for (int w = 0; w < 9; w++) if (rmag[w*32 +: 32] != 0) exp_n = w + 1;
    exp_err = (exp_n > CAP);
    run(o);
    checks++;
    if (error != exp_err) begin
      failures++;
      $display("FAIL op %0d error=%0d expected %0d", o, error, exp_err);
      return;
    end
    n = int'(u_mem.mem[reg_addr(REG_ANS, HDR_LEN)]);
    checks++;
    if (exp_err) begin
      if (n != 0) begin failures++; $display("FAIL overflow left length %0d", n); end
      return;
    end
    if (n != exp_n || u_mem.mem[reg_addr(REG_ANS, HDR_SIGN)] != word_t'(rneg)) begin
      failures++;
      $display("FAIL op %0d: len %0d sign %0d, expected %0d %0d (a=%0s%0h b=%0s%0h)", o, n,
               u_mem.mem[reg_addr(REG_ANS, HDR_SIGN)], exp_n, rneg, na ? "-" : "", ma,
               nb ? "-" : "", mb);
    end else begin
      for (int w = 0; w < n; w++) begin
        if (u_mem.mem[reg_addr(REG_ANS, DATA_BASE + ofs_t'(w))] != rmag[w*32 +: 32]) begin
          failures++;
          $display("FAIL op %0d word %0d: %h expected %h", o, w,
                   u_mem.mem[reg_addr(REG_ANS, DATA_BASE + ofs_t'(w))], rmag[w*32 +: 32]);
          break;
        end
      end
    end
  endtask

  initial begin
    big_t x;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // fixed cases
    check(ALU_ADD, 0, 0, 0, 0);
    check(ALU_SUB, 0, 5, 0, 5);                       // equal magnitudes -> +0
    check(ALU_SUB, 1, 300'h1_0000_0000, 1, 300'h1_0000_0000);
    check(ALU_ADD, 0, 300'hFFFF_FFFF_FFFF_FFFF, 0, 1); // carry into a new word
    check(ALU_SUB, 0, 300'h1_0000_0000_0000_0000, 0, 1); // borrow through, top word drops
    check(ALU_SUB, 0, 3, 0, 300'h5_0000_0000);         // |B| > |A|
    check(ALU_ADD, 1, 7, 0, 300'h7_0000_0007);         // mixed signs
    check(ALU_MUL, 1, 300'h1234_5678_9ABC, 0, 0);      // times zero -> +0
    check(ALU_MUL, 1, 300'hFFFF_FFFF, 1, 300'hFFFF_FFFF);
    check(ALU_MUL, 0, 300'h8000_0000, 0, 300'h8000_0000_0000_0001);

    // random
    for (int t = 0; t < 150; t++) begin
      alu_op_t o = alu_op_t'($urandom % 3);
      check(o, 1'($urandom), rnd_mag($urandom % 5), 1'($urandom), rnd_mag($urandom % 5));
    end

    // results that do not fit in 8 words
    x = '0;
    for (int w = 0; w < 8; w++) x[w*32 +: 32] = 32'hFFFF_FFFF;
    check(ALU_ADD, 0, x, 0, 1);
    check(ALU_SUB, 1, x, 0, 300'hFFFF);
    check(ALU_MUL, 0, rnd_mag(4) | (300'h1 << 143), 0, rnd_mag(4) | (300'h1 << 143));
    check(ALU_MUL, 1, 300'h1 << 255, 0, 2);
    // a product that just fits: 2^255 * 1
    check(ALU_MUL, 1, 300'h1 << 254, 0, 2);

    // addition time: 4 + 4 words, about 12 clocks per word plus headers
    put(REG_A, 0, rnd_mag(4));
    put(REG_B, 0, rnd_mag(4));
    run(ALU_ADD);
    checks++;
    if (cycles > 12 * 4 + 12 * 6) begin
      failures++;
      $display("FAIL 4-word addition took %0d clocks", cycles);
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
