// tb_long_operands: the arithmetic path at full register size (65536 words, the
// 524,272-digit configuration) with operands of several hundred digits. The
// convert/transfer unit and the ALU share the real memory interface and a
// pin-level SRAM model, as in the calculator. Each case writes two signed
// decimal numbers into register 0 in turn, converts them into registers 1 and 2,
// runs add, subtract or multiply, converts register 3 back into register 0 and
// compares the digits and sign with a reference worked out here on 4096-bit
// integers. The clock counts of the two conversions are checked against their
// quadratic cost models (decimal to binary about 10 clocks per binary word per
// 8-digit group, binary to decimal about 42 clocks per word per group), which
// are what the run-time estimates for half-million-digit numbers rest on.
module tb_long_operands;
  import calc_pkg::*;

  typedef logic [4095:0] big_t;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = !clk;

  // convert/transfer unit
  logic     ctu_start = 1'b0;
  ctu_op_t  ctu_op = CTU_COPY;
  regsel_t  ctu_src = REG_ANS, ctu_dst = REG_A;
  logic     ctu_busy, ctu_done, ctu_error;
  // ALU
  logic     alu_start = 1'b0;
  alu_op_t  alu_op = ALU_ADD;
  logic     alu_busy, alu_done, alu_error;

  mem_req_t cl_req [2];
  mem_rsp_t cl_rsp [2];
  addr_t    sram_addr;
  logic     sram_ce_n, sram_oe_n, sram_we_n, sram_dq_oe;
  word_t    sram_dq_o, sram_dq_i;

  convert_transfer_unit u_ctu (
    .clk, .rst, .start(ctu_start), .op(ctu_op), .src(ctu_src), .dst(ctu_dst),
    .busy(ctu_busy), .done(ctu_done), .error(ctu_error), .mreq(cl_req[0]), .mrsp(cl_rsp[0])
  );
  alu u_alu (
    .clk, .rst, .start(alu_start), .op(alu_op), .busy(alu_busy), .done(alu_done),
    .error(alu_error), .mreq(cl_req[1]), .mrsp(cl_rsp[1])
  );
  memory_interface #(.NCLIENT(2)) u_mi (.*);
  sram_model u_sram (.*);

  int checks = 0, failures = 0;
  int unsigned cycles;

  task automatic ctu_run(ctu_op_t o, regsel_t s, regsel_t d);
    @(posedge clk);
    ctu_op <= o; ctu_src <= s; ctu_dst <= d; ctu_start <= 1'b1;
    @(posedge clk);
    ctu_start <= 1'b0;
    cycles = 1;
    while (!ctu_done) begin @(posedge clk); cycles++; end
  endtask

  task automatic alu_run(alu_op_t o);
    @(posedge clk);
    alu_op <= o; alu_start <= 1'b1;
    @(posedge clk);
    alu_start <= 1'b0;
    cycles = 1;
    while (!alu_done) begin @(posedge clk); cycles++; end
  endtask

  function automatic string rnd_dec(int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(8'(48 + ((i == 0) ? 1 + $urandom % 9 : $urandom % 10)))};
    return s;
  endfunction

  function automatic big_t dec_value(string s);
    big_t v = '0;
    for (int i = 0; i < s.len(); i++) v = v * 10 + big_t'(int'(s[i]) - 48);
    return v;
  endfunction

  // register 0 <= decimal string s (most significant digit first), sign neg
  task automatic put_bcd(string s, bit neg);
    int n;
    word_t v;
    n = s.len();
    for (int w = 0; w < (n + 7) / 8; w++) begin
      v = '0;
      for (int d = 0; d < 8; d++)
        if (w * 8 + d < n) v[d*4 +: 4] = 4'(int'(s[n - 1 - (w * 8 + d)]) - 48);
      u_sram.mem[reg_addr(REG_BCD, DATA_BASE + ofs_t'(w))] = v;
    end
    u_sram.mem[reg_addr(REG_BCD, HDR_LEN)]  = word_t'(n);
    u_sram.mem[reg_addr(REG_BCD, HDR_SIGN)] = word_t'(neg && n != 0);
  endtask

  function automatic string get_bcd();
    string s;
    int    n;
    word_t v;
    s = "";
    n = int'(u_sram.mem[reg_addr(REG_BCD, HDR_LEN)]);
    for (int i = n - 1; i >= 0; i--) begin
      v = u_sram.mem[reg_addr(REG_BCD, DATA_BASE + ofs_t'(i / 8))];
      s = {s, string'(8'(48 + v[(i % 8) * 4 +: 4]))};
    end
    return s;
  endfunction

  function automatic int words_of(int digits);
    return int'($ceil(real'(digits) * 3.3219281 / 32.0));
  endfunction

  task automatic run_case(alu_op_t o, int la, int lb);
    string sa, sb, exp_s, got_s;
    bit    na, nb, rneg, got_neg;
    big_t  ma, mb, rm;
    int unsigned c_a, c_back;
    int    groups, budget;
    sa = rnd_dec(la);
    sb = rnd_dec(lb);
    na = 1'($urandom);
    nb = 1'($urandom);
    ma = dec_value(sa);
    mb = dec_value(sb);
    // reference in sign and magnitude
    if (o == ALU_MUL) begin
      rm = ma * mb;
      rneg = na ^ nb;
    end else if ((o == ALU_ADD) == (na == nb)) begin
      rm = ma + mb;
      rneg = na;
    end else if (ma >= mb) begin
      rm = ma - mb;
      rneg = na;
    end else begin
      rm = mb - ma;
      rneg = (o == ALU_ADD) ? nb : !nb;
    end
    if (rm == 0) rneg = 1'b0;
    exp_s = (rm == 0) ? "" : $sformatf("%0d", rm);

    put_bcd(sa, na);
    ctu_run(CTU_BCD2BIN, REG_BCD, REG_A);
    c_a = cycles;
    put_bcd(sb, nb);
    ctu_run(CTU_BCD2BIN, REG_BCD, REG_B);
    alu_run(o);
    ctu_run(CTU_BIN2BCD, REG_ANS, REG_BCD);
    c_back = cycles;

    got_s   = get_bcd();
    got_neg = u_sram.mem[reg_addr(REG_BCD, HDR_SIGN)][0];
    checks++;
    if (ctu_error || alu_error || got_s != exp_s || got_neg != rneg) begin
      failures++;
      $display("FAIL op %0d, %0d x %0d digits: got %0d digits sign %0d, expected %0d digits sign %0d",
               o, la, lb, got_s.len(), got_neg, exp_s.len(), rneg);
    end

    // decimal to binary: sum over groups g of 10 * (words after g groups), plus slack
    groups = (la + 7) / 8;
    budget = 0;
    for (int g = 1; g <= groups; g++) budget += 10 * (words_of(g * 8) + 1) + 16;
    checks++;
    if (c_a > budget + 40) begin
      failures++;
      $display("FAIL %0d-digit decimal to binary took %0d clocks, model %0d", la, c_a, budget);
    end
    // binary to decimal: 42 clocks per remaining word per group
    groups = (exp_s.len() + 7) / 8;
    budget = 0;
    for (int g = 0; g < groups; g++) budget += 42 * (words_of(exp_s.len() - g * 8) + 1) + 100;
    checks++;
    if (c_back > budget + 60) begin
      failures++;
      $display("FAIL %0d-digit binary to decimal took %0d clocks, model %0d", exp_s.len(), c_back, budget);
    end
    $display("op %0d: %0d and %0d digits -> %0d digits; to binary %0d clocks, back %0d clocks",
             o, la, lb, exp_s.len(), c_a, c_back);
  endtask

  initial begin
    foreach (cl_req[i]) cl_req[i] = MEM_IDLE;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);

    run_case(ALU_ADD, 1200, 1100);
    run_case(ALU_SUB, 900, 1233);
    run_case(ALU_SUB, 640, 640);
    run_case(ALU_MUL, 600, 590);
    run_case(ALU_MUL, 1000, 12);
    run_case(ALU_ADD, 1, 1230);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
