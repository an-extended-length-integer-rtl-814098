// tb_keypad_interface: a keypad model is pressed key by key (all 25 codes, in
// random order) and the interface must report each press exactly once with the
// right code, within a bounded number of scans. A press shorter than the
// debounce time (one scan, or DEB-1 scans) must not be
// reported, and holding a key must not repeat it. Two
// keys held together report the one strobed first (lower column). Short scan time (8 clocks
// per column) and 3 debounce scans.
module tb_keypad_interface;
  localparam int unsigned SCAN = 8;
  localparam int unsigned DEB  = 3;
  localparam int unsigned SCAN_CLKS = SCAN * 5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = !clk;

  logic [4:0] kp_col, kp_row, kp_row_m1, kp_row_m2;
  logic       key_valid;
  logic [4:0] key_code;
  int         pressed = -1, pressed2 = -1;

  keypad_interface #(.ROWS(5), .COLS(5), .SCAN_CYCLES(SCAN), .DEBOUNCE_SCANS(DEB)) u_dut (.*);
  keypad_model u_kp1 (.kp_col, .kp_row(kp_row_m1), .pressed);
  keypad_model u_kp2 (.kp_col, .kp_row(kp_row_m2), .pressed(pressed2));
  assign kp_row = kp_row_m1 & kp_row_m2;   // wired-AND of two held keys

  int checks = 0, failures = 0;
  int reports [$];
  always @(posedge clk) if (!rst && key_valid) reports.push_back(int'(key_code));

  task automatic hold(int k, int clocks);
    pressed = k;
    repeat (clocks) @(posedge clk);
    pressed = -1;
    repeat ((DEB + 2) * SCAN_CLKS) @(posedge clk);
  endtask

  initial begin
    int order [25];
    foreach (order[i]) order[i] = i;
    order.shuffle();
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (2 * SCAN_CLKS) @(posedge clk);

    foreach (order[i]) begin
      reports.delete();
      hold(order[i], (DEB + 2) * SCAN_CLKS);
      checks++;
      if (reports.size() != 1 || reports[0] != order[i]) begin
        failures++;
        $display("FAIL key %0d: %0d reports, first %0d", order[i], reports.size(),
                 reports.size() ? reports[0] : -1);
      end
    end

    // a bounce shorter than the debounce time
    reports.delete();
    hold(7, SCAN_CLKS);
    checks++;
    if (reports.size() != 0) begin failures++; $display("FAIL short bounce reported"); end

    // a press seen by DEB-1 scans only (one scan short of the debounce time)
    for (int k = 0; k < 25; k += 6) begin
      reports.delete();
      hold(k, (DEB - 1) * SCAN_CLKS);
      checks++;
      if (reports.size() != 0) begin
        failures++;
        $display("FAIL key %0d held %0d scans was reported", k, DEB - 1);
      end
    end

    // a long hold reports once
    reports.delete();
    hold(12, 20 * SCAN_CLKS);
    checks++;
    if (reports.size() != 1) begin failures++; $display("FAIL long hold: %0d reports", reports.size()); end

    // two keys: key 21 (column 1) is strobed before key 3 (column 3)
    reports.delete();
    pressed2 = 3;
    hold(21, (DEB + 2) * SCAN_CLKS);
    pressed2 = -1;
    repeat ((DEB + 2) * SCAN_CLKS) @(posedge clk);
    checks++;
    if (reports.size() != 1 || reports[0] != 21) begin
      failures++;
      $display("FAIL two keys: %0d reports", reports.size());
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
