// keypad_interface: strobes the 25-key matrix keypad and reports key presses.
//
// The keypad has 5 output (strobe) lines and 5 input (return) lines, and is read
// by strobing, as the design description says. The rest is this design's own:
// one strobe line at a time is driven low (the others high) for SCAN_CYCLES
// clocks; the return lines, pulled up outside and synchronised here by two
// flip-flops, are sampled in the last cycle of that period, so a pressed key in
// the strobed column reads as a low row. After all columns have been strobed
// (one scan) the scan's result is the first pressed key found (lowest column,
// then lowest row), or none. A key
// is reported once, as a one-cycle key_valid pulse with key_code = row*COLS +
// column, after it has been the result of DEBOUNCE_SCANS scans in a row; another
// press is accepted only after DEBOUNCE_SCANS scans in a row found no key.
// With the defaults (50 MHz, 1 ms per column) a press is reported 20-25 ms after
// it settles.
module keypad_interface #(
  parameter int unsigned ROWS           = 5,
  parameter int unsigned COLS           = 5,
  parameter int unsigned SCAN_CYCLES    = 50000,
  parameter int unsigned DEBOUNCE_SCANS = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  output logic [COLS-1:0]               kp_col,
  input  logic [ROWS-1:0]               kp_row,
  output logic                          key_valid,
  output logic [$clog2(ROWS*COLS)-1:0]  key_code
);

  localparam int unsigned CODE_W = $clog2(ROWS * COLS);
  localparam int unsigned CNT_W  = $clog2(SCAN_CYCLES + 1);
  localparam int unsigned COL_W  = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned DB_W   = $clog2(DEBOUNCE_SCANS + 2);

  logic [ROWS-1:0]   row_s1, row_s2;
  logic [CNT_W-1:0]  cyc;
  logic [COL_W-1:0]  col;
  logic              scan_found;          // a key seen in this scan so far
  logic [CODE_W-1:0] scan_code;
  logic              last_found;
  logic [CODE_W-1:0] last_code;
  logic [DB_W-1:0]   same_cnt;           // scans in a row with the same result
  logic              reported;

  always_comb begin
    kp_col      = '1;
    kp_col[col] = 1'b0;
  end

  // Lowest pressed row in the strobed column.
  logic              row_hit;
  logic [CODE_W-1:0] row_code;
  always_comb begin
    row_hit  = 1'b0;
    row_code = '0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      if (!row_s2[r]) begin
        row_hit  = 1'b1;
        row_code = CODE_W'(r * COLS) + CODE_W'(col);
      end
    end
  end

  wire sample   = (cyc == CNT_W'(SCAN_CYCLES - 1));
  wire scan_end = sample && (col == COL_W'(COLS - 1));

  // Result of the scan that ends now.
  wire              res_found = scan_found || row_hit;
  wire [CODE_W-1:0] res_code  = scan_found ? scan_code : row_code;

  always_ff @(posedge clk) begin
    if (rst) begin
      row_s1     <= '1;
      row_s2     <= '1;
      cyc        <= '0;
      col        <= '0;
      scan_found <= 1'b0;
      scan_code  <= '0;
      last_found <= 1'b0;
      last_code  <= '0;
      same_cnt   <= '0;
      reported   <= 1'b0;
      key_valid  <= 1'b0;
      key_code   <= '0;
    end else begin
      row_s1    <= kp_row;
      row_s2    <= row_s1;
      key_valid <= 1'b0;
      cyc       <= sample ? '0 : cyc + 1'b1;
      if (sample) begin
        col <= (col == COL_W'(COLS - 1)) ? '0 : col + 1'b1;
        if (!scan_found && row_hit) begin
          scan_found <= 1'b1;
          scan_code  <= row_code;
        end
      end
      if (scan_end) begin
        scan_found <= 1'b0;
        last_found <= res_found;
        last_code  <= res_code;
        if (res_found == last_found && (!res_found || res_code == last_code)) begin
          if (same_cnt != DB_W'(DEBOUNCE_SCANS)) same_cnt <= same_cnt + 1'b1;
        end else begin
          same_cnt <= DB_W'(1);
        end
        // same_cnt + 1 scans in a row will have had this result
        if ((res_found == last_found && (!res_found || res_code == last_code) &&
             same_cnt + 1'b1 >= DB_W'(DEBOUNCE_SCANS)) || DEBOUNCE_SCANS <= 1) begin
          if (res_found && !reported) begin
            key_valid <= 1'b1;
            key_code  <= res_code;
            reported  <= 1'b1;
          end else if (!res_found) begin
            reported <= 1'b0;
          end
        end
      end
    end
  end

endmodule
