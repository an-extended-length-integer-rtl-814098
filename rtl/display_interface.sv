// display_interface: drives the 20-character LCD module.
//
// The LCD is programmed through one 8-bit instruction register and one 8-bit
// data register, as the design description says. This module turns the simple
// internal request "put character ch at position pos" into LCD bus writes, so
// the display controller never sees LCD timing. The instruction set used here
// is the common HD44780-compatible one, which is this design's assumption:
//   after POWERUP_WAIT clocks: 0x38 function set, 0x0C display on,
//   0x06 entry mode (increment), 0x01 clear;
//   per request: 0x80|pos (set address, instruction register, RS=0) and then
//   ch (data register, RS=1).
// Each write puts RS and DB on the bus one clock before E rises, holds E high for
// E_CYCLES clocks and then waits CMD_WAIT clocks (CLEAR_WAIT after the clear
// instruction) before the next write; the busy flag is never read, so RW stays 0.
// req_ready is high when a request can be taken; a request is taken in the
// cycle req_valid and req_ready are both high.
module display_interface #(
  parameter int unsigned CHARS        = 20,
  parameter int unsigned E_CYCLES     = 16,      // 320 ns at 50 MHz
  parameter int unsigned CMD_WAIT     = 2500,    // 50 us
  parameter int unsigned CLEAR_WAIT   = 100000,  // 2 ms
  parameter int unsigned POWERUP_WAIT = 1000000  // 20 ms
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [$clog2(CHARS)-1:0]   req_pos,
  input  logic [7:0]                 req_char,
  output logic [7:0]                 lcd_db,
  output logic                       lcd_rs,
  output logic                       lcd_rw,
  output logic                       lcd_e
);

  localparam int unsigned POS_W = $clog2(CHARS);
  localparam int unsigned MAXW  = (POWERUP_WAIT > CLEAR_WAIT) ? POWERUP_WAIT : CLEAR_WAIT;
  localparam int unsigned CNT_W = $clog2(MAXW + E_CYCLES + CMD_WAIT + 2);

  typedef enum logic [2:0] {S_PWR, S_LOAD, S_EPULSE, S_WAIT, S_IDLE} state_t;
  typedef enum logic [1:0] {PH_INIT, PH_ADDR, PH_DATA} phase_t;

  state_t           state;
  phase_t           phase;
  logic [1:0]       init_idx;
  logic [CNT_W-1:0] cnt;
  logic [POS_W-1:0] pos_q;
  logic [7:0]       char_q;

  function automatic logic [7:0] init_byte(logic [1:0] i);
    unique case (i)
      2'd0: return 8'h38;
      2'd1: return 8'h0C;
      2'd2: return 8'h06;
      default: return 8'h01;
    endcase
  endfunction

  assign req_ready = (state == S_IDLE);
  assign lcd_rw    = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_PWR;
      phase    <= PH_INIT;
      init_idx <= '0;
      cnt      <= CNT_W'(POWERUP_WAIT);
      pos_q    <= '0;
      char_q   <= '0;
      lcd_db   <= '0;
      lcd_rs   <= 1'b0;
      lcd_e    <= 1'b0;
    end else begin
      unique case (state)
        S_PWR: begin
          if (cnt == '0) state <= S_LOAD;
          else           cnt   <= cnt - 1'b1;
        end
        S_LOAD: begin
          unique case (phase)
            PH_INIT: begin lcd_rs <= 1'b0; lcd_db <= init_byte(init_idx); end
            PH_ADDR: begin lcd_rs <= 1'b0; lcd_db <= 8'h80 | 8'(pos_q); end
            default: begin lcd_rs <= 1'b1; lcd_db <= char_q; end
          endcase
          cnt   <= CNT_W'(E_CYCLES - 1);
          state <= S_EPULSE;
        end
        S_EPULSE: begin
          lcd_e <= 1'b1;
          if (cnt == '0) begin
            state <= S_WAIT;
            cnt   <= (!lcd_rs && lcd_db == 8'h01) ? CNT_W'(CLEAR_WAIT) : CNT_W'(CMD_WAIT);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WAIT: begin
          lcd_e <= 1'b0;
          if (cnt == '0) begin
            unique case (phase)
              PH_INIT: begin
                if (init_idx == 2'd3) state <= S_IDLE;
                else begin
                  init_idx <= init_idx + 1'b1;
                  state    <= S_LOAD;
                end
              end
              PH_ADDR: begin phase <= PH_DATA; state <= S_LOAD; end
              default: state <= S_IDLE;
            endcase
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_IDLE: begin
          if (req_valid) begin
            pos_q  <= req_pos;
            char_q <= req_char;
            phase  <= PH_ADDR;
            state  <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
