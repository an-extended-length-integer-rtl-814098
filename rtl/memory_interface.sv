// memory_interface: gives the calculator's units one simple word port each onto
// the external asynchronous SRAM and hides the SRAM bus timing from them.
//
// The board carries two 256K x 16 bit, 10 ns SRAM chips; they share address and
// control lines and together form one 32-bit word, as the design description's
// 32-bit word and 16-bit buses suggest. Clients (display controller,
// convert/transfer unit, ALU) present a calc_pkg::mem_req_t and hold it until
// they see ack. A fixed-priority arbiter (client 0 first) picks one request; in
// this calculator only one client is active at a time, so the arbiter only
// matters for robustness.
//
// Timing, at the 50 MHz (20 ns) clock: every access takes two cycles on the
// bus. Read: cycle 1 drives address, CE and OE; cycle 2 keeps them and latches
// the data (a full 20 ns after the address, twice the 10 ns access time), and
// ack is high in the cycle after. Write: cycle 1 drives address and data with WE
// low, cycle 2 raises WE while address and data are still held, so the write
// ends with stable address and data. A client's ack therefore comes 3 cycles
// after its request is first seen; a new request may follow the ack directly.
// The data bus is split into an output, an output enable and an input, so that
// the tri-state buffer sits in the pad ring outside this module.
module memory_interface
  import calc_pkg::*;
#(
  parameter int unsigned NCLIENT = 3
) (
  input  logic     clk,
  input  logic     rst,
  input  mem_req_t cl_req [NCLIENT],
  output mem_rsp_t cl_rsp [NCLIENT],
  output addr_t    sram_addr,
  output logic     sram_ce_n,
  output logic     sram_oe_n,
  output logic     sram_we_n,
  output word_t    sram_dq_o,
  output logic     sram_dq_oe,
  input  word_t    sram_dq_i
);

  typedef enum logic [1:0] {S_IDLE, S_PH1, S_PH2, S_ACK} state_t;

  localparam int unsigned SEL_W = (NCLIENT > 1) ? $clog2(NCLIENT) : 1;

  state_t           state;
  logic [SEL_W-1:0] sel;
  logic             cur_we;
  addr_t            cur_addr;
  word_t            cur_wdata;
  word_t            rdata_q;

  // Fixed priority: lowest index wins.
  logic             any_req;
  logic [SEL_W-1:0] pick;
  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int i = NCLIENT - 1; i >= 0; i--) begin
      if (cl_req[i].req) begin
        any_req = 1'b1;
        pick    = SEL_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      sel       <= '0;
      cur_we    <= 1'b0;
      cur_addr  <= '0;
      cur_wdata <= '0;
      rdata_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (any_req) begin
          sel       <= pick;
          cur_we    <= cl_req[pick].we;
          cur_addr  <= cl_req[pick].addr;
          cur_wdata <= cl_req[pick].wdata;
          state     <= S_PH1;
        end
        S_PH1: state <= S_PH2;
        S_PH2: begin
          if (!cur_we) rdata_q <= sram_dq_i;
          state <= S_ACK;
        end
        S_ACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NCLIENT; i++) begin
      cl_rsp[i].ack   = (state == S_ACK) && (sel == SEL_W'(i));
      cl_rsp[i].rdata = rdata_q;
    end
  end

  wire active = (state == S_PH1) || (state == S_PH2);
  assign sram_addr  = cur_addr;
  assign sram_ce_n  = !active;
  assign sram_oe_n  = !(active && !cur_we);
  assign sram_we_n  = !((state == S_PH1) && cur_we);
  assign sram_dq_o  = cur_wdata;
  assign sram_dq_oe = active && cur_we;

  // A client must hold its request, unchanged, until it is acknowledged.
  for (genvar g = 0; g < NCLIENT; g++) begin : g_chk
    property p_hold;
      @(posedge clk) disable iff (rst)
        (cl_req[g].req && !cl_rsp[g].ack) |=> cl_req[g].req;
    endproperty
    a_hold: assert property (p_hold);
  end

endmodule
