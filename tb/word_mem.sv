// word_mem: behavioural memory for unit testbenches. It answers one client port
// of the calculator's request/acknowledge protocol: a request seen at a clock
// edge is carried out there and acknowledged in the following cycle. Holds the
// full 256K x 32 address space; contents start random. reads/writes count the
// accesses so that testbenches can check cycle budgets.
module word_mem
  import calc_pkg::*;
(
  input  logic     clk,
  input  mem_req_t mreq,
  output mem_rsp_t mrsp
);
  word_t mem [2**ADDR_W];
  int unsigned reads  = 0;
  int unsigned writes = 0;

  initial mrsp = '0;

  always @(posedge clk) begin
    if (mreq.req && !mrsp.ack) begin
      if (mreq.we) begin
        mem[mreq.addr] <= mreq.wdata;
        writes <= writes + 1;
      end else begin
        mrsp.rdata <= mem[mreq.addr];
        reads <= reads + 1;
      end
      mrsp.ack <= 1'b1;
    end else begin
      mrsp.ack <= 1'b0;
    end
  end
endmodule
