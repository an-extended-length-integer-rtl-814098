// tb_memory_interface: three clients drive random reads and writes through the
// memory interface into the SRAM model. Every read must return the last value
// written to its address (kept in a scoreboard here), every access to an idle
// interface must be acknowledged in the fourth clock after the client raises its
// request (seen at the next edge, then two bus cycles and the ack cycle), and when several clients ask at once the lowest-numbered one must be
// served first. The SRAM control lines are checked too: WE is never low together
// with OE, and the bus is driven only while writing.
module tb_memory_interface;
  import calc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = !clk;

  mem_req_t cl_req [3];
  mem_rsp_t cl_rsp [3];
  addr_t    sram_addr;
  logic     sram_ce_n, sram_oe_n, sram_we_n, sram_dq_oe;
  word_t    sram_dq_o, sram_dq_i;

  memory_interface #(.NCLIENT(3)) u_dut (.*);
  sram_model u_ram (.*);

  int checks = 0, failures = 0;
  word_t score [addr_t];

  initial for (int c = 0; c < 3; c++) cl_req[c] = MEM_IDLE;

  // one access by client c; returns read data and the request-to-ack latency
  task automatic access(int c, bit we, addr_t a, word_t d, output word_t q, output int lat);
    cl_req[c] <= '{req: 1'b1, we: we, addr: a, wdata: d};
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!cl_rsp[c].ack);
    q = cl_rsp[c].rdata;
    cl_req[c] <= MEM_IDLE;
  endtask

  // bus rules, one check per cycle with the chips enabled
  always @(posedge clk) if (!rst && !sram_ce_n) begin
    checks++;
    if (!sram_we_n && !sram_oe_n) begin
      failures++;
      $display("FAIL WE and OE low together");
    end
    if (sram_dq_oe && !sram_oe_n) begin
      failures++;
      $display("FAIL data bus driven while the SRAM outputs are enabled");
    end
  end

  initial begin
    word_t q;
    int    lat;
    addr_t a;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      int c;
      c = $urandom % 3;
      a = addr_t'($urandom % 64) | (addr_t'($urandom % 4) << 16);
      if (!score.exists(a) || ($urandom % 2)) begin
        word_t d;
        d = $urandom;
        access(c, 1'b1, a, d, q, lat);
        score[a] = d;
      end else begin
        access(c, 1'b0, a, '0, q, lat);
        checks++;
        if (q != score[a]) begin
          failures++;
          $display("FAIL read %h by client %0d: %h expected %h", a, c, q, score[a]);
        end
      end
      checks++;
      if (lat != 4) begin   // request registered here, seen one clock later, ack 3 after
        failures++;
        $display("FAIL latency %0d", lat);
      end
      @(posedge clk);
    end

    // simultaneous requests: client 0, then 1, then 2
    begin
      int order [$];
      cl_req[2] <= '{req: 1'b1, we: 1'b1, addr: 18'h10, wdata: 32'h22};
      cl_req[1] <= '{req: 1'b1, we: 1'b1, addr: 18'h10, wdata: 32'h11};
      cl_req[0] <= '{req: 1'b1, we: 1'b1, addr: 18'h10, wdata: 32'h00};
      while (order.size() < 3) begin
        @(posedge clk);
        for (int c = 0; c < 3; c++) if (cl_rsp[c].ack) begin
          order.push_back(c);
          cl_req[c] <= MEM_IDLE;
        end
      end
      checks++;
      if (order[0] != 0 || order[1] != 1 || order[2] != 2) begin
        failures++;
        $display("FAIL priority order %0d %0d %0d", order[0], order[1], order[2]);
      end
      checks++;
      if (u_ram.mem[18'h10] != 32'h22) begin
        failures++;
        $display("FAIL last write lost: %h", u_ram.mem[18'h10]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
