// lcd_model: the part of an HD44780-style character LCD that the calculator
// uses. On each falling edge of E it takes DB as an instruction (RS = 0) or as
// a character (RS = 1): 0x01 clears, 0x80|a sets the address, a character is
// stored at the address, which then increments. line holds the 20 characters.
// instr/chars count the writes; init_ok is set once the four set-up
// instructions 0x38, 0x0C, 0x06, 0x01 have arrived first, in that order.
module lcd_model (
  input  logic       rst,          // writes are ignored during reset
  input  logic [7:0] lcd_db,
  input  logic       lcd_rs,
  input  logic       lcd_rw,
  input  logic       lcd_e
);
  logic [7:0]  line [20];
  int unsigned addr   = 0;
  int unsigned instr  = 0;
  int unsigned chars  = 0;
  bit          init_ok = 1'b0;
  int unsigned init_seen = 0;

  initial foreach (line[i]) line[i] = " ";

  function automatic string text();
    string s = "";
    for (int i = 0; i < 20; i++) s = {s, string'(line[i])};
    return s;
  endfunction

  always @(negedge lcd_e) begin
    if (!lcd_rw && !rst) begin
      if (!lcd_rs) begin
        instr <= instr + 1;
        if (init_seen < 4) begin
          if (lcd_db == ((init_seen == 0) ? 8'h38 : (init_seen == 1) ? 8'h0C :
                         (init_seen == 2) ? 8'h06 : 8'h01)) begin
            init_seen <= init_seen + 1;
            if (init_seen == 3) init_ok <= 1'b1;
          end else begin
            init_seen <= 99;
          end
        end
        if (lcd_db == 8'h01) begin
          foreach (line[i]) line[i] <= " ";
          addr <= 0;
        end else if (lcd_db[7]) begin
          addr <= 32'(lcd_db[6:0]);
        end
      end else begin
        chars <= chars + 1;
        if (addr < 20) line[addr] <= lcd_db;
        addr <= addr + 1;
      end
    end
  end
endmodule
