// hd44780_model: write-only testbench model of a 2x16 HD44780 character LCD.
//
// Latches the bus on every falling edge of en. With rs low the byte is a
// command: 0x01 clears the display memory and homes the address, 0x80 | a
// sets the display address a (line 1 at 0x00, line 2 at 0x40), any other
// command is only logged. With rs high the byte is written as a character
// and the address advances. It also records, in clocks, the shortest enable
// pulse, the shortest data set-up before enable, and the gap after each
// command for the driver to be checked against.
module hd44780_model (
  input  logic       clk,
  input  logic [7:0] data,
  input  logic       en,
  input  logic       rs,
  input  logic       rw
);
  byte unsigned ddram [128];
  byte unsigned cmds [$];        // every command byte, in order
  int           n_chars = 0;
  int           n_writes = 0;
  int           rw_high = 0;
  int           min_en = 1 << 30;
  int           min_setup = 1 << 30;
  int           min_gap_after_clear = 1 << 30;
  int           min_gap_after_cmd = 1 << 30;
  logic [6:0]   addr = '0;

  int cyc = 0, en_rise = 0, last_fall = 0, bus_change = 0;
  bit last_was_clear = 1'b0, seen = 1'b0;
  logic [8:0] bus_prev = '0;
  logic       en_prev = 1'b0;

  initial foreach (ddram[i]) ddram[i] = 8'h20;

  always @(posedge clk) begin
    cyc++;
    if ({rs, data} != bus_prev) bus_change = cyc;
    bus_prev = {rs, data};
    if (rw) rw_high++;
    if (en && !en_prev) begin
      en_rise = cyc;
      if (cyc - bus_change < min_setup) min_setup = cyc - bus_change;
      if (seen) begin
        if (last_was_clear && cyc - last_fall < min_gap_after_clear) min_gap_after_clear = cyc - last_fall;
        if (!last_was_clear && cyc - last_fall < min_gap_after_cmd) min_gap_after_cmd = cyc - last_fall;
      end
    end
    if (!en && en_prev) begin
      if (cyc - en_rise < min_en) min_en = cyc - en_rise;
      last_fall = cyc;
      seen = 1'b1;
      n_writes++;
      last_was_clear = (!rs && data == 8'h01);
      if (!rs) begin
        cmds.push_back(data);
        if (data == 8'h01) begin
          foreach (ddram[i]) ddram[i] = 8'h20;
          addr = '0;
        end else if (data[7]) begin
          addr = data[6:0];
        end
      end else begin
        ddram[addr] = data;
        addr = addr + 7'd1;
        n_chars++;
      end
    end
    en_prev = en;
  end

  function automatic string line(input int n);
    string s;
    s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(ddram[n * 64 + i])};
    return s;
  endfunction
endmodule
