// tb_can_load_monitor_full: one complete measurement with every parameter
// at its default: 50 MHz clock, 1 Mbit/s CAN, 115200-baud report link and a
// one-second sample period.
//
// During the first second the bus carries the traffic of the reference
// set-up: bind requests at start-up, a device beacon (function 0x0A) from
// every node every 500 ms (the bus arbitrator, node 0x01, in mode 1; nodes
// 0x02, 0x03 and 0x07 in mode 0), two electrode nodes (0x02, 0x03) sending
// seven-byte data messages every 10 ms, plus one frame from node 0x40 that
// is outside the 32 monitored modules. After the period ends the
// testbench decodes the 140-byte UART report and compares it with its own
// count of bit times, checks the report arrives within the time 140 bytes
// take at 115200 baud, and selects module 2 with KEY[1] to read its load
// from the LCD.
module tb_can_load_monitor_full;
  import can_tb_pkg::*;

  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned CPB    = 50;      // 1 Mbit/s
  localparam int unsigned UCPB   = 434;     // 115200 baud
  localparam int unsigned N      = 32;
  localparam int unsigned POR    = 17;

  logic       clk = 1'b0;
  logic [1:0] KEY;
  logic       CAN_RX, TxDWire, LCD_EN, LCD_RS, LCD_RW, LCD_POWER;
  logic [7:0] LCD_DATA;
  int         checks = 0, failures = 0;

  can_load_monitor dut (.CLOCK_50(clk), .KEY, .CAN_RX, .TxDWire, .LCD_DATA, .LCD_EN,
                        .LCD_RS, .LCD_RW, .LCD_POWER);
  hd44780_model lcd (.clk, .data(LCD_DATA), .en(LCD_EN), .rs(LCD_RS), .rw(LCD_RW));

  logic       rx_valid;
  logic [7:0] rx_data;
  int         rx_ferr;
  uart_rx_model #(.CLKS_PER_BIT(UCPB)) mon (.clk, .line(TxDWire), .byte_valid(rx_valid),
                                            .byte_data(rx_data), .framing_errors(rx_ferr));

  always #10 clk = ~clk;                    // 20 ns period

  initial begin
    repeat (CLK_HZ + 2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint exp_mod [N];
  longint exp_all = 0;
  int     n_frames = 0;

  task automatic send_frame(input logic [10:0] id, input int dlc, input logic [63:0] data);
    bitq_t b;
    b = build_frame(id, 1'b0, '0, 1'b0, dlc, data);
    foreach (b[i]) begin
      CAN_RX = b[i];
      repeat (CPB) @(negedge clk);
    end
    CAN_RX = 1'b1;
    exp_all += b.size();
    if (id[7:0] < N) exp_mod[id[7:0]] += b.size();
    n_frames++;
    repeat (3 * CPB) @(negedge clk);
  endtask

  byte rep [$];
  int  first_byte_cyc = -1, last_byte_cyc = -1;
  always @(posedge clk) begin
    if (rx_valid) begin
      if (rep.size() == 0) first_byte_cyc = cyc;
      last_byte_cyc = cyc;
      rep.push_back(rx_data);
    end
  end

  initial begin
    byte exp [$];
    string h;
    KEY = 2'b11; CAN_RX = 1'b1;
    foreach (exp_mod[i]) exp_mod[i] = 0;
    repeat (20 * CPB) @(negedge clk);
    // bind requests during start-up
    send_frame({2'b11, 1'b0, 8'h07}, 7, 64'h0113_3700_4200_2300);
    send_frame({2'b11, 1'b0, 8'h02}, 7, 64'h0113_3700_4300_0100);
    send_frame({2'b11, 1'b0, 8'h03}, 7, 64'h0113_3700_4300_0200);
    send_frame({2'b01, 1'b0, 8'h40}, 2, 64'h0F01_0000_0000_0000);
    // 10 ms slots: electrode data each slot, beacon every 50 slots
    for (int slot = 0; slot < 99; slot++) begin
      while (cyc < POR + 400_000 + slot * 500_000) @(negedge clk);
      if (slot % 50 == 0) begin
        send_frame({2'b01, 1'b1, 8'h01}, 1, 64'h0A00_0000_0000_0000);
        send_frame({2'b01, 1'b0, 8'h02}, 1, 64'h0A00_0000_0000_0000);
        send_frame({2'b01, 1'b0, 8'h03}, 1, 64'h0A00_0000_0000_0000);
        send_frame({2'b01, 1'b0, 8'h07}, 1, 64'h0A00_0000_0000_0000);
      end
      send_frame({2'b01, 1'b0, 8'h02}, 7, {8'h0E, 48'($urandom) << 16, 8'h00});
      send_frame({2'b01, 1'b0, 8'h03}, 7, {8'h0E, 48'($urandom) << 16, 8'h00});
    end
    // select module 2 on the display (two presses of KEY[1])
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); KEY[1] = 1'b0;
      repeat (50_000) @(negedge clk);
      KEY[1] = 1'b1;
      repeat (50_000) @(negedge clk);
    end
    // wait for the end of the period and the whole report
    while (rep.size() < 140 && cyc < POR + CLK_HZ + 1_000_000) @(negedge clk);
    repeat (10) @(negedge clk);

    exp = '{8'h00, 8'h10, 8'h00, 8'h01};
    for (int i = 0; i < N; i++) begin
      exp.push_back(8'(i));
      exp.push_back(8'(exp_mod[i] >> 16));
      exp.push_back(8'(exp_mod[i] >> 8));
      exp.push_back(8'(exp_mod[i]));
    end
    exp.push_back(8'h00); exp.push_back(8'h20); exp.push_back(8'h00); exp.push_back(8'h02);
    exp.push_back(8'(N));
    exp.push_back(8'(exp_all >> 16));
    exp.push_back(8'(exp_all >> 8));
    exp.push_back(8'(exp_all));
    checks++;
    if (rep.size() != exp.size()) begin
      failures++; $display("%0d report bytes, %0d expected", rep.size(), exp.size());
    end
    foreach (exp[i]) begin
      if (i < rep.size()) begin
        checks++;
        if (rep[i] !== exp[i]) begin
          failures++; $display("byte %0d: %h expected %h", i, rep[i], exp[i]);
        end
      end
    end
    // the report starts right after the period and takes 140 byte times
    checks++;
    if (first_byte_cyc < POR + CLK_HZ || first_byte_cyc > POR + CLK_HZ + 11 * UCPB + 10) begin
      failures++; $display("first report byte at cycle %0d", first_byte_cyc);
    end
    checks++;
    if (last_byte_cyc - first_byte_cyc > 139 * (11 * UCPB + 1) + 10) begin
      failures++; $display("report took %0d cycles", last_byte_cyc - first_byte_cyc);
    end
    checks++;
    if (rx_ferr != 0) begin failures++; $display("%0d framing errors", rx_ferr); end
    // LCD: module 2, whose load is now the snapshot just reported
    repeat (300_000) @(negedge clk);
    h = $sformatf("%06h", exp_mod[2][23:0]);
    checks += 2;
    if (lcd.line(0) != "MODULE 02 ID 02 ") begin failures++; $display("LCD \"%s\"", lcd.line(0)); end
    if (lcd.line(1) != {"LOAD 0x", h.toupper(), "   "}) begin
      failures++; $display("LCD \"%s\"", lcd.line(1));
    end
    $display("frames %0d, overall load %0d bit times (%0d.%02d %% of 1 Mbit/s)", n_frames,
             exp_all, exp_all / 10000, (exp_all / 100) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
