// tb_can_load_monitor: end-to-end test of the bus-load monitor at reduced
// clock rates (2 MHz clock, 200 kbit/s CAN, 250 kbaud report link, 30,000
// clock sample period).
//
// Phase 1 puts random PDCP traffic on CAN_RX: valid standard frames from
// nodes inside and outside the 32 monitored modules, extended frames, remote
// frames, and frames with a corrupted CRC. The testbench keeps its own bus
// load per module and overall for each sample period (frame lengths in bit
// times come from the reference frame generator) and decodes every UART
// report on TxDWire, comparing all 140 bytes with it. Phase 2 sends the same
// two frames in every period, so the snapshot is steady, and steps the
// selection with the push buttons (including both wrap-arounds), reading
// the selected load back from the LCD model. A second monitor on the same
// bus runs with its display in the frame view. In phase 3 the testbench
// sends an extended, an errored and a remote frame, waits two screen
// rewrites after each and compares that display with the frame it sent (a
// standard frame is checked the same way in phase 2). Each mechanism is
// counted and a mechanism that never happened counts as a failure.
module tb_can_load_monitor;
  import can_tb_pkg::*;

  localparam int unsigned CLK_HZ  = 2_000_000;
  localparam int unsigned BITRATE = 200_000;
  localparam int unsigned BAUD    = 250_000;
  localparam int unsigned SC      = 30_000;
  localparam int unsigned CPB     = CLK_HZ / BITRATE;
  localparam int unsigned UCPB    = CLK_HZ / BAUD;
  localparam int unsigned N       = 32;
  localparam int unsigned NPER    = 9;    // sample periods simulated
  localparam int unsigned POR     = 17;   // clocks until the first counted cycle

  logic       clk = 1'b0;
  logic [1:0] KEY;
  logic       CAN_RX, TxDWire, LCD_EN, LCD_RS, LCD_RW, LCD_POWER;
  logic [7:0] LCD_DATA;
  int         checks = 0, failures = 0;

  can_load_monitor #(.CLK_HZ(CLK_HZ), .CAN_BITRATE(BITRATE), .BAUD(BAUD), .SAMPLE_CYCLES(SC))
    dut (.CLOCK_50(clk), .KEY, .CAN_RX, .TxDWire, .LCD_DATA, .LCD_EN, .LCD_RS, .LCD_RW, .LCD_POWER);

  hd44780_model lcd (.clk, .data(LCD_DATA), .en(LCD_EN), .rs(LCD_RS), .rw(LCD_RW));

  logic       F_TX, F_EN, F_RS, F_RW, F_POWER;
  logic [7:0] F_DATA;
  can_load_monitor #(.CLK_HZ(CLK_HZ), .CAN_BITRATE(BITRATE), .BAUD(BAUD), .SAMPLE_CYCLES(SC),
                     .LCD_SHOW_FRAMES(1'b1))
    dut_f (.CLOCK_50(clk), .KEY, .CAN_RX, .TxDWire(F_TX), .LCD_DATA(F_DATA), .LCD_EN(F_EN),
           .LCD_RS(F_RS), .LCD_RW(F_RW), .LCD_POWER(F_POWER));

  hd44780_model lcd_f (.clk, .data(F_DATA), .en(F_EN), .rs(F_RS), .rw(F_RW));

  logic       rx_valid;
  logic [7:0] rx_data;
  int         rx_ferr;
  uart_rx_model #(.CLKS_PER_BIT(UCPB)) mon (.clk, .line(TxDWire), .byte_valid(rx_valid),
                                            .byte_data(rx_data), .framing_errors(rx_ferr));

  always #5 clk = ~clk;

  initial begin
    repeat (SC * (NPER + 3)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_valid = 0, n_stuffed = 0, n_crc_err = 0, n_ext = 0, n_rtr = 0, n_outside = 0;
  int n_reports = 0, n_up = 0, n_down = 0, n_wrap_up = 0, n_wrap_down = 0;
  int n_lcd_module = 0, n_lcd_overall = 0;
  int n_view = 0, n_view_ext = 0, n_view_err = 0;

  // Expected frame-view text for the last frame sent.
  string view1, view2;
  bit    view_ext, view_err;

  // Reference load per period.
  longint exp_mod [NPER + 2][N];
  longint exp_all [NPER + 2];

  // ---------------- CAN traffic ----------------
  task automatic send_frame(input logic [10:0] id, input bit ide, input logic [17:0] ext,
                            input bit rtr, input int dlc, input logic [63:0] data,
                            input bit bad_crc);
    bitq_t b;
    int t_end, per, pos;
    b = build_frame(id, ide, ext, rtr, dlc, data, bad_crc);
    // keep the end of the frame away from a period boundary
    forever begin
      t_end = cyc + int'(b.size()) * CPB + 12;
      pos = (t_end - POR) % SC;
      if (pos > 150 && pos < SC - 150) break;
      repeat (CPB) @(negedge clk);
    end
    per = (t_end - POR) / SC;
    if (b.size() > frame_body(id, ide, ext, rtr, dlc, data).size() + 15 + 10) n_stuffed++;
    foreach (b[i]) begin
      CAN_RX = b[i];
      repeat (CPB) @(negedge clk);
    end
    CAN_RX = 1'b1;
    begin
      int nb;
      string t;
      nb = rtr ? 0 : (dlc > 8 ? 8 : dlc);
      t = $sformatf("ID%s%08h %s%1h %s", ide ? "X" : " ", ide ? {id, ext} : 29'(id),
                    rtr ? "R" : "D", 4'(dlc), bad_crc ? "E" : " ");
      view1 = t.toupper();
      view2 = "";
      for (int k = 0; k < 8; k++) begin
        t = (k < nb) ? $sformatf("%02h", data[63 - 8 * k -: 8]) : "--";
        view2 = {view2, t.toupper()};
      end
      view_ext = ide;
      view_err = bad_crc;
    end
    exp_all[per] += b.size();
    if (per < NPER + 2 && id[7:0] < N) exp_mod[per][id[7:0]] += b.size();
    if (bad_crc) begin
      n_crc_err++;
      // the bad frame is reported at the CRC delimiter: ACK, ACK delimiter
      // and end of frame (9 bits) are not part of its length
      exp_all[per] -= 9;
      if (id[7:0] < N) exp_mod[per][id[7:0]] -= 9;
      repeat (12 * CPB) @(negedge clk);        // bus idle before the next frame
    end else begin
      n_valid++;
      if (ide) n_ext++;
      if (rtr) n_rtr++;
      if (id[7:0] >= N) n_outside++;
      repeat (3 * CPB) @(negedge clk);         // intermission
    end
  endtask

  // Waits until the frame-view display has been rewritten twice, then
  // compares it with the last frame sent.
  localparam int unsigned SCREEN = 34 * (CLK_HZ / 20_000 + 8);
  task automatic check_view();
    repeat (2 * SCREEN) @(negedge clk);
    checks += 2;
    if (lcd_f.line(0) != view1 || lcd_f.line(1) != view2) begin
      failures++;
      $display("frame view \"%s\" / \"%s\", expected \"%s\" / \"%s\"",
               lcd_f.line(0), lcd_f.line(1), view1, view2);
    end
    n_view++;
    if (view_ext) n_view_ext++;
    if (view_err) n_view_err++;
  endtask

  // ---------------- UART reports ----------------
  byte rep [$];
  always @(posedge clk) begin
    if (rx_valid) begin
      rep.push_back(rx_data);
      if (rep.size() == 4 + 4 * N + 8) begin
        check_report(n_reports);
        n_reports++;
        rep.delete();
      end
    end
  end

  function automatic void check_report(input int per);
    byte exp [$];
    exp = '{8'h00, 8'h10, 8'h00, 8'h01};
    for (int i = 0; i < N; i++) begin
      exp.push_back(8'(i));
      exp.push_back(8'(exp_mod[per][i] >> 16));
      exp.push_back(8'(exp_mod[per][i] >> 8));
      exp.push_back(8'(exp_mod[per][i]));
    end
    exp.push_back(8'h00); exp.push_back(8'h20); exp.push_back(8'h00); exp.push_back(8'h02);
    exp.push_back(8'(N));
    exp.push_back(8'(exp_all[per] >> 16));
    exp.push_back(8'(exp_all[per] >> 8));
    exp.push_back(8'(exp_all[per]));
    foreach (exp[i]) begin
      checks++;
      if (rep[i] !== exp[i]) begin
        failures++;
        $display("report %0d byte %0d: %h expected %h", per, i, rep[i], exp[i]);
      end
    end
  endfunction

  // ---------------- buttons and LCD ----------------
  int sel_ref = 0;

  task automatic press(input bit up);
    @(negedge clk);
    if (up) KEY[1] = 1'b0; else KEY[0] = 1'b0;
    repeat (20) @(negedge clk);
    KEY = 2'b11;
    repeat (20) @(negedge clk);
    if (up) begin
      n_up++;
      if (sel_ref == N) n_wrap_up++;
      sel_ref = (sel_ref == N) ? 0 : sel_ref + 1;
    end else begin
      n_down++;
      if (sel_ref == 0) n_wrap_down++;
      sel_ref = (sel_ref == 0) ? N : sel_ref - 1;
    end
  endtask

  function automatic string hex6(input longint v);
    string h;
    h = $sformatf("%06h", v[23:0]);
    return {"LOAD 0x", h.toupper(), "   "};
  endfunction

  // The LCD rewrites the screen every ~3,700 clocks; wait for two rewrites.
  task automatic check_lcd(input longint steady_mod [N], input longint steady_all);
    string l1, l2, hn;
    repeat (8000) @(negedge clk);
    l1 = lcd.line(0);
    l2 = lcd.line(1);
    checks += 2;
    if (sel_ref == N) begin
      n_lcd_overall++;
      if (l1 != "OVERALL LOAD    ") begin failures++; $display("LCD line 1 \"%s\"", l1); end
      if (l2 != hex6(steady_all)) begin failures++; $display("LCD line 2 \"%s\" (overall) expected \"%s\"", l2, hex6(steady_all)); end
    end else begin
      n_lcd_module++;
      hn = $sformatf("%02h", 8'(sel_ref));
      if (l1 != $sformatf("MODULE %02d ID %s ", sel_ref, hn.toupper())) begin
        failures++; $display("LCD line 1 \"%s\" for %0d", l1, sel_ref);
      end
      if (l2 != hex6(steady_mod[sel_ref])) begin
        failures++; $display("LCD line 2 \"%s\" for module %0d", l2, sel_ref);
      end
    end
  endtask

  task automatic count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  // ---------------- stimulus ----------------
  initial begin
    longint steady_mod [N];
    longint steady_all;
    logic [10:0] id_a, id_b;
    bitq_t fa, fb;
    KEY = 2'b11; CAN_RX = 1'b1;
    foreach (exp_all[p]) begin
      exp_all[p] = 0;
      for (int i = 0; i < N; i++) exp_mod[p][i] = 0;
    end
    repeat (40 * CPB) @(negedge clk);      // bus idle so the receiver synchronises

    // Phase 1: random traffic for three periods.
    while (cyc < POR + 3 * SC - 2000) begin
      int kind;
      logic [7:0] node;
      kind = int'($urandom_range(0, 19));
      node = ($urandom_range(0, 4) == 0) ? 8'($urandom_range(32, 255)) : 8'($urandom_range(0, 31));
      if (kind == 0)
        send_frame({2'b01, 1'b0, node}, 1'b0, '0, 1'b0, 2, {$urandom, $urandom}, 1'b1);
      else if (kind == 1)
        send_frame({2'($urandom), 1'b0, node}, 1'b1, 18'($urandom), 1'b0,
                   int'($urandom_range(0, 8)), {$urandom, $urandom}, 1'b0);
      else if (kind == 2)
        send_frame({2'($urandom), 1'b0, node}, 1'b0, '0, 1'b1, 1, 64'h0, 1'b0);
      else if (kind == 3)                   // bus arbitrator beacon
        send_frame({2'b01, 1'b1, 8'h01}, 1'b0, '0, 1'b0, 1, 64'h0A00_0000_0000_0000, 1'b0);
      else if (kind == 4)                   // bind request of node 0x07
        send_frame({2'b11, 1'b0, 8'h07}, 1'b0, '0, 1'b0, 7, 64'h0113_3700_4200_2300, 1'b0);
      else if (kind == 5)                   // all-zero frame: many stuff bits
        send_frame({2'b00, 1'b0, 8'h00}, 1'b0, '0, 1'b0, 8, 64'h0, 1'b0);
      else
        send_frame({2'($urandom), 1'b0, node}, 1'b0, '0, 1'b0,
                   int'($urandom_range(0, 8)), {$urandom, $urandom}, 1'b0);
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end

    // Phase 2: the same two frames in every period, buttons and LCD.
    id_a = {2'b01, 1'b0, 8'h03};
    id_b = {2'b00, 1'b0, 8'h1F};
    fa = build_frame(id_a, 1'b0, '0, 1'b0, 4, 64'hDEAD_BEEF_0000_0000);
    fb = build_frame(id_b, 1'b0, '0, 1'b0, 2, 64'h1234_0000_0000_0000);
    foreach (steady_mod[i]) steady_mod[i] = 0;
    steady_mod[3]  = fa.size();
    steady_mod[31] = fb.size();
    steady_all     = fa.size() + fb.size();
    for (int p = 3; p < NPER; p++) begin
      while (cyc < POR + p * SC + 500) @(negedge clk);
      send_frame(id_a, 1'b0, '0, 1'b0, 4, 64'hDEAD_BEEF_0000_0000, 1'b0);
      send_frame(id_b, 1'b0, '0, 1'b0, 2, 64'h1234_0000_0000_0000, 1'b0);
      if (p >= 4) begin
        // the snapshot of period p-1 holds the steady values now
        unique case (p)
          4: begin press(1'b0); check_lcd(steady_mod, steady_all); end      // 0 -> 32
          5: begin press(1'b1); press(1'b1); press(1'b1); press(1'b1);      // 32 -> 3
                   check_lcd(steady_mod, steady_all); end
          6: begin press(1'b1); check_lcd(steady_mod, steady_all); end      // 4 (idle module)
          7: begin for (int i = 0; i < 4; i++) press(1'b0);                 // 4 -> 0
                   press(1'b0); press(1'b1); press(1'b0);                   // 32, 0, 32
                   for (int i = 0; i < 1; i++) press(1'b0);                 // 31
                   check_lcd(steady_mod, steady_all); end
          default: check_view();
        endcase
      end
    end
    while (cyc < POR + NPER * SC + 4 * N * 11 * UCPB + 2000) @(negedge clk);

    // Phase 3 (period NPER): frames of each kind, each followed by a look
    // at the frame-view display; the period's report is checked as well.
    send_frame({2'b10, 1'b0, 8'h42}, 1'b1, 18'h2A5C3, 1'b0, 5, 64'hC0FF_EE12_3400_0000, 1'b0);
    check_view();
    send_frame({2'b01, 1'b0, 8'h09}, 1'b0, '0, 1'b0, 3, 64'h0102_0300_0000_0000, 1'b1);
    check_view();
    send_frame({2'b00, 1'b0, 8'h11}, 1'b0, '0, 1'b1, 6, 64'h0, 1'b0);
    check_view();
    while (cyc < POR + (NPER + 1) * SC + 4 * N * 11 * UCPB + 2000) @(negedge clk);

    count("valid frames", n_valid);
    count("frames with stuff bits", n_stuffed);
    count("CRC-error frames", n_crc_err);
    count("extended frames", n_ext);
    count("remote frames", n_rtr);
    count("frames from nodes outside the modules", n_outside);
    count("UART reports", n_reports);
    count("key up", n_up);
    count("key down", n_down);
    count("wrap 32 -> 0", n_wrap_up);
    count("wrap 0 -> 32", n_wrap_down);
    count("LCD module screens", n_lcd_module);
    count("LCD overall screens", n_lcd_overall);
    count("frame-view screens", n_view);
    count("frame-view screens of extended frames", n_view_ext);
    count("frame-view screens of errored frames", n_view_err);
    checks++;
    if (n_reports != NPER + 1) begin
      failures++; $display("%0d reports, %0d expected", n_reports, NPER + 1);
    end
    checks++;
    if (rx_ferr != 0) begin failures++; $display("%0d UART framing errors", rx_ferr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
