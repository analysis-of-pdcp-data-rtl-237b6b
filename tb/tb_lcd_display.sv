// tb_lcd_display: runs the LCD driver into an HD44780 model and checks the
// initialisation commands, the text shown for a module and for the overall
// load (including a change of selection between two screen rewrites), the
// power-up delay, and the enable width, set-up and command gaps against the
// driver's parameters. A second driver runs in the frame view and is fed
// standard, extended, remote and errored frames; its screen text is
// compared with the expected layout.
module tb_lcd_display;
  import can_mon_pkg::*;
  localparam int unsigned PWR = 200, SET = 2, EN = 4, CMD = 20, CLR = 60;

  logic        clk = 1'b0;
  logic        rst;
  logic [5:0]  sel;
  logic [23:0] load;
  logic [7:0]  node_id;
  logic [7:0]  lcd_data;
  logic        lcd_en, lcd_rs, lcd_rw, lcd_on;
  int          checks = 0, failures = 0;
  logic        no_frame = 1'b0;
  can_frame_t  no_f = '0;
  logic [7:0]  f_data;
  logic        f_en, f_rs, f_rw, f_on;
  logic        f_done = 1'b0;
  can_frame_t  f;

  lcd_display #(.MAX_SEL(32), .LOAD_W(24), .POWERUP_CYCLES(PWR), .SETUP_CYCLES(SET),
                .EN_CYCLES(EN), .CMD_CYCLES(CMD), .CLEAR_CYCLES(CLR)) dut (
    .clk, .rst, .sel, .load, .node_id, .frame_done(no_frame), .frame(no_f),
    .lcd_data, .lcd_en, .lcd_rs, .lcd_rw, .lcd_on
  );
  hd44780_model lcd (.clk, .data(lcd_data), .en(lcd_en), .rs(lcd_rs), .rw(lcd_rw));

  lcd_display #(.MAX_SEL(32), .LOAD_W(24), .POWERUP_CYCLES(PWR), .SETUP_CYCLES(SET),
                .EN_CYCLES(EN), .CMD_CYCLES(CMD), .CLEAR_CYCLES(CLR),
                .SHOW_FRAMES(1'b1)) dut_f (
    .clk, .rst, .sel, .load, .node_id, .frame_done(f_done), .frame(f),
    .lcd_data(f_data), .lcd_en(f_en), .lcd_rs(f_rs), .lcd_rw(f_rw), .lcd_on(f_on)
  );
  hd44780_model lcd_f (.clk, .data(f_data), .en(f_en), .rs(f_rs), .rw(f_rw));

  // Hands one frame to the frame-view driver; the rest of the struct is
  // filled with junk that must not show.
  task automatic send_frame(input logic ide, input logic [28:0] id, input logic rtr,
                            input logic [3:0] dlc, input logic [63:0] data, input logic err);
    f          = '0;
    f.ide      = ide;
    f.id       = id;
    f.rtr      = rtr;
    f.dlc      = dlc;
    f.data     = data;
    f.error    = err;
    f.id_valid = 1'b1;
    f.bit_len  = 8'($urandom);
    @(negedge clk); f_done = 1'b1;
    @(negedge clk); f_done = 1'b0;
    f = '0;
  endtask

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_str(input string what, input string got, input string exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: \"%s\" expected \"%s\"", what, got, exp);
    end
  endtask

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: %0d expected %0d", what, got, exp);
    end
  endtask

  // One screen rewrite: 2 commands + 32 characters, each write at most
  // SET + EN + CMD + a few clocks.
  localparam int unsigned SCREEN = 34 * (SET + EN + CMD + 4);

  int first_en = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (lcd_en && first_en < 0) first_en = cyc;
  end

  initial begin
    rst = 1'b1; sel = 6'd5; load = 24'h0F4240; node_id = 8'h45;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    repeat (PWR + CLR + 4 * (SET + EN + CMD + 4) + 2 * SCREEN) @(negedge clk);
    check_int("power-up delay", (first_en >= PWR && first_en <= PWR + SET + 5) ? 1 : 0, 1);
    check_int("init 0", lcd.cmds[0], 8'h38);
    check_int("init 1", lcd.cmds[1], 8'h0C);
    check_int("init 2", lcd.cmds[2], 8'h01);
    check_int("init 3", lcd.cmds[3], 8'h06);
    check_int("line 1 address", lcd.cmds[4], 8'h80);
    check_int("line 2 address", lcd.cmds[5], 8'hC0);
    check_str("module line 1", lcd.line(0), "MODULE 05 ID 45 ");
    check_str("module line 2", lcd.line(1), "LOAD 0x0F4240   ");
    check_str("frame view before any frame, line 1", lcd_f.line(0), "NO CAN FRAME    ");
    check_str("frame view before any frame, line 2", lcd_f.line(1), "                ");
    send_frame(1'b0, 29'h123, 1'b0, 4'd3, 64'hAABBCC00_00000000, 1'b0);
    sel = 6'd32; load = 24'h00ABCD;
    repeat (2 * SCREEN) @(negedge clk);
    check_str("overall line 1", lcd.line(0), "OVERALL LOAD    ");
    check_str("overall line 2", lcd.line(1), "LOAD 0x00ABCD   ");
    check_str("standard frame line 1", lcd_f.line(0), "ID 00000123 D3  ");
    check_str("standard frame line 2", lcd_f.line(1), "AABBCC----------");
    send_frame(1'b1, 29'h1ABCDEF0, 1'b1, 4'd2, 64'h0, 1'b0);
    sel = 6'd17; load = 24'hFFFFFF; node_id = 8'hA7;
    repeat (2 * SCREEN) @(negedge clk);
    check_str("module 17 line 1", lcd.line(0), "MODULE 17 ID A7 ");
    check_str("module 17 line 2", lcd.line(1), "LOAD 0xFFFFFF   ");
    check_str("remote extended frame line 1", lcd_f.line(0), "IDX1ABCDEF0 R2  ");
    check_str("remote extended frame line 2", lcd_f.line(1), "----------------");
    send_frame(1'b0, 29'h7FF, 1'b0, 4'd12, 64'h01234567_89ABCDEF, 1'b0);
    repeat (2 * SCREEN) @(negedge clk);
    check_str("dlc 12 frame line 1", lcd_f.line(0), "ID 000007FF DC  ");
    check_str("dlc 12 frame line 2", lcd_f.line(1), "0123456789ABCDEF");
    // An errored frame followed at once by a good one: the last one shows.
    send_frame(1'b0, 29'h055, 1'b0, 4'd1, 64'h5A000000_00000000, 1'b1);
    repeat (2 * SCREEN) @(negedge clk);
    check_str("errored frame line 1", lcd_f.line(0), "ID 00000055 D1 E");
    check_str("errored frame line 2", lcd_f.line(1), "5A--------------");
    send_frame(1'b0, 29'h055, 1'b0, 4'd0, 64'h0, 1'b1);
    send_frame(1'b0, 29'h301, 1'b0, 4'd8, 64'hFEDCBA98_76543210, 1'b0);
    repeat (2 * SCREEN) @(negedge clk);
    check_str("last of two frames line 1", lcd_f.line(0), "ID 00000301 D8  ");
    check_str("last of two frames line 2", lcd_f.line(1), "FEDCBA9876543210");
    check_str("load view unchanged by frames", lcd.line(0), "MODULE 17 ID A7 ");
    check_int("enable width", lcd.min_en, EN + 1);
    check_int("set-up", (lcd.min_setup >= SET) ? 1 : 0, 1);
    check_int("gap after clear", (lcd.min_gap_after_clear >= CLR) ? 1 : 0, 1);
    check_int("gap after command", (lcd.min_gap_after_cmd >= CMD) ? 1 : 0, 1);
    check_int("rw never high", lcd.rw_high, 0);
    check_int("power on", int'(lcd_on), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
