// lcd_display: HD44780 character-LCD driver for the selected module's load.
//
// Drives a 2x16 HD44780-compatible display over its 8-bit parallel bus,
// write only (lcd_rw held low, lcd_on held high to power the module). After
// POWERUP_CYCLES it sends the initialisation commands 0x38 (8-bit bus, two
// lines), 0x0C (display on, no cursor), 0x01 (clear) and 0x06 (increment,
// no shift). It then rewrites the whole screen over and over: command 0x80,
// sixteen characters of line 1, command 0xC0, sixteen characters of line 2.
// The selection and the load are latched at the start of each rewrite, so
// one screen never mixes two values.
//   line 1: "MODULE nn ID xx" (nn = sel in decimal, xx = the node id that
//           module watches, in hexadecimal), or "OVERALL LOAD" when
//           sel == MAX_SEL
//   line 2: "LOAD 0x" followed by the load as six hexadecimal digits
// With SHOW_FRAMES set, the screen shows the last CAN frame received
// instead (a bring-up mode: the frame on the display can be compared with
// the frame that was sent):
//   line 1: "ID" , 'X' for an extended frame, the identifier as eight hex
//           digits, then 'D' (data) or 'R' (remote) with the DLC as one hex
//           digit, and 'E' if the frame ended in an error
//   line 2: the data bytes in hex, first byte on the left, "--" for bytes
//           the frame did not carry
//   before the first frame: "NO CAN FRAME" on line 1
// The frame is captured on frame_done and copied to the screen at the start
// of each rewrite like the load. That such a mode exists follows the
// reference board; its layout is this design's choice, as are the screen
// layout and the hexadecimal format of the load view.
//
// Bus timing per write: lcd_rs and lcd_data are set, SETUP_CYCLES later
// lcd_en goes high for EN_CYCLES, and after it falls the driver waits
// CMD_CYCLES (CLEAR_CYCLES after the clear command) before the next write;
// the controller latches the byte on the falling edge of lcd_en. The
// defaults give 100 ns set-up, 500 ns enable, 50 us and 2 ms waits and a
// 50 ms power-up delay at 50 MHz.
module lcd_display
  import can_mon_pkg::*;
#(
  parameter int unsigned MAX_SEL        = 32,
  parameter int unsigned LOAD_W         = 24,
  parameter int unsigned POWERUP_CYCLES = 2_500_000,
  parameter int unsigned SETUP_CYCLES   = 5,
  parameter int unsigned EN_CYCLES      = 25,
  parameter int unsigned CMD_CYCLES     = 2_500,
  parameter int unsigned CLEAR_CYCLES   = 100_000,
  parameter bit          SHOW_FRAMES    = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst,       // synchronous, active high
  input  logic [$clog2(MAX_SEL+1)-1:0] sel,
  input  logic [LOAD_W-1:0]            load,      // load of the selected module
  input  logic [7:0]                   node_id,   // node id that module watches
  input  logic                         frame_done, // frame from the CAN receiver
  input  can_frame_t                   frame,      // (used with SHOW_FRAMES only)
  output logic [7:0]                   lcd_data,
  output logic                         lcd_en,
  output logic                         lcd_rs,    // 0: command, 1: character
  output logic                         lcd_rw,
  output logic                         lcd_on
);

  localparam int unsigned SW         = $clog2(MAX_SEL + 1);
  localparam int unsigned LAST_STEP  = 37;
  localparam int unsigned FIRST_LOOP = 4;

  typedef enum logic [1:0] {ST_WAIT, ST_SETUP, ST_EN} state_e;

  state_e      state;
  logic [31:0] cnt;
  logic [5:0]  step;
  logic [SW-1:0] sel_q;
  logic [23:0] load_q;
  logic [7:0]  node_q;
  can_frame_t  last_f, shown_f;    // last frame received / frame on screen
  logic        have_last, have_shown;

  logic       step_rs;
  logic [7:0] step_byte;

  function automatic logic [7:0] hex_char(input logic [3:0] v);
    return (v < 4'd10) ? 8'h30 + 8'(v) : 8'h41 + 8'(v) - 8'd10;
  endfunction

  // Character at column col of line 1 or line 2.
  function automatic logic [7:0] line_char(input logic second, input logic [3:0] col,
                                           input logic [SW-1:0] s, input logic [23:0] l,
                                           input logic [7:0] n);
    logic [7:0] c;
    logic [7:0] s8;
    c  = " ";
    s8 = 8'(s);
    if (!second) begin
      if (s == SW'(MAX_SEL)) begin
        unique case (col)
          4'd0: c = "O";  4'd1: c = "V";  4'd2: c = "E";  4'd3: c = "R";
          4'd4: c = "A";  4'd5: c = "L";  4'd6: c = "L";  4'd8: c = "L";
          4'd9: c = "O";  4'd10: c = "A"; 4'd11: c = "D";
          default: c = " ";
        endcase
      end else begin
        unique case (col)
          4'd0: c = "M";  4'd1: c = "O";  4'd2: c = "D";  4'd3: c = "U";
          4'd4: c = "L";  4'd5: c = "E";
          4'd7: c = 8'h30 + s8 / 8'd10;
          4'd8: c = 8'h30 + s8 % 8'd10;
          4'd10: c = "I"; 4'd11: c = "D";
          4'd13: c = hex_char(n[7:4]);
          4'd14: c = hex_char(n[3:0]);
          default: c = " ";
        endcase
      end
    end else begin
      unique case (col)
        4'd0: c = "L";  4'd1: c = "O";  4'd2: c = "A";  4'd3: c = "D";
        4'd5: c = "0";  4'd6: c = "x";
        4'd7:  c = hex_char(l[23:20]);
        4'd8:  c = hex_char(l[19:16]);
        4'd9:  c = hex_char(l[15:12]);
        4'd10: c = hex_char(l[11:8]);
        4'd11: c = hex_char(l[7:4]);
        4'd12: c = hex_char(l[3:0]);
        default: c = " ";
      endcase
    end
    return c;
  endfunction

  // Character at column col of line 1 or line 2 in the frame view.
  function automatic logic [7:0] frame_char(input logic second, input logic [3:0] col,
                                            input can_frame_t f, input logic have);
    logic [7:0]  c;
    logic [31:0] id32;
    logic [3:0]  nbytes;
    logic [2:0]  b;
    logic [7:0]  d;
    c      = " ";
    id32   = {3'b000, f.id};
    nbytes = f.rtr ? 4'd0 : (f.dlc > 4'd8 ? 4'd8 : f.dlc);
    b      = col[3:1];
    d      = f.data[8'd63 - 8'(b) * 8'd8 -: 8];
    if (!have) begin
      if (!second) begin
        unique case (col)
          4'd0: c = "N";  4'd1: c = "O";  4'd3: c = "C";  4'd4: c = "A";
          4'd5: c = "N";  4'd7: c = "F";  4'd8: c = "R";  4'd9: c = "A";
          4'd10: c = "M"; 4'd11: c = "E";
          default: c = " ";
        endcase
      end
    end else if (!second) begin
      unique case (col)
        4'd0: c = "I";
        4'd1: c = "D";
        4'd2: c = f.ide ? "X" : " ";
        4'd3, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10:
          c = hex_char(id32[5'd31 - 5'(col - 4'd3) * 5'd4 -: 4]);
        4'd12: c = f.rtr ? "R" : "D";
        4'd13: c = hex_char(f.dlc);
        4'd15: c = f.error ? "E" : " ";
        default: c = " ";
      endcase
    end else begin
      if (4'(b) >= nbytes) c = "-";
      else                 c = hex_char(col[0] ? d[3:0] : d[7:4]);
    end
    return c;
  endfunction

  // What each step of the write program sends.
  always_comb begin
    step_rs   = 1'b0;
    step_byte = 8'h00;
    if (step == 6'd0)      step_byte = 8'h38;
    else if (step == 6'd1) step_byte = 8'h0C;
    else if (step == 6'd2) step_byte = 8'h01;
    else if (step == 6'd3) step_byte = 8'h06;
    else if (step == 6'd4) step_byte = 8'h80;
    else if (step == 6'd21) step_byte = 8'hC0;
    else if (step < 6'd21) begin
      step_rs   = 1'b1;
      step_byte = SHOW_FRAMES ? frame_char(1'b0, 4'(step - 6'd5), shown_f, have_shown)
                              : line_char(1'b0, 4'(step - 6'd5), sel_q, load_q, node_q);
    end else begin
      step_rs   = 1'b1;
      step_byte = SHOW_FRAMES ? frame_char(1'b1, 4'(step - 6'd22), shown_f, have_shown)
                              : line_char(1'b1, 4'(step - 6'd22), sel_q, load_q, node_q);
    end
  end

  assign lcd_rw = 1'b0;
  assign lcd_on = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_WAIT;
      cnt      <= 32'(POWERUP_CYCLES);
      step     <= '0;
      sel_q    <= '0;
      load_q   <= '0;
      node_q   <= '0;
      last_f     <= '0;
      shown_f    <= '0;
      have_last  <= 1'b0;
      have_shown <= 1'b0;
      lcd_data <= '0;
      lcd_en   <= 1'b0;
      lcd_rs   <= 1'b0;
    end else begin
      if (frame_done) begin
        last_f    <= frame;
        have_last <= 1'b1;
      end
      unique case (state)
        ST_WAIT: begin
          if (cnt != 0) begin
            cnt <= cnt - 1;
          end else begin
            if (step == 6'(FIRST_LOOP)) begin
              sel_q  <= sel;
              load_q <= 24'(load);
              node_q <= node_id;
              shown_f    <= last_f;
              have_shown <= have_last;
            end
            state <= ST_SETUP;
            cnt   <= 32'(SETUP_CYCLES);
          end
        end
        ST_SETUP: begin
          lcd_rs   <= step_rs;
          lcd_data <= step_byte;
          if (cnt != 0) begin
            cnt <= cnt - 1;
          end else begin
            lcd_en <= 1'b1;
            state  <= ST_EN;
            cnt    <= 32'(EN_CYCLES);
          end
        end
        ST_EN: begin
          if (cnt != 0) begin
            cnt <= cnt - 1;
          end else begin
            lcd_en <= 1'b0;
            state  <= ST_WAIT;
            cnt    <= (step == 6'd2) ? 32'(CLEAR_CYCLES) : 32'(CMD_CYCLES);
            step   <= (step == 6'(LAST_STEP)) ? 6'(FIRST_LOOP) : step + 6'd1;
          end
        end
        default: state <= ST_WAIT;
      endcase
    end
  end

  initial begin
    assert (LOAD_W <= 24) else $error("the display shows six hexadecimal digits");
    assert (MAX_SEL < 100) else $error("the display shows two decimal digits");
  end

endmodule
