// can_load_monitor: FPGA CAN bus-load monitor (top level).
//
// A receive-only listener on a CAN bus that carries PDCP traffic. It
// measures how many bus bit times every second are taken by all frames
// together and by each of 32 modules (module n watches the PDCP node id
// MODULE_NODES[n], by default n; the node id is the low eight bits of the
// 11-bit identifier), and reports the numbers once per second over a 115200-baud UART
// line to a microcontroller that builds statistics from them. A two-line
// character LCD shows the load of one module, or the overall load; two push
// buttons step through the 33 choices.
//
//   CAN_RX -> can_bit_sampler -> can_frame_rx -> load_calc -> load_reporter
//          -> uart_tx -> TxDWire
//   KEY[1:0] -> module_select -> lcd_display -> LCD_*
//
// Ports follow the reference board's pin list: CLOCK_50, KEY[1:0] (active
// low, KEY[1] steps up and KEY[0] down), TxDWire, and the LCD's LCD_DATA,
// LCD_EN, LCD_RS, LCD_RW and LCD_POWER. CAN_RX is the receive line of the
// CAN transceiver. There is no reset pin: a power-on counter holds the logic
// in reset for the first 16 clocks, relying on the FPGA's register
// initialisation (verilator's lint notes this initialised variable as
// PROCASSINIT; that is intended). LCD_RW is always 0 (write only) and
// LCD_POWER always 1 (the display takes its supply from that pin).
//
// Parameters: CLK_HZ, CAN_BITRATE and BAUD set the three clock dividers,
// SAMPLE_CYCLES the sample period (one second by default); the LCD timings
// are derived from CLK_HZ. Smaller values are for simulation. LCD_SHOW_FRAMES
// switches the display from the load view to the last received CAN frame,
// a bring-up mode for checking the receiver against a known sender.
module can_load_monitor
  import can_mon_pkg::*;
#(
  parameter int unsigned CLK_HZ        = CLK_HZ_DEFAULT,
  parameter int unsigned CAN_BITRATE   = CAN_BITRATE_DEFAULT,
  parameter int unsigned BAUD          = BAUD_DEFAULT,
  parameter int unsigned SAMPLE_CYCLES = CLK_HZ,
  parameter int unsigned N_MODULES     = N_MODULES_DEFAULT,
  parameter node_map_t   MODULE_NODES  = identity_node_map(),
  parameter int unsigned LOAD_W        = LOAD_W_DEFAULT,
  parameter bit          LCD_SHOW_FRAMES = 1'b0
) (
  input  logic       CLOCK_50,
  input  logic [1:0] KEY,
  input  logic       CAN_RX,
  output logic       TxDWire,
  output logic [7:0] LCD_DATA,
  output logic       LCD_EN,
  output logic       LCD_RS,
  output logic       LCD_RW,
  output logic       LCD_POWER
);

  localparam int unsigned CAN_CLKS  = CLK_HZ / CAN_BITRATE;
  localparam int unsigned UART_CLKS = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned SW        = $clog2(N_MODULES + 1);

  logic clk;
  assign clk = CLOCK_50;

  // Power-on reset.
  logic [4:0] por_cnt = '0;
  logic       rst;
  assign rst = !por_cnt[4];
  always_ff @(posedge clk) begin
    if (!por_cnt[4]) por_cnt <= por_cnt + 5'd1;
  end

  // CAN reception.
  logic       bit_valid, bit_val;
  logic       in_frame, frame_done;
  can_frame_t frame;

  can_bit_sampler #(.CLKS_PER_BIT(CAN_CLKS)) u_sampler (
    .clk, .rst, .rx(CAN_RX), .bit_valid, .bit_val
  );

  can_frame_rx u_frame (
    .clk, .rst, .bit_valid, .bit_val, .in_frame, .frame_done, .frame
  );

  // Load measurement.
  logic [LOAD_W-1:0] module_load [N_MODULES];
  logic [LOAD_W-1:0] overall_load;
  logic              data_ready, data_ack, period_end;

  load_calc #(
    .N_MODULES(N_MODULES), .MODULE_NODES(MODULE_NODES), .LOAD_W(LOAD_W),
    .SAMPLE_CYCLES(SAMPLE_CYCLES)
  ) u_load (
    .clk, .rst, .frame_done,
    .frame_bits (frame.bit_len),
    .frame_id_ok(frame.id_valid),
    .frame_node (frame.pdcp.node_id),
    .module_load, .overall_load, .data_ready, .data_ack, .period_end
  );

  // UART report.
  logic       tx_valid, tx_ready, rep_busy;
  logic [7:0] tx_data;

  load_reporter #(.N_MODULES(N_MODULES), .MODULE_NODES(MODULE_NODES), .LOAD_W(LOAD_W)) u_report (
    .clk, .rst, .data_ready, .module_load, .overall_load, .data_ack,
    .tx_valid, .tx_data, .tx_ready, .busy(rep_busy)
  );

  uart_tx #(.CLKS_PER_BIT(UART_CLKS), .STOP_BITS(2)) u_uart (
    .clk, .rst, .in_valid(tx_valid), .in_data(tx_data), .in_ready(tx_ready), .tx(TxDWire)
  );

  // Module selection and display.
  logic [SW-1:0]     sel;
  logic [LOAD_W-1:0] shown_load;
  logic [7:0]        shown_node;

  module_select #(.MAX_SEL(N_MODULES)) u_select (
    .clk, .rst, .key_up(!KEY[1]), .key_down(!KEY[0]), .sel
  );

  always_comb begin
    shown_node = MODULE_NODES[8'(sel)];
    if (sel >= SW'(N_MODULES)) shown_load = overall_load;
    else                       shown_load = module_load[$clog2(N_MODULES)'(sel)];
  end

  lcd_display #(
    .MAX_SEL       (N_MODULES),
    .LOAD_W        (LOAD_W),
    .POWERUP_CYCLES(CLK_HZ / 20),
    .SETUP_CYCLES  ((CLK_HZ + 9_999_999) / 10_000_000),
    .EN_CYCLES     ((CLK_HZ + 1_999_999) / 2_000_000),
    .CMD_CYCLES    (CLK_HZ / 20_000),
    .CLEAR_CYCLES  (CLK_HZ / 500),
    .SHOW_FRAMES   (LCD_SHOW_FRAMES)
  ) u_lcd (
    .clk, .rst, .sel, .load(shown_load), .node_id(shown_node), .frame_done, .frame,
    .lcd_data(LCD_DATA), .lcd_en(LCD_EN), .lcd_rs(LCD_RS), .lcd_rw(LCD_RW), .lcd_on(LCD_POWER)
  );

endmodule
