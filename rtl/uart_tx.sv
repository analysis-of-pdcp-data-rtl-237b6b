// uart_tx: asynchronous serial transmitter for the load report link.
//
// Sends each byte as one start bit (0), eight data bits least significant
// first, no parity and STOP_BITS stop bits (1); the line idles at 1. Every
// bit lasts CLKS_PER_BIT clocks: 434 at 50 MHz gives 115,207 baud for the
// 115,200-baud link. Handshake: a byte is taken when in_valid and in_ready
// are both high; in_ready is high only while the transmitter is idle, so a
// byte takes (9 + STOP_BITS) * CLKS_PER_BIT + 1 clocks from one acceptance
// to the next, and the start bit begins on the clock after acceptance.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned STOP_BITS    = 2
) (
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       tx
);

  localparam int unsigned NBITS = 9 + STOP_BITS;   // start + data + stop
  localparam int unsigned CW    = $clog2(CLKS_PER_BIT);

  logic [NBITS-1:0] shreg;       // bits still to send, next one in bit 0
  logic [3:0]       bits_left;
  logic [CW-1:0]    cnt;

  assign in_ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      tx        <= 1'b1;
    end else if (in_ready) begin
      tx <= 1'b1;
      if (in_valid) begin
        shreg     <= {{STOP_BITS{1'b1}}, in_data, 1'b0};
        bits_left <= 4'(NBITS);
        cnt       <= '0;
      end
    end else begin
      tx <= shreg[0];
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        shreg     <= {1'b1, shreg[NBITS-1:1]};
        bits_left <= bits_left - 4'd1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
