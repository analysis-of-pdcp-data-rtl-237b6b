// can_crc15: CRC-15-CAN shift register.
//
// For every bit shifted in, the register moves left one place and, when the
// incoming bit differs from the old bit 14, is XORed with 0x4599. This is
// the serial CRC of the CAN specification; the register starts at zero
// (clear) and is fed the destuffed bits from start of frame to the end of the
// data field. The CRC value of the bits so far is on crc one cycle after the
// last en. clear has priority over en.
module can_crc15
  import can_mon_pkg::*;
(
  input  logic        clk,
  input  logic        rst,     // synchronous, active high
  input  logic        clear,   // restart at zero
  input  logic        en,      // shift in bit_in this cycle
  input  logic        bit_in,
  output logic [14:0] crc
);

  logic crc_next;
  assign crc_next = bit_in ^ crc[14];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      crc <= '0;
    end else if (en) begin
      crc <= {crc[13:0], 1'b0} ^ (crc_next ? CAN_CRC15_POLY : 15'h0);
    end
  end

endmodule
