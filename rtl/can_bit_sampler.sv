// can_bit_sampler: bit timing for a receive-only CAN node.
//
// The raw CAN RX line is brought into the clock domain with two flip-flops.
// A bit-time counter runs from 0 to CLKS_PER_BIT-1 continuously. Every
// recessive-to-dominant edge (the only edges CAN uses for synchronisation)
// restarts the counter, so each bit is sampled SAMPLE_AT clocks after the
// edge that started it, and long runs of equal bits are sampled every
// CLKS_PER_BIT clocks. Restarting on every falling edge (hard sync only, no
// limited resynchronisation jump) is this design's simplification; it is
// enough for a listener whose clock is a crystal oscillator.
//
// Timing: bit_valid is a one-cycle pulse carrying the sampled level on
// bit_val; it comes SAMPLE_AT+2 clocks after the edge on rx (two for the
// synchroniser). Logic 1 is recessive, logic 0 dominant.
module can_bit_sampler #(
  parameter int unsigned CLKS_PER_BIT = 50,                       // 50 MHz / 1 Mbit/s
  parameter int unsigned SAMPLE_AT    = (CLKS_PER_BIT * 7) / 10    // sample point ~70 %
) (
  input  logic clk,
  input  logic rst,        // synchronous, active high
  input  logic rx,         // CAN RX line from the transceiver, asynchronous
  output logic bit_valid,
  output logic bit_val
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic          rx_meta, rx_sync, rx_prev;
  logic [CW-1:0] cnt;
  logic          fall;

  assign fall = rx_prev & ~rx_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta   <= 1'b1;
      rx_sync   <= 1'b1;
      rx_prev   <= 1'b1;
      cnt       <= '0;
      bit_valid <= 1'b0;
      bit_val   <= 1'b1;
    end else begin
      rx_meta   <= rx;
      rx_sync   <= rx_meta;
      rx_prev   <= rx_sync;
      bit_valid <= 1'b0;
      if (fall) begin
        cnt <= CW'(1);
      end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
      if (!fall && cnt == CW'(SAMPLE_AT)) begin
        bit_valid <= 1'b1;
        bit_val   <= rx_sync;
      end
    end
  end

  initial begin
    assert (SAMPLE_AT > 0 && SAMPLE_AT < CLKS_PER_BIT)
      else $error("SAMPLE_AT must lie inside the bit time");
  end

endmodule
