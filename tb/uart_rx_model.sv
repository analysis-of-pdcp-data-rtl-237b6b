// uart_rx_model: testbench receiver for the report link.
//
// Waits for a falling edge on the line, checks the start bit half a bit time
// later, samples eight data bits (least significant first) in the middle of
// their bit times and checks both stop bits, then pulses byte_valid with the
// byte. framing_errors counts bad start or stop bits.
module uart_rx_model #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic       clk,
  input  logic       line,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output int         framing_errors
);
  initial begin
    byte_valid = 1'b0;
    byte_data = '0;
    framing_errors = 0;
    forever begin
      @(negedge line);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      if (line !== 1'b0) framing_errors++;
      for (int i = 0; i < 8; i++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        byte_data[i] = line;
      end
      for (int i = 0; i < 2; i++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        if (line !== 1'b1) framing_errors++;
      end
      byte_valid = 1'b1;
      @(posedge clk);
      byte_valid = 1'b0;
    end
  end
endmodule
