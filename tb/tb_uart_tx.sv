// tb_uart_tx: sends random bytes, some back to back and some with gaps, and
// checks them with an independent serial receiver: value, start bit, two
// stop bits, idle level, and the number of clocks from one accepted byte to
// the next when the sender keeps in_valid high.
module tb_uart_tx;
  localparam int unsigned CPB = 12;

  logic       clk = 1'b0;
  logic       rst, in_valid, in_ready, tx;
  logic [7:0] in_data;
  logic       rx_valid;
  logic [7:0] rx_data;
  int         rx_ferr;
  int         checks = 0, failures = 0;
  byte        sent [$];

  uart_tx #(.CLKS_PER_BIT(CPB), .STOP_BITS(2)) dut (.clk, .rst, .in_valid, .in_data, .in_ready, .tx);
  uart_rx_model #(.CLKS_PER_BIT(CPB)) mon (.clk, .line(tx), .byte_valid(rx_valid),
                                           .byte_data(rx_data), .framing_errors(rx_ferr));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rx = 0;
  always @(posedge clk) begin
    if (rx_valid) begin
      checks++;
      if (n_rx >= sent.size() || rx_data !== sent[n_rx]) begin
        failures++; $display("byte %0d: got %h", n_rx, rx_data);
      end
      n_rx++;
    end
  end

  int cyc = 0, last_accept = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready && !rst) begin
      if (last_accept >= 0 && cyc - last_accept < (11 * CPB)) begin
        checks++; failures++;
        $display("byte accepted %0d clocks after the previous one", cyc - last_accept);
      end
      if (last_accept >= 0 && cyc - last_accept == 11 * CPB + 1) checks++;
      last_accept = cyc;
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    checks++;
    if (tx !== 1'b1) begin failures++; $display("line not idle high"); end
    for (int i = 0; i < 40; i++) begin
      in_valid = 1'b1;
      in_data  = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(in_data);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      if (i % 5 == 4) begin
        in_valid = 1'b0;
        repeat ($urandom_range(1, 3 * CPB)) @(negedge clk);
      end
    end
    in_valid = 1'b0;
    repeat (14 * CPB) @(negedge clk);
    checks++;
    if (n_rx != 40) begin failures++; $display("%0d bytes received", n_rx); end
    checks++;
    if (rx_ferr != 0) begin failures++; $display("%0d framing errors", rx_ferr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
