// tb_can_bit_sampler: drives random CAN-like bit streams (never more than
// five equal bits in a row, as after stuffing) onto rx with a transmitter
// whose bit time is 0.4 % shorter or longer than the receiver's, and
// checks that every bit is sampled exactly once, with the right value, and
// at the sample point after the edge that started the frame.
module tb_can_bit_sampler;
  localparam int unsigned CPB = 50;

  logic clk = 1'b0;
  logic rst, rx, bit_valid, bit_val;
  int   checks = 0, failures = 0;
  bit   sent [$];
  int   got = 0;

  can_bit_sampler #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rx, .bit_valid, .bit_val);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare samples with the bits sent, in order, while a stream is running.
  bit   active = 1'b0;
  int   sof_cycle, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bit_valid && active) begin
      checks++;
      if (got >= sent.size()) begin
        failures++; $display("extra sample");
      end else if (bit_val !== sent[got]) begin
        failures++; $display("bit %0d: got %0b expected %0b", got, bit_val, sent[got]);
      end
      if (got == 0) begin
        // synchroniser and edge register (3) + SAMPLE_AT after the SOF edge
        checks++;
        if (cyc - sof_cycle != 3 + (CPB * 7) / 10) begin
          failures++; $display("first sample %0d clocks after SOF", cyc - sof_cycle);
        end
      end
      got++;
    end
  end

  // period is the transmitter's bit time in time units (one clock is 10)
  task automatic send_stream(input int period, input int nbits);
    bit last;
    int run;
    sent.delete();
    got = 0;
    last = 1'b1; run = 0;
    for (int i = 0; i < nbits; i++) begin
      bit b;
      b = (i == 0) ? 1'b0 : 1'($urandom_range(0, 1));
      if (run == 5) b = !last;
      run = (i != 0 && b == last) ? run + 1 : 1;
      last = b;
      sent.push_back(b);
    end
    active = 1'b1;
    @(negedge clk);
    foreach (sent[i]) begin
      rx = sent[i];
      if (i == 0) sof_cycle = cyc;
      #(period);
    end
    active = 1'b0;
    rx = 1'b1;
    repeat (CPB) @(negedge clk);
    checks++;
    if (got != nbits) begin
      failures++; $display("period %0d: %0d samples for %0d bits", period, got, nbits);
    end
    repeat (3 * CPB) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; rx = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (2 * CPB) @(negedge clk);
    send_stream(CPB * 10, 150);
    send_stream(CPB * 10 - 2, 150);
    send_stream(CPB * 10 + 2, 150);
    send_stream(CPB * 10, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
