// tb_can_crc15: checks the CRC-15-CAN register against polynomial long
// division on random bit strings of random length, and checks clear.
module tb_can_crc15;
  import can_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst, clear, en, bit_in;
  logic [14:0] crc;
  int          checks = 0, failures = 0;

  can_crc15 dut (.clk, .rst, .clear, .en, .bit_in, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t msg;
    logic [14:0] exp;
    rst = 1'b1; clear = 1'b0; en = 1'b0; bit_in = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 60; t++) begin
      int n;
      n = 1 + int'($urandom_range(0, 120));
      msg.delete();
      for (int i = 0; i < n; i++) msg.push_back(1'($urandom_range(0, 1)));
      @(negedge clk); clear = 1'b1; en = 1'b0;
      @(negedge clk); clear = 1'b0;
      foreach (msg[i]) begin
        en = 1'b1; bit_in = msg[i];
        @(negedge clk);
        // a cycle with en low in between must not change the register
        if (i % 7 == 3) begin
          logic [14:0] hold;
          en = 1'b0; hold = crc; @(negedge clk);
          checks++;
          if (crc !== hold) begin failures++; $display("crc changed without en"); end
        end
      end
      en = 1'b0;
      @(negedge clk);
      exp = crc15_ref(msg);
      checks++;
      if (crc !== exp) begin
        failures++;
        $display("length %0d: crc %h expected %h", n, crc, exp);
      end
    end
    // clear returns the register to zero
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    checks++;
    if (crc !== 15'h0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
