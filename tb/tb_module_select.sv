// tb_module_select: presses the keys in patterns and checks the selection
// against a reference: one step per press however long the key is held,
// wrap from 32 to 0 going up and from 0 to 32 going down, both keys held
// together ignored, and a new press only after both keys are released.
module tb_module_select;
  localparam int unsigned MAX = 32;

  logic       clk = 1'b0;
  logic       rst, key_up, key_down;
  logic [5:0] sel;
  int         checks = 0, failures = 0;
  int         expv = 0;

  module_select #(.MAX_SEL(MAX)) dut (.clk, .rst, .key_up, .key_down, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sel(input string what);
    checks++;
    if (sel !== 6'(expv)) begin
      failures++; $display("%s: sel %0d expected %0d", what, sel, expv);
    end
  endtask

  task automatic press(input bit up, input int hold);
    @(negedge clk);
    key_up = up; key_down = !up;
    repeat (hold) @(negedge clk);
    key_up = 1'b0; key_down = 1'b0;
    repeat (4) @(negedge clk);
    expv = up ? (expv == MAX ? 0 : expv + 1) : (expv == 0 ? MAX : expv - 1);
    expect_sel(up ? "up" : "down");
  endtask

  initial begin
    rst = 1'b1; key_up = 1'b0; key_down = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    repeat (3) @(negedge clk);
    expect_sel("after reset");
    press(1'b0, 5);                      // 0 -> 32
    press(1'b1, 40);                     // 32 -> 0, long hold
    for (int i = 0; i < 35; i++) press(1'b1, int'($urandom_range(1, 20)));
    for (int i = 0; i < 10; i++) press(1'b0, int'($urandom_range(1, 20)));
    // both keys: nothing happens
    @(negedge clk); key_up = 1'b1; key_down = 1'b1;
    repeat (10) @(negedge clk);
    key_up = 1'b0; key_down = 1'b0;
    repeat (4) @(negedge clk);
    expect_sel("both keys");
    // up held, then down added and up released without a gap: one step only
    @(negedge clk); key_up = 1'b1;
    repeat (6) @(negedge clk);
    key_down = 1'b1;
    repeat (3) @(negedge clk);
    key_up = 1'b0;
    repeat (6) @(negedge clk);
    key_down = 1'b0;
    repeat (4) @(negedge clk);
    expv = (expv == MAX) ? 0 : expv + 1;
    expect_sel("held across keys");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
