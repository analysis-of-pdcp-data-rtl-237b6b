// tb_load_reporter: gives the sequencer a snapshot and plays the UART side
// with random ready delays, collects the bytes and compares them with the
// report built here from the snapshot: start signal 00 10 00 01, one packet
// (watched node id, load high/middle/low byte) per module, with a module map
// that is not the identity, overall signal
// 00 20 00 02, overall packet. Checks data_ack after the last byte, that
// nothing is sent without data_ready, and a second report with new values.
module tb_load_reporter;
  import can_mon_pkg::*;
  localparam int unsigned N  = 32;
  localparam int unsigned LW = 24;

  function automatic node_map_t tb_map();
    node_map_t m;
    m = identity_node_map();
    for (int i = 0; i < N; i++) m[i] = 8'(8'h40 + i * 5);
    return m;
  endfunction
  localparam node_map_t MAP = tb_map();

  logic          clk = 1'b0;
  logic          rst, data_ready, data_ack, tx_valid, tx_ready, busy;
  logic [7:0]    tx_data;
  logic [LW-1:0] module_load [N];
  logic [LW-1:0] overall_load;
  int            checks = 0, failures = 0;
  byte           got [$];
  int            acks = 0;

  load_reporter #(.N_MODULES(N), .MODULE_NODES(MAP), .LOAD_W(LW)) dut (
    .clk, .rst, .data_ready, .module_load, .overall_load, .data_ack,
    .tx_valid, .tx_data, .tx_ready, .busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // UART stand-in: ready for one cycle after a random delay.
  int wait_cnt = 0;
  always @(posedge clk) begin
    if (tx_valid && tx_ready) got.push_back(tx_data);
    if (data_ack) begin
      acks++;
      data_ready <= 1'b0;
    end
  end
  always @(negedge clk) begin
    if (wait_cnt > 0) begin
      tx_ready = 1'b0; wait_cnt--;
    end else if (tx_ready) begin
      tx_ready = 1'b0; wait_cnt = int'($urandom_range(0, 6));
    end else begin
      tx_ready = 1'b1;
    end
  end

  task automatic run_report();
    byte exp [$];
    exp = '{8'h00, 8'h10, 8'h00, 8'h01};
    for (int i = 0; i < N; i++) begin
      exp.push_back(MAP[i]);
      exp.push_back(module_load[i][23:16]);
      exp.push_back(module_load[i][15:8]);
      exp.push_back(module_load[i][7:0]);
    end
    exp.push_back(8'h00); exp.push_back(8'h20); exp.push_back(8'h00); exp.push_back(8'h02);
    exp.push_back(8'(N));
    exp.push_back(overall_load[23:16]);
    exp.push_back(overall_load[15:8]);
    exp.push_back(overall_load[7:0]);
    got.delete();
    acks = 0;
    @(negedge clk); data_ready = 1'b1;
    while (data_ready) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("%0d bytes sent, %0d expected", got.size(), exp.size());
    end
    foreach (exp[i]) begin
      if (i < got.size()) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++; $display("byte %0d: %h expected %h", i, got[i], exp[i]);
        end
      end
    end
    checks++;
    if (acks != 1) begin failures++; $display("%0d data_ack pulses", acks); end
  endtask

  initial begin
    rst = 1'b1; data_ready = 1'b0; tx_ready = 1'b0;
    foreach (module_load[i]) module_load[i] = LW'($urandom);
    overall_load = 24'h0F4240;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    repeat (50) @(negedge clk);
    checks++;
    if (got.size() != 0 || busy) begin failures++; $display("sent without data_ready"); end
    run_report();
    foreach (module_load[i]) module_load[i] = LW'(i * 1000 + 7);
    overall_load = 24'hABCDEF;
    run_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
