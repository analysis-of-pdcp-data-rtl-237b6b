// tb_load_calc: random frame reports against a reference count kept in the
// testbench, with a module-to-node map that is not the identity and has two
// modules watching the same node. Checks the snapshot of every module and of the whole bus at
// the end of each sample period, that the period is exactly SAMPLE_CYCLES
// clocks, that frames of nodes outside the module range and frames whose
// identifier never arrived count only in the overall load, that a frame in
// the last cycle of a period counts in that period, that data_ack clears
// data_ready, and that counters saturate.
module tb_load_calc;
  import can_mon_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned LW = 12;
  localparam int unsigned SC = 400;

  // module i watches node 2i+1; module 5 watches node 3 as well as module 1
  function automatic node_map_t tb_map();
    node_map_t m;
    m = identity_node_map();
    for (int i = 0; i < N; i++) m[i] = 8'(2 * i + 1);
    m[5] = 8'd3;
    return m;
  endfunction
  localparam node_map_t MAP = tb_map();

  logic          clk = 1'b0;
  logic          rst, frame_done, frame_id_ok, data_ack, data_ready, period_end;
  logic [7:0]    frame_bits, frame_node;
  logic [LW-1:0] module_load [N];
  logic [LW-1:0] overall_load;
  int            checks = 0, failures = 0;

  load_calc #(.N_MODULES(N), .MODULE_NODES(MAP), .LOAD_W(LW), .SAMPLE_CYCLES(SC)) dut (
    .clk, .rst, .frame_done, .frame_bits, .frame_id_ok, .frame_node,
    .module_load, .overall_load, .data_ready, .data_ack, .period_end
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_mod [N];
  longint ref_all;
  int     cyc = 0, last_end = -1, periods = 0;
  bit     saturate_phase = 1'b0;

  function automatic longint sat(input longint v);
    return (v > (2 ** LW) - 1) ? (2 ** LW) - 1 : v;
  endfunction

  // Reference model and checks, sampled at the clock edge.
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (frame_done) begin
        ref_all = sat(ref_all + frame_bits);
        for (int i = 0; i < N; i++)
          if (frame_id_ok && frame_node == MAP[i]) ref_mod[i] = sat(ref_mod[i] + frame_bits);
      end
      if (period_end) begin
        checks++;
        if (last_end >= 0 && cyc - last_end != SC) begin
          failures++; $display("period of %0d clocks", cyc - last_end);
        end
        last_end = cyc;
        periods++;
        #1;
        checks++;
        if (!data_ready) begin failures++; $display("data_ready not set"); end
        checks++;
        if (overall_load != LW'(ref_all)) begin
          failures++; $display("overall %0d expected %0d", overall_load, ref_all);
        end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (module_load[i] != LW'(ref_mod[i])) begin
            failures++; $display("module %0d: %0d expected %0d", i, module_load[i], ref_mod[i]);
          end
          ref_mod[i] = 0;
        end
        ref_all = 0;
      end
    end
  end

  initial begin
    rst = 1'b1; frame_done = 1'b0; frame_id_ok = 1'b0; frame_bits = '0; frame_node = '0;
    data_ack = 1'b0;
    ref_all = 0;
    foreach (ref_mod[i]) ref_mod[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int p = 0; p < 6; p++) begin
      // random traffic; in period 3 force a frame in the last cycle
      for (int c = 0; c < SC; c++) begin
        frame_done  = ($urandom_range(0, 9) == 0) || (p == 3 && dut.period_end);
        frame_bits  = 8'($urandom_range(44, 160));
        frame_id_ok = ($urandom_range(0, 7) != 0);
        frame_node  = 8'($urandom_range(0, 2 * N + 3));
        if (p == 5) begin             // heavy traffic on module 2: saturation
          frame_done = 1'b1; frame_bits = 8'd200; frame_id_ok = 1'b1; frame_node = 8'd5;
        end
        if (data_ready && $urandom_range(0, 19) == 0) data_ack = 1'b1;
        @(negedge clk);
        if (data_ack) begin
          data_ack = 1'b0;
          checks++;
          if (data_ready) begin failures++; $display("data_ack did not clear data_ready"); end
        end
      end
    end
    checks++;
    if (periods < 5) begin failures++; $display("only %0d periods", periods); end
    checks++;
    if (module_load[2] != '1 || overall_load != '1) begin
      failures++; $display("no saturation: %0d %0d", module_load[2], overall_load);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
