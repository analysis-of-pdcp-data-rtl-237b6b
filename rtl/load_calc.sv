// load_calc: CAN bus-load measurement over a fixed sample period.
//
// Bus load is measured in bus bit times. Every frame the receiver reports
// (valid or aborted by an error) adds its length in bit times to the overall
// counter; when the frame's base identifier was received and its PDCP node id
// is one of the watched ones, the same length is added to that module's
// counter. MODULE_NODES[n] is the node id module n watches (node id n by
// default); if two modules watch the same node both count it. At the end of each sample period,
// SAMPLE_CYCLES clocks (one second at the 50 MHz default), all counters are
// copied to the snapshot outputs, cleared, and data_ready is set. data_ready
// stays set until data_ack, which the UART report sequencer gives once it has
// sent the snapshot. A frame that ends in the last cycle of a period still
// counts in that period. Counters saturate at all ones.
//
// At the default 1 Mbit/s a full second of traffic is at most 1,000,000 bit
// times, well inside the 24-bit counters. The snapshot must have been sent
// before the next period ends; an assertion flags a period that ends while
// data_ready is still set.
module load_calc
  import can_mon_pkg::*;
#(
  parameter int unsigned N_MODULES     = 32,
  parameter node_map_t   MODULE_NODES  = identity_node_map(),
  parameter int unsigned LOAD_W        = 24,
  parameter int unsigned SAMPLE_CYCLES = 50_000_000
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              frame_done,   // one cycle per received frame
  input  logic [7:0]        frame_bits,   // bit times of that frame
  input  logic              frame_id_ok,  // the node id below is valid
  input  logic [7:0]        frame_node,   // PDCP node id of that frame
  output logic [LOAD_W-1:0] module_load [N_MODULES],  // snapshot, per module
  output logic [LOAD_W-1:0] overall_load,             // snapshot, whole bus
  output logic              data_ready,
  input  logic              data_ack,
  output logic              period_end    // one-cycle pulse at the end of a period
);

  localparam int unsigned TW = $clog2(SAMPLE_CYCLES);

  logic [TW-1:0]     tick;
  logic [LOAD_W-1:0] cnt_mod [N_MODULES];
  logic [LOAD_W-1:0] cnt_all;
  logic [LOAD_W-1:0] nxt_mod [N_MODULES];
  logic [LOAD_W-1:0] nxt_all;

  function automatic logic [LOAD_W-1:0] sat_add(input logic [LOAD_W-1:0] a,
                                                 input logic [7:0]        b);
    logic [LOAD_W:0] s;
    s = {1'b0, a} + (LOAD_W + 1)'(b);
    return s[LOAD_W] ? '1 : s[LOAD_W-1:0];
  endfunction

  assign period_end = (tick == TW'(SAMPLE_CYCLES - 1));

  // Counter values including the frame that ends this cycle.
  always_comb begin
    nxt_all = frame_done ? sat_add(cnt_all, frame_bits) : cnt_all;
    for (int i = 0; i < N_MODULES; i++) begin
      nxt_mod[i] = (frame_done && frame_id_ok && frame_node == MODULE_NODES[i])
                   ? sat_add(cnt_mod[i], frame_bits) : cnt_mod[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tick         <= '0;
      cnt_all      <= '0;
      overall_load <= '0;
      data_ready   <= 1'b0;
      for (int i = 0; i < N_MODULES; i++) begin
        cnt_mod[i]     <= '0;
        module_load[i] <= '0;
      end
    end else begin
      if (period_end) begin
        tick         <= '0;
        cnt_all      <= '0;
        overall_load <= nxt_all;
        data_ready   <= 1'b1;
        for (int i = 0; i < N_MODULES; i++) begin
          cnt_mod[i]     <= '0;
          module_load[i] <= nxt_mod[i];
        end
      end else begin
        tick    <= tick + 1'b1;
        cnt_all <= nxt_all;
        for (int i = 0; i < N_MODULES; i++) cnt_mod[i] <= nxt_mod[i];
        if (data_ack) data_ready <= 1'b0;
      end
    end
  end

  // The previous snapshot must have been reported before the next one.
  a_report_in_time: assert property (@(posedge clk) disable iff (rst)
                                     period_end |-> !data_ready)
    else $error("load_calc: sample period ended before the last report was sent");

endmodule
