// load_reporter: sends one bus-load snapshot over the UART link.
//
// When data_ready is set the sequencer sends, byte by byte through uart_tx:
//   1. the start signal            00 10 00 01
//   2. for module 0 .. N_MODULES-1: the module's id (the node id it watches,
//      MODULE_NODES[n], which is n by default), then its load in three
//      bytes, most significant first
//   3. the overall-load signal     00 20 00 02
//   4. the overall load packet     N_MODULES, then the load in three bytes
// and then pulses data_ack for one cycle, which clears data_ready in
// load_calc, and waits for the next snapshot. That is 4 + 4*N_MODULES + 8
// bytes per report (140 for 32 modules). The start signal and the
// module-number-first packet layout are those of the reference link; the
// order of the load bytes, the overall-load signal and the overall packet
// layout are this design's choices. The snapshot inputs are read while the
// report is being sent, so they must stay stable until data_ack.
module load_reporter
  import can_mon_pkg::*;
#(
  parameter int unsigned N_MODULES    = 32,
  parameter node_map_t   MODULE_NODES = identity_node_map(),
  parameter int unsigned LOAD_W    = 24
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              data_ready,
  input  logic [LOAD_W-1:0] module_load [N_MODULES],
  input  logic [LOAD_W-1:0] overall_load,
  output logic              data_ack,
  output logic              tx_valid,     // byte stream to uart_tx
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  output logic              busy
);

  localparam int unsigned NBYTES = 4 + 4 * N_MODULES + 8;
  localparam int unsigned BW     = $clog2(NBYTES + 1);
  localparam int unsigned MW     = $clog2(N_MODULES + 3);
  localparam int unsigned IW     = $clog2(N_MODULES);

  logic [BW-1:0] idx;             // byte being offered
  logic [MW-1:0] pkt;             // packet number of that byte
  logic [1:0]    pos;             // byte within the packet
  logic [23:0]   load24;          // load of that packet, zero-extended to 3 bytes

  assign pos = idx[1:0];
  assign pkt = MW'(idx >> 2);     // 0: start, 1..N: modules, N+1: signal, N+2: overall

  always_comb begin
    load24 = '0;
    if (pkt >= MW'(1) && pkt <= MW'(N_MODULES)) load24 = 24'(module_load[IW'(pkt - MW'(1))]);
    else                                        load24 = 24'(overall_load);
  end

  always_comb begin
    tx_data = 8'h00;
    if (pkt == '0) begin
      unique case (pos)
        2'd0: tx_data = 8'h00;
        2'd1: tx_data = 8'h10;
        2'd2: tx_data = 8'h00;
        default: tx_data = 8'h01;
      endcase
    end else if (pkt == MW'(N_MODULES + 1)) begin
      unique case (pos)
        2'd0: tx_data = 8'h00;
        2'd1: tx_data = 8'h20;
        2'd2: tx_data = 8'h00;
        default: tx_data = 8'h02;
      endcase
    end else begin
      unique case (pos)
        2'd0: tx_data = (pkt == MW'(N_MODULES + 2)) ? 8'(N_MODULES)
                                                     : MODULE_NODES[8'(pkt - MW'(1))];
        2'd1: tx_data = load24[23:16];
        2'd2: tx_data = load24[15:8];
        default: tx_data = load24[7:0];
      endcase
    end
  end

  assign tx_valid = busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      idx      <= '0;
      data_ack <= 1'b0;
    end else begin
      data_ack <= 1'b0;
      if (!busy) begin
        if (data_ready && !data_ack) begin
          busy <= 1'b1;
          idx  <= '0;
        end
      end else if (tx_ready) begin
        if (idx == BW'(NBYTES - 1)) begin
          busy     <= 1'b0;
          data_ack <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (LOAD_W <= 24) else $error("load_reporter sends three load bytes");
    assert (N_MODULES >= 2 && N_MODULES < 256) else $error("module numbers are one byte");
  end

endmodule
