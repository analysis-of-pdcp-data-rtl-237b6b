// tb_can_frame_rx: feeds bus bit streams built by the reference frame
// generator straight into the frame decoder (one bit every four clocks) and
// checks every reported field against the values the frame was built from:
// the PDCP frames of the reference set-up (bus arbitrator beacon, bind
// request of node 0x07, one-byte message of node 0x05), random standard
// frames with every DLC, remote frames and extended frames. Frames with a
// corrupted CRC and with a broken stuff rule must be reported as errors, and
// the decoder must find the next good frame after the bus has been idle.
module tb_can_frame_rx;
  import can_mon_pkg::*;
  import can_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst, bit_valid, bit_val;
  logic       in_frame, frame_done;
  can_frame_t frame;
  int         checks = 0, failures = 0;
  int         n_done = 0;
  int         n_err_seen = 0;

  can_frame_rx dut (.clk, .rst, .bit_valid, .bit_val, .in_frame, .frame_done, .frame);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (frame_done) n_done++;

  task automatic send_bits(input bitq_t b);
    foreach (b[i]) begin
      @(negedge clk); bit_valid = 1'b1; bit_val = b[i];
      @(negedge clk); bit_valid = 1'b0;
      repeat (2) @(negedge clk);
    end
  endtask

  task automatic idle(input int n);
    bitq_t b;
    for (int i = 0; i < n; i++) b.push_back(1'b1);
    send_bits(b);
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // Send one good frame and check what the decoder reports.
  task automatic good_frame(input logic [10:0] id, input bit ide, input logic [17:0] ext,
                            input bit rtr, input int dlc, input logic [63:0] data);
    bitq_t b;
    int n_prev, nbytes;
    logic [63:0] mask;
    b = build_frame(id, ide, ext, rtr, dlc, data);
    n_prev = n_done;
    send_bits(b);
    repeat (2) @(negedge clk);
    nbytes = rtr ? 0 : (dlc > 8 ? 8 : dlc);
    mask = (nbytes == 0) ? 64'h0 : ~(64'hFFFF_FFFF_FFFF_FFFF >> (nbytes * 8));
    check("frames reported", 64'(n_done - n_prev), 64'd1);
    check("error", 64'(frame.error), 64'd0);
    check("id_valid", 64'(frame.id_valid), 64'd1);
    check("ide", 64'(frame.ide), 64'(ide));
    check("rtr", 64'(frame.rtr), 64'(rtr));
    check("id", 64'(frame.id), ide ? 64'({id, ext}) : 64'(id));
    check("dlc", 64'(frame.dlc), 64'(dlc));
    check("data", frame.data, data & mask);
    check("bit_len", 64'(frame.bit_len), 64'(b.size()));
    check("pdcp prio", 64'(frame.pdcp.prio), 64'(id[10:9]));
    check("pdcp mode", 64'(frame.pdcp.mode), 64'(id[8]));
    check("pdcp node", 64'(frame.pdcp.node_id), 64'(id[7:0]));
    idle(3);
  endtask

  initial begin
    bitq_t b;
    int n_prev;
    rst = 1'b1; bit_valid = 1'b0; bit_val = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // the decoder needs to see an idle bus first; a dominant bit before
    // that must not start a frame
    send_bits('{1'b0, 1'b1, 1'b0});
    check("no frame n_prev idle", 64'(in_frame), 64'd0);
    idle(11);

    // PDCP frames of the reference set-up
    good_frame(pdcp_id(2'b01, 1'b1, 8'h01), 1'b0, '0, 1'b0, 1, 64'h0A00_0000_0000_0000);
    good_frame(pdcp_id(2'b11, 1'b0, 8'h07), 1'b0, '0, 1'b0, 7, 64'h0113_3700_4200_2300);
    good_frame(pdcp_id(2'b00, 1'b0, 8'h05), 1'b0, '0, 1'b0, 1, 64'h1100_0000_0000_0000);
    // identifier made of long runs: stuff bits in the arbitration field
    good_frame(11'h000, 1'b0, '0, 1'b0, 0, 64'h0);
    good_frame(11'h7FF, 1'b0, '0, 1'b0, 8, 64'hFFFF_FFFF_0000_0000);

    for (int t = 0; t < 40; t++) begin
      good_frame(11'($urandom), 1'b0, '0, 1'($urandom_range(0, 5) == 0),
                 int'($urandom_range(0, 15)), {$urandom, $urandom});
    end
    for (int t = 0; t < 6; t++) begin
      good_frame(11'($urandom), 1'b1, 18'($urandom), 1'($urandom_range(0, 3) == 0),
                 int'($urandom_range(0, 8)), {$urandom, $urandom});
    end

    // CRC error
    b = build_frame(pdcp_id(2'b01, 1'b0, 8'h03), 1'b0, '0, 1'b0, 2, 64'hA5A5_0000_0000_0000, 1'b1);
    n_prev = n_done;
    send_bits(b);
    repeat (2) @(negedge clk);
    check("crc error frames reported", 64'(n_done - n_prev), 64'd1);
    check("crc error flagged", 64'(frame.error), 64'd1);
    check("crc error node", 64'(frame.pdcp.node_id), 64'h03);
    idle(11);
    good_frame(pdcp_id(2'b10, 1'b0, 8'h09), 1'b0, '0, 1'b0, 3, 64'h1234_5600_0000_0000);

    // stuff error: six dominant bits inside the identifier
    b = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1};
    n_prev = n_done;
    send_bits(b);
    repeat (2) @(negedge clk);
    check("stuff error frames reported", 64'(n_done - n_prev), 64'd1);
    check("stuff error flagged", 64'(frame.error), 64'd1);
    check("stuff error length", 64'(frame.bit_len), 64'd8);
    check("stuff error before id", 64'(frame.id_valid), 64'd0);
    idle(11);
    good_frame(pdcp_id(2'b01, 1'b1, 8'h01), 1'b0, '0, 1'b0, 1, 64'h0A00_0000_0000_0000);

    // form error: dominant bit in the end of frame
    b = build_frame(pdcp_id(2'b01, 1'b0, 8'h04), 1'b0, '0, 1'b0, 1, 64'h5500_0000_0000_0000);
    b[b.size() - 3] = 1'b0;
    n_prev = n_done;
    send_bits(b);
    repeat (2) @(negedge clk);
    check("form error flagged", 64'(frame.error), 64'd1);
    check("form error id kept", 64'(frame.id_valid), 64'd1);
    idle(11);
    good_frame(pdcp_id(2'b00, 1'b0, 8'h1F), 1'b0, '0, 1'b0, 2, 64'hBEEF_0000_0000_0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
