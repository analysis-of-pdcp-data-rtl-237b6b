// can_tb_pkg: reference models shared by the CAN monitor testbenches.
//
// crc15_ref() computes the CRC-15-CAN of a bit string by polynomial long
// division (message times x^15 modulo the generator), a formulation
// independent of the shift register in the design. build_frame() produces
// the bus bits of a CAN data or remote frame, standard or extended, with
// stuff bits inserted, followed by CRC delimiter, a dominant ACK slot, ACK
// delimiter and seven end-of-frame bits.
package can_tb_pkg;

  typedef bit bitq_t[$];

  function automatic logic [14:0] crc15_ref(input bitq_t msg);
    bit rem [$];
    bit poly [16] = '{1,1,0,0,0,1,0,1,1,0,0,1,1,0,0,1}; // x^15..x^0 of 0xC599
    logic [14:0] r;
    rem = msg;
    for (int i = 0; i < 15; i++) rem.push_back(1'b0);
    for (int i = 0; i + 15 < rem.size(); i++) begin
      if (rem[i]) for (int j = 0; j < 16; j++) rem[i + j] ^= poly[j];
    end
    for (int i = 0; i < 15; i++) r[14 - i] = rem[rem.size() - 15 + i];
    return r;
  endfunction

  // Bits of the frame from start of frame to the end of the data field.
  function automatic bitq_t frame_body(input logic [10:0] id, input bit ide,
                                       input logic [17:0] ext, input bit rtr,
                                       input int dlc, input logic [63:0] data);
    bitq_t b;
    int nbytes;
    nbytes = rtr ? 0 : (dlc > 8 ? 8 : dlc);
    b.push_back(1'b0);                                  // SOF
    for (int i = 10; i >= 0; i--) b.push_back(id[i]);
    if (!ide) begin
      b.push_back(rtr);
      b.push_back(1'b0);                                // IDE
      b.push_back(1'b0);                                // r0
    end else begin
      b.push_back(1'b1);                                // SRR
      b.push_back(1'b1);                                // IDE
      for (int i = 17; i >= 0; i--) b.push_back(ext[i]);
      b.push_back(rtr);
      b.push_back(1'b0);                                // r1
      b.push_back(1'b0);                                // r0
    end
    for (int i = 3; i >= 0; i--) b.push_back(dlc[i]);
    for (int i = 0; i < nbytes * 8; i++) b.push_back(data[63 - i]);
    return b;
  endfunction

  function automatic bitq_t stuff(input bitq_t b);
    bitq_t s;
    int run;
    bit last;
    run = 0;
    last = 1'b1;
    foreach (b[i]) begin
      s.push_back(b[i]);
      if (i != 0 && b[i] == last) run++;
      else run = 1;
      last = b[i];
      if (run == 5) begin
        s.push_back(!last);
        last = !last;
        run = 1;
      end
    end
    return s;
  endfunction

  // Complete frame on the bus. corrupt_crc flips one CRC bit.
  function automatic bitq_t build_frame(input logic [10:0] id, input bit ide,
                                        input logic [17:0] ext, input bit rtr,
                                        input int dlc, input logic [63:0] data,
                                        input bit corrupt_crc = 1'b0);
    bitq_t body, s;
    logic [14:0] crc;
    body = frame_body(id, ide, ext, rtr, dlc, data);
    crc  = crc15_ref(body);
    if (corrupt_crc) crc[3] = !crc[3];
    for (int i = 14; i >= 0; i--) body.push_back(crc[i]);
    s = stuff(body);
    s.push_back(1'b1);                                  // CRC delimiter
    s.push_back(1'b0);                                  // ACK slot (acknowledged)
    s.push_back(1'b1);                                  // ACK delimiter
    for (int i = 0; i < 7; i++) s.push_back(1'b1);      // end of frame
    return s;
  endfunction

  // PDCP identifier: priority, mode, node id.
  function automatic logic [10:0] pdcp_id(input logic [1:0] prio, input bit mode,
                                          input logic [7:0] node);
    return {prio, mode, node};
  endfunction

endpackage
