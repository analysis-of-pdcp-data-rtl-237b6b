// can_frame_rx: receive-only CAN frame decoder.
//
// Takes the sampled bus bits from can_bit_sampler and follows a CAN data or
// remote frame from start of frame to end of frame. Bits from start of frame
// to the end of the CRC sequence are destuffed (after five equal bits the
// next one must differ and is dropped). The decoder collects the identifier
// (standard 11-bit or extended 29-bit), RTR, DLC and up to eight data bytes,
// runs the destuffed bits through the CRC-15-CAN register and compares the
// result with the received CRC sequence. The 11-bit base identifier is also
// returned split into the PDCP priority, mode and node-id fields.
//
// The node never drives the bus: it does not acknowledge frames and sends no
// error frames. After a stuff, form or CRC error it reports the frame with
// error set and then waits for eleven recessive bits (bus idle) before it
// looks for the next start of frame; it starts in that waiting state after
// reset, so it can be attached to a running bus.
//
// Timing: frame_done pulses for one cycle after the last end-of-frame bit
// (or after the bit that showed an error); frame holds the result until the
// next frame_done. frame.bit_len counts the bus bit times the frame took,
// stuff bits included, up to and including that bit. A valid frame must end
// with seven recessive end-of-frame bits; the ACK slot is not checked.
module can_frame_rx
  import can_mon_pkg::*;
(
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       bit_valid,  // one sampled bus bit
  input  logic       bit_val,
  output logic       in_frame,   // between start of frame and frame_done
  output logic       frame_done,
  output can_frame_t frame
);

  typedef enum logic [1:0] {S_WAIT_IDLE, S_IDLE, S_FRAME, S_TAIL} state_e;

  typedef enum logic [3:0] {
    F_ID, F_SRR_RTR, F_IDE, F_IDEXT, F_RTR, F_R1, F_R0, F_DLC, F_DATA, F_CRC, F_CRCDEL
  } field_e;

  state_e      state;
  field_e      field;
  logic [6:0]  fcnt;        // bit index within the current field
  logic [3:0]  idle_cnt;    // consecutive recessive bits while waiting for idle
  logic [2:0]  run_cnt;     // equal bits in a row, for destuffing
  logic        last_bit;
  logic [7:0]  bit_len;
  logic [10:0] base_id;
  logic [17:0] ext_id;
  logic        ide, rtr, id_valid;
  logic [3:0]  dlc;
  logic [63:0] data_sr;
  logic [14:0] crc_rx;
  logic [14:0] crc_calc;
  logic        crc_en, crc_clear;
  logic [3:0]  nbytes;

  can_crc15 u_crc (
    .clk    (clk),
    .rst    (rst),
    .clear  (crc_clear),
    .en     (crc_en),
    .bit_in (bit_val),
    .crc    (crc_calc)
  );

  // Data bytes carried by the frame being received.
  always_comb begin
    if (rtr)             nbytes = 4'd0;
    else if (dlc > 4'd8) nbytes = 4'd8;
    else                 nbytes = dlc;
  end

  logic is_stuff, stuff_err, field_bit;
  assign is_stuff  = (state == S_FRAME) && (run_cnt == 3'd5);
  assign stuff_err = is_stuff && (bit_val == last_bit);
  assign field_bit = bit_valid && (state == S_FRAME) && !is_stuff;

  assign crc_clear = bit_valid && (state == S_IDLE) && !bit_val;
  assign crc_en    = field_bit && (field inside {F_ID, F_SRR_RTR, F_IDE, F_IDEXT, F_RTR,
                                                 F_R1, F_R0, F_DLC, F_DATA});
  assign in_frame  = (state == S_FRAME) || (state == S_TAIL);

  logic [7:0] bit_len_next;
  assign bit_len_next = (bit_len == 8'hFF) ? bit_len : bit_len + 8'd1;

  // Finish the frame: report it and choose the next state.
  task automatic finish(input logic err, input logic [7:0] len);
    frame_done     <= 1'b1;
    frame.error    <= err;
    frame.id_valid <= id_valid;
    frame.ide      <= ide;
    frame.rtr      <= rtr;
    frame.id       <= ide ? {base_id, ext_id} : {18'd0, base_id};
    frame.dlc      <= dlc;
    frame.data     <= data_sr << (7'd64 - 7'(nbytes) * 7'd8);
    frame.bit_len  <= len;
    frame.pdcp     <= pdcp_split(base_id);
    state          <= err ? S_WAIT_IDLE : S_IDLE;
    idle_cnt       <= '0;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT_IDLE;
      field      <= F_ID;
      fcnt       <= '0;
      idle_cnt   <= '0;
      run_cnt    <= '0;
      last_bit   <= 1'b1;
      bit_len    <= '0;
      base_id    <= '0;
      ext_id     <= '0;
      ide        <= 1'b0;
      rtr        <= 1'b0;
      id_valid   <= 1'b0;
      dlc        <= '0;
      data_sr    <= '0;
      crc_rx     <= '0;
      frame_done <= 1'b0;
      frame      <= '0;
    end else begin
      frame_done <= 1'b0;
      if (bit_valid) begin
        unique case (state)
          S_WAIT_IDLE: begin
            if (!bit_val)                idle_cnt <= '0;
            else if (idle_cnt == 4'd10)  state    <= S_IDLE;
            else                         idle_cnt <= idle_cnt + 4'd1;
          end

          S_IDLE: begin
            if (!bit_val) begin          // start of frame
              state    <= S_FRAME;
              field    <= F_ID;
              fcnt     <= '0;
              run_cnt  <= 3'd1;
              last_bit <= 1'b0;
              bit_len  <= 8'd1;
              ide      <= 1'b0;
              rtr      <= 1'b0;
              id_valid <= 1'b0;
              dlc      <= '0;
              data_sr  <= '0;
            end
          end

          S_FRAME: begin
            bit_len <= bit_len_next;
            if (is_stuff) begin
              if (stuff_err) begin
                finish(1'b1, bit_len_next);
              end else begin
                run_cnt  <= 3'd1;
                last_bit <= bit_val;
              end
            end else begin
              run_cnt  <= (bit_val == last_bit) ? run_cnt + 3'd1 : 3'd1;
              last_bit <= bit_val;
              fcnt     <= fcnt + 7'd1;
              unique case (field)
                F_ID: begin
                  base_id <= {base_id[9:0], bit_val};
                  if (fcnt == 7'd10) begin
                    id_valid <= 1'b1;
                    field    <= F_SRR_RTR;
                    fcnt     <= '0;
                  end
                end
                F_SRR_RTR: begin          // RTR of a standard frame, SRR of an extended one
                  rtr   <= bit_val;
                  field <= F_IDE;
                end
                F_IDE: begin
                  ide   <= bit_val;
                  field <= bit_val ? F_IDEXT : F_R0;
                  fcnt  <= '0;
                end
                F_IDEXT: begin
                  ext_id <= {ext_id[16:0], bit_val};
                  if (fcnt == 7'd17) field <= F_RTR;
                end
                F_RTR: begin
                  rtr   <= bit_val;
                  field <= F_R1;
                end
                F_R1: field <= F_R0;
                F_R0: begin
                  field <= F_DLC;
                  fcnt  <= '0;
                end
                F_DLC: begin
                  dlc <= {dlc[2:0], bit_val};
                  if (fcnt == 7'd3) begin
                    fcnt <= '0;
                    // rtr and the first three DLC bits are final here
                    if (!rtr && {dlc[2:0], bit_val} != 4'd0) field <= F_DATA;
                    else                                       field <= F_CRC;
                  end
                end
                F_DATA: begin
                  data_sr <= {data_sr[62:0], bit_val};
                  if (fcnt == 7'(nbytes) * 7'd8 - 7'd1) begin
                    field <= F_CRC;
                    fcnt  <= '0;
                  end
                end
                F_CRC: begin
                  crc_rx <= {crc_rx[13:0], bit_val};
                  if (fcnt == 7'd14) field <= F_CRCDEL;
                end
                F_CRCDEL: begin
                  if (!bit_val || crc_rx != crc_calc) begin
                    finish(1'b1, bit_len_next);
                  end else begin
                    state <= S_TAIL;
                    fcnt  <= '0;
                  end
                end
                default: finish(1'b1, bit_len_next);
              endcase
            end
          end

          S_TAIL: begin                 // ACK slot, ACK delimiter, 7 EOF bits
            bit_len <= bit_len_next;
            fcnt    <= fcnt + 7'd1;
            if (fcnt != 7'd0 && !bit_val) begin
              finish(1'b1, bit_len_next);
            end else if (fcnt == 7'd8) begin
              finish(1'b0, bit_len_next);
            end
          end

          default: state <= S_WAIT_IDLE;
        endcase
      end
    end
  end

endmodule
