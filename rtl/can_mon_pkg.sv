// can_mon_pkg: types and constants shared by the CAN bus-load monitor.
//
// The monitor listens to a CAN bus that carries the Prosthetic Device
// Communication Protocol (PDCP). PDCP splits the 11-bit standard identifier
// into a 2-bit message priority (bits 10:9), a 1-bit message mode (bit 8,
// 1 for the bus arbitrator, 0 for every other node) and an 8-bit node id
// (bits 7:0); pdcp_split() does that split. node_map_t lists the node id
// each monitored module slot watches. The clock, bit-rate, baud-rate
// and module-count defaults are those of the reference board set-up
// (50 MHz FPGA clock, 1 Mbit/s CAN, 115200 baud report link, 32 modules).
package can_mon_pkg;

  localparam int unsigned CLK_HZ_DEFAULT      = 50_000_000;
  localparam int unsigned CAN_BITRATE_DEFAULT = 1_000_000;
  localparam int unsigned BAUD_DEFAULT        = 115_200;
  localparam int unsigned N_MODULES_DEFAULT   = 32;
  // Load counters are 24 bits: three load bytes per report packet.
  localparam int unsigned LOAD_W_DEFAULT      = 24;

  // Node id watched by each module slot: entry n is the PDCP node id whose
  // traffic module n counts. Only the first N_MODULES entries are used.
  typedef logic [255:0][7:0] node_map_t;

  // Default map: module n watches node id n.
  function automatic node_map_t identity_node_map();
    node_map_t m;
    for (int i = 0; i < 256; i++) m[i] = 8'(i);
    return m;
  endfunction

  // CRC-15-CAN generator polynomial x^15+x^14+x^10+x^8+x^7+x^4+x^3+1.
  localparam logic [14:0] CAN_CRC15_POLY = 15'h4599;

  // PDCP message priority encodings.
  typedef enum logic [1:0] {
    PRIO_HIGH   = 2'b00,
    PRIO_NORMAL = 2'b01,
    PRIO_LOW    = 2'b10,
    PRIO_BIND   = 2'b11
  } pdcp_prio_e;

  typedef struct packed {
    pdcp_prio_e  prio;
    logic        mode;      // 1: bus arbitrator, 0: any other node
    logic [7:0]  node_id;
  } pdcp_id_t;

  // One received (or aborted) CAN frame.
  typedef struct packed {
    logic        error;     // stuff, form or CRC error: frame not valid
    logic        id_valid;  // the 11-bit base identifier was received
    logic        ide;       // extended (29-bit) identifier format
    logic        rtr;       // remote frame
    logic [28:0] id;        // base id in [10:0]; extended: {base, ext} in [28:0]
    logic [3:0]  dlc;
    logic [63:0] data;      // first data byte in [63:56]
    logic [7:0]  bit_len;   // bus bit times from SOF to last bit, stuff bits included
    pdcp_id_t    pdcp;      // PDCP view of the base identifier
  } can_frame_t;

  function automatic pdcp_id_t pdcp_split(input logic [10:0] std_id);
    pdcp_id_t p;
    p.prio    = pdcp_prio_e'(std_id[10:9]);
    p.mode    = std_id[8];
    p.node_id = std_id[7:0];
    return p;
  endfunction

endpackage
