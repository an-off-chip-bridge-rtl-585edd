// bridge_pkg: constants and byte encodings shared by the off-chip bridge.
//
// The bridge carries network-on-chip streaming words (phits, 37 bits) over a
// byte-wide Ethernet MAC. The payload of every frame is one frame-number
// byte followed by NUM_SLOTS slots of SLOT_BYTES bytes. Inside a slot every
// byte is tagged by its two most significant bits:
//   01cccccc  connection byte: the slot belongs to connection c
//   10nnnnnn  credit byte: n credits returned to connection c
//   111ppppp  first byte of a phit (p = phit bits 36..32), then 4 more bytes
//             with phit bits 31..0, most significant byte first
//   00xxxxxx  garbage byte, nothing to send
// These encodings, the 37-bit phit, 6-bit connection numbers, 6-bit credit
// values, 64-deep FIFOs and the 12-port configuration follow the document.
// The default frame shape (14 slots of 100 bytes) is that of its streaming
// measurements; the trigger value and MAC addresses are this design's choice.
package bridge_pkg;

  localparam int unsigned PHIT_W       = 37;  // streaming word width
  localparam int unsigned CONN_W       = 6;   // connection number field
  localparam int unsigned CREDIT_W     = 6;   // credit value field
  localparam int unsigned MAX_CONN     = 1 << CONN_W;
  localparam int unsigned MAX_CREDIT   = (1 << CREDIT_W) - 1;  // per credit byte
  localparam int unsigned PHIT_BYTES   = 5;   // 3 tag bits + 37 data bits
  localparam int unsigned HDR_BYTES    = 14;  // dest MAC, src MAC, length
  localparam int unsigned ETH_MAX_PAYLOAD = 1500;

  // Slot protocol tags (two most significant bits of a byte)
  typedef enum logic [1:0] {
    TAG_GARBAGE = 2'b00,
    TAG_CONN    = 2'b01,
    TAG_CREDIT  = 2'b10,
    TAG_PHIT    = 2'b11
  } byte_tag_e;

  localparam logic [2:0] PHIT_HDR = 3'b111;

  // Slot table contents loaded at reset. Sized for the largest table the
  // 8-bit configuration address allows; entries past NUM_SLOTS are ignored.
  localparam int unsigned MAX_SLOTS = 255;
  typedef logic [MAX_SLOTS-1:0][CONN_W-1:0] slot_table_t;

  // Default table: slot i belongs to connection i mod ports.
  function automatic slot_table_t spread_table(input int unsigned ports);
    slot_table_t t;
    for (int i = 0; i < int'(MAX_SLOTS); i++) t[i] = CONN_W'(i % ports);
    return t;
  endfunction

  // Scheduling policies of the slot scheduler
  typedef enum logic [1:0] {
    POL_TDM      = 2'd0,
    POL_RR       = 2'd1,
    POL_PRIORITY = 2'd2
  } sched_policy_e;

  function automatic logic [7:0] conn_byte(input logic [CONN_W-1:0] c);
    return {TAG_CONN, c};
  endfunction

  function automatic logic [7:0] credit_byte(input logic [CREDIT_W-1:0] n);
    return {TAG_CREDIT, n};
  endfunction

endpackage
