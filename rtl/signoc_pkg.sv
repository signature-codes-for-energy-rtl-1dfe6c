// Shared types and constants of the Sig-NoC network.
//
// A flit is 34 bits wide. Its two leftmost bits give the flit type
// (head 01, body 10, tail 00); the other 32 bits are the payload. A data
// packet is a head flit, 16 body flits carrying a 64-byte cache block and a
// tail flit carrying the 4-byte block address, so 68 payload bytes follow the
// head. A message packet is a head flit and a tail flit with metadata.
//
// The head payload carries, from the least significant bit: the destination
// node, the source node, a mode field, and reserved bits. The 8-bit packet
// signature travels in the low byte of the reserved bits. The flit size, the
// type codes, the field order and the flit counts follow the description of
// the network; the field widths are this design's choice (6-bit node numbers
// cover both a 4x4 and an 8x8 mesh).
package signoc_pkg;

  localparam int unsigned FLIT_W     = 34;
  localparam int unsigned PAYLOAD_W  = 32;
  localparam int unsigned SIG_W      = 8;   // signature width = byte width
  localparam int unsigned BODY_FLITS = 16;  // body flits of a data packet
  localparam int unsigned NODE_W     = 6;
  localparam int unsigned MODE_W     = 4;

  // head payload field positions
  localparam int unsigned DEST_LSB = 0;
  localparam int unsigned SRC_LSB  = DEST_LSB + NODE_W;   // 6
  localparam int unsigned MODE_LSB = SRC_LSB + NODE_W;    // 12
  localparam int unsigned SIG_LSB  = MODE_LSB + MODE_W;   // 16, first reserved bit

  typedef enum logic [1:0] {
    FLIT_TAIL = 2'b00,
    FLIT_HEAD = 2'b01,
    FLIT_BODY = 2'b10
  } flit_type_e;

  typedef struct packed {
    flit_type_e           ftype;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // router ports
  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;
  localparam int unsigned NPORTS = 5;

  function automatic logic [NODE_W-1:0] head_dest(flit_t f);
    return f.payload[DEST_LSB +: NODE_W];
  endfunction

  function automatic logic [SIG_W-1:0] head_sig(flit_t f);
    return f.payload[SIG_LSB +: SIG_W];
  endfunction

  // XOR every byte of a payload word with the signature
  function automatic logic [PAYLOAD_W-1:0] xor_sig(logic [PAYLOAD_W-1:0] w,
                                                   logic [SIG_W-1:0] sig);
    return w ^ {(PAYLOAD_W/SIG_W){sig}};
  endfunction

endpackage
