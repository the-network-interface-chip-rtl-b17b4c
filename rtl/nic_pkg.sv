// nic_pkg: types, constants and packet-format functions shared by the
// Network Interface Chip (NIC).
//
// A NIC message is five 32-bit words plus a 5-bit type field. Outgoing
// messages also carry the circuit-switch (CSP) bit, which ends up in the
// PaRC packet header. On the network a message travels as a packet of
// twelve 16-bit words: a header, ten words holding the five message words
// in a fixed byte arrangement, and a trailing 0x5555 word that the receiver
// ignores. msg_to_word() and words_to_msg() implement that arrangement in
// both directions, so the output and the input port agree by construction.
//
// Taken from the document: the message format, the P bus command fields in
// da[13:0], the location map, the STATUS/CONTROL bit layouts, the SEND
// encodings and the packet byte map. This design's own choices: the
// encoding of the P bus reply lines (the document defers to the 88100
// manual) and the packed struct layout of a queued message.
package nic_pkg;

  localparam int unsigned WORDS_PER_MSG  = 5;   // 32-bit words per message
  localparam int unsigned PKT_WORDS      = 12;  // 16-bit words per packet
  localparam logic [15:0] IDLE_PATTERN   = 16'h5555;

  // Interface locations, da[3:0] (LOC field)
  typedef enum logic [3:0] {
    LOC_O0       = 4'h0,
    LOC_O1       = 4'h1,
    LOC_O2       = 4'h2,
    LOC_O3       = 4'h3,
    LOC_O4       = 4'h4,
    LOC_I0       = 4'h5,
    LOC_I1       = 4'h6,
    LOC_I2       = 4'h7,
    LOC_I3       = 4'h8,
    LOC_I4       = 4'h9,
    LOC_CONTROL  = 4'hA,
    LOC_STATUS   = 4'hB,
    LOC_CODEBASE = 4'hC,
    LOC_INST     = 4'hD,
    LOC_RSVD_E   = 4'hE,
    LOC_RSVD_F   = 4'hF
  } loc_e;

  // SEND field, da[12:10]; only the low two bits carry the encoding
  typedef enum logic [1:0] {
    SEND_NONE    = 2'b00,
    SEND_PLAIN   = 2'b01,
    SEND_REPLY   = 2'b10,
    SEND_FORWARD = 2'b11
  } send_e;

  // Command carried on da[13:0] during a NIC transaction
  typedef struct packed {
    logic       csp;    // [13]    send circuit switched
    logic       send_x; // [12]    unused upper bit of the 3-bit SEND field
    send_e      send;   // [11:10] SEND encoding
    logic       next;   // [9]     advance to next incoming message
    logic [4:0] otype;  // [8:4]   type of the message to send
    loc_e       loc;    // [3:0]   location read or written
  } pcmd_t;

  // P bus data reply codes on dr[1:0] (this design's encoding)
  typedef enum logic [1:0] {
    DR_IDLE    = 2'b00,
    DR_SUCCESS = 2'b01,
    DR_WAIT    = 2'b10,
    DR_FAULT   = 2'b11
  } dreply_e;

  // CONTROL location
  typedef struct packed {
    logic [22:0] rsvd;    // [31:9]
    logic [3:0]  othresh; // [8:5]
    logic [3:0]  ithresh; // [4:1]
    logic        fw;      // [0] 1: FAULT on full send, 0: WAIT
  } control_t;

  // STATUS location
  typedef struct packed {
    logic [15:0] rsvd;    // [31:16]
    logic [3:0]  olength; // [15:12]
    logic [3:0]  ilength; // [11:8]
    logic        oafull;  // [7]
    logic        iafull;  // [6]
    logic        valid;   // [5]
    logic [4:0]  itype;   // [4:0]
  } status_t;

  // One message as held in a queue
  typedef struct packed {
    logic                               csp;
    logic [4:0]                         mtype;
    logic [WORDS_PER_MSG-1:0][31:0]     w;     // w[0] = o0/i0 ... w[4] = o4/i4
  } nic_msg_t;

  typedef logic [PKT_WORDS-1:0][15:0] pkt_t;

  // Packet word idx (0 = header) of message m, {upper byte, lower byte}.
  function automatic logic [15:0] msg_to_word(nic_msg_t m, logic [3:0] idx);
    logic [15:0] r;
    unique case (idx)
      4'd0:    r = {1'b1, m.csp, 1'b1, m.mtype, m.w[0][31:24]};
      4'd1:    r = m.w[0][15:0];
      4'd2:    r = m.w[0][31:16];
      4'd3:    r = m.w[1][15:0];
      4'd4:    r = m.w[1][31:16];
      4'd5:    r = {m.w[3][7:0],   m.w[2][7:0]};
      4'd6:    r = {m.w[3][23:16], m.w[3][15:8]};
      4'd7:    r = {m.w[4][7:0],   m.w[3][31:24]};
      4'd8:    r = {m.w[4][23:16], m.w[4][15:8]};
      4'd9:    r = {m.w[2][15:8],  m.w[4][31:24]};
      4'd10:   r = {m.w[2][23:16], m.w[2][31:24]};
      default: r = IDLE_PATTERN;   // word 11 and anything beyond
    endcase
    return r;
  endfunction

  // Inverse of msg_to_word over a whole received packet.
  function automatic nic_msg_t words_to_msg(pkt_t p);
    nic_msg_t m;
    m.csp   = p[0][14];
    m.mtype = p[0][12:8];
    m.w[0]  = {p[2], p[1]};
    m.w[1]  = {p[4], p[3]};
    m.w[2]  = {p[10][7:0], p[10][15:8], p[9][15:8], p[5][7:0]};
    m.w[3]  = {p[7][7:0], p[6][15:8], p[6][7:0], p[5][15:8]};
    m.w[4]  = {p[9][7:0], p[8][15:8], p[8][7:0], p[7][15:8]};
    return m;
  endfunction

endpackage
