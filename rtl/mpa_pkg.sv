// mpa_pkg: types and constants shared by the Multimedia Protocol Adapter (MPA).
//
// The adapter moves packets one byte per clock through a receive pipeline
// (protocol filter -> check-sequence generator -> receive DMA) and a transmit
// pipeline (transmit DMA -> check-sequence generator/inserter).  Every packet
// in the receive pipeline carries a tag: the connection number (CN) found by
// the protocol filter, whether the connection is known, and its protocol type.
// The CN indexes a connection table that tells the later stages how to treat
// the packet (isochronous or asynchronous, which check sequence, where the
// header ends, which multimedia FIFO).
//
// Sizes that are this design's own choice (the architecture gives none):
// a 16-row CAM, three levels in the protocol address tree, 16 buffer slots
// per side, 128-byte header slots, 2 KiB data buffers and four multimedia
// FIFOs of 2 KiB each.
package mpa_pkg;

  // ---- protocol filter / CAM ------------------------------------------
  localparam int unsigned CAM_DEPTH = 16;               // CAM rows
  localparam int unsigned CAM_AW    = $clog2(CAM_DEPTH); // matched-word address width
  localparam int unsigned LEVELS    = 3;                // tree levels: network, host, port
  localparam int unsigned CN_W      = LEVELS * CAM_AW;  // CN = concatenated CAM addresses

  typedef logic [CN_W-1:0] cn_t;

  // A CAM row / search mask: tree level, protocol type, address information.
  typedef struct packed {
    logic [1:0]  level;
    logic [7:0]  ptype;
    logic [31:0] addr;
  } cam_key_t;

  // Protocol type returned with the CN.
  typedef enum logic [1:0] {
    PROTO_UNKNOWN = 2'd0,
    PROTO_TCP     = 2'd1,
    PROTO_UDP     = 2'd2,
    PROTO_ST2     = 2'd3
  } proto_e;

  // Header field values parsed by the mask generator.
  localparam logic [3:0] VER_IP  = 4'd4;   // IPv4 version field
  localparam logic [3:0] VER_ST2 = 4'd5;   // ST-II uses IP version number 5
  localparam logic [7:0] IPPROTO_TCP = 8'd6;
  localparam logic [7:0] IPPROTO_UDP = 8'd17;

  // Tag that travels with every packet of the receive pipeline.
  typedef struct packed {
    cn_t    cn;
    logic   known;
    proto_e proto;
  } pkt_tag_t;

  // ---- check sequences ------------------------------------------------
  typedef enum logic [1:0] {
    CHK_NONE   = 2'd0,
    CHK_INET16 = 2'd1,   // 16-bit one's-complement sum (TCP/IP style)
    CHK_CRC32  = 2'd2    // CRC-32, polynomial 04C11DB7, MSB first (AAL5 style)
  } chk_alg_e;

  localparam logic [31:0] CRC32_POLY    = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_RESIDUE = 32'hC704_DD7B;  // remainder of a good frame

  // ---- connection control information -------------------------------
  localparam int unsigned NUM_MMF = 4;                  // multimedia FIFOs per direction
  localparam int unsigned MMF_W   = $clog2(NUM_MMF);
  localparam int unsigned OFF_W   = 12;                 // byte offset within a packet
  localparam int unsigned LEN_W   = 16;                 // packet byte counters (IP: up to 65535 bytes)

  typedef struct packed {
    logic             valid;      // entry in use
    logic             iso;        // isochronous: data part goes to a multimedia FIFO
    chk_alg_e         alg;        // check sequence of this connection
    logic [7:0]       hdr_len;    // bytes of header (split point header/data)
    logic [OFF_W-1:0] chk_start;  // first byte covered by the check sequence
    logic [OFF_W-1:0] chk_off;    // where the check sequence sits in the packet
    logic [MMF_W-1:0] mmf;        // multimedia FIFO of this connection
  } conn_info_t;

  // ---- buffers --------------------------------------------------------
  localparam int unsigned NUM_SLOTS  = 16;              // header slots = data buffers per side
  localparam int unsigned SLOT_W     = $clog2(NUM_SLOTS);
  localparam int unsigned HDR_SLOT   = 128;             // bytes per header-memory slot
  localparam int unsigned RCPT_BYTES = 16;              // receipt information at slot start
  localparam int unsigned DATA_BUF   = 2048;            // bytes per data-memory buffer
  localparam int unsigned HMEM_BYTES = NUM_SLOTS * HDR_SLOT;
  localparam int unsigned DMEM_BYTES = NUM_SLOTS * DATA_BUF;
  localparam int unsigned MMF_DEPTH  = 2048;            // bytes per multimedia FIFO
  localparam int unsigned FRAME_BUF  = 4096;            // transmit frame buffer bytes

  // Command written by the protocol processor into the send queue.
  typedef struct packed {
    logic [SLOT_W-1:0] slot;      // header slot (and data buffer) to send from
    cn_t               cn;        // connection: selects the check sequence
    logic [7:0]        hdr_len;   // header bytes in the header slot
    logic [OFF_W-1:0]  data_len;  // payload bytes
    logic              from_mmf;  // payload from a multimedia FIFO, not data memory
    logic [MMF_W-1:0]  mmf;       // which multimedia FIFO
  } send_cmd_t;

  // ---- per-byte check functions ------------------------------------------
  // One byte of CRC-32, MSB first.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {d, 24'h0};
    for (int i = 0; i < 8; i++)
      c = c[31] ? ((c << 1) ^ CRC32_POLY) : (c << 1);
    return c;
  endfunction

  // Add one byte to a 16-bit one's-complement sum kept in a wide accumulator.
  // Bytes at even offsets are the high half of a 16-bit word.
  function automatic logic [31:0] inet_add(input logic [31:0] acc, input logic [7:0] d,
                                           input logic odd);
    return acc + (odd ? {24'h0, d} : {16'h0, d, 8'h0});
  endfunction

  // Fold the accumulator into a 16-bit one's-complement sum.
  function automatic logic [15:0] inet_fold(input logic [31:0] acc);
    logic [31:0] s;
    s = {16'h0, acc[15:0]} + {16'h0, acc[31:16]};
    s = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    return s[15:0];
  endfunction

endpackage
