// dgr_pkg: types and constants shared by every block of the DG-RDMA endpoint.
//
// The endpoint moves frames between its blocks as a stream of HexBDG beats:
// 16 bytes of data (byte 0 is the first byte on the wire), a count of valid
// bytes (0-16) and an end-of-packet flag, as the document defines them.
// Next to the wire the stream is 4 bytes wide (QABS), each byte tagged with
// one of the four ABS tags.  The producer, receiver and consumer exchange
// MLMesg items, which are either meta data (length and op code) or 16 bytes
// of payload.  The document's MLMesg is a tagged union; here it is a struct
// with an explicit is_meta tag.
//
// Header field order and sizes follow the document's frame header (10 bytes)
// and message header (24 bytes) tables.  Multi-byte fields are sent most
// significant byte first, as in the document's packet capture.  The
// EtherType 0x3333 and the constant message header fields (completion
// address/data, data address) are the values visible in that capture.
package dgr_pkg;

  localparam int HEX_BYTES       = 16;
  localparam int FRAME_HDR_BYTES = 10;
  localparam int MSG_HDR_BYTES   = 24;
  localparam int META_BYTES      = 8;
  localparam int L2_HDR_BYTES    = 14;
  // Largest payload the document measures (8192 bytes); a frame holding one
  // such message needs FRAME_MAX_BEATS HexBDG beats of frame buffer.
  localparam int MAX_PAYLOAD     = 8192;
  localparam int FRAME_OVERHEAD  = FRAME_HDR_BYTES + 2*MSG_HDR_BYTES + META_BYTES;
  localparam int FRAME_MAX_BEATS = (FRAME_OVERHEAD + MAX_PAYLOAD + HEX_BYTES - 1) / HEX_BYTES;

  localparam logic [15:0] ETHERTYPE_DGRDMA = 16'h3333;
  localparam logic [31:0] COMPL_ADDR_DEF   = 32'hFEED_C0DE;
  localparam logic [31:0] COMPL_DATA_DEF   = 32'hCAFE_BABE;
  localparam logic [31:0] DATA_ADDR_DEF    = 32'hBEEF_F00D;

  typedef logic [7:0] byte_t;
  typedef logic [HEX_BYTES-1:0][7:0] hexbyte_t;  // little endian: [0] first

  typedef struct packed {
    hexbyte_t   data;
    logic [4:0] nbval;   // valid bytes, 0..16
    logic       eop;     // last beat of the frame
  } hexbdg_t;

  typedef struct packed {
    logic [31:0] length;  // message length in bytes
    logic [7:0]  opcode;
  } mlmeta_t;

  typedef struct packed {
    logic     is_meta;    // 1: meta valid, 0: data valid
    mlmeta_t  meta;
    hexbyte_t data;
  } mlmesg_t;

  typedef enum logic [1:0] {
    ABS_VALID_NOT_EOP = 2'd0,
    ABS_VALID_EOP     = 2'd1,
    ABS_EMPTY_EOP     = 2'd2,
    ABS_ABORT_EOP     = 2'd3
  } abs_tag_e;

  typedef struct packed {
    abs_tag_e   tag;
    logic [7:0] b;
  } abs_t;

  typedef abs_t [3:0] qabs_t;  // lane 0 is the first byte on the wire

  typedef enum logic [1:0] {LEN_CONSTANT = 2'd0, LEN_INCREMENTAL = 2'd1, LEN_RANDOM = 2'd2} length_mode_e;
  typedef enum logic [1:0] {DATA_ZERO_ORIGIN = 2'd0, DATA_INCR_ORIGIN = 2'd1, DATA_ROLLING = 2'd2} data_mode_e;

  typedef struct packed {
    logic [15:0] did;        // destination endpoint ID
    logic [15:0] sid;        // source endpoint ID
    logic [15:0] frame_id;   // rolling frame sequence number
    logic [15:0] ack_start;  // first frame ID acknowledged
    logic [7:0]  ack_count;  // number of frames acknowledged
    logic [7:0]  flags;      // bit 0: frame carries at least one message
  } frame_hdr_t;

  typedef struct packed {
    logic [31:0] txn_id;
    logic [31:0] compl_addr;
    logic [31:0] compl_data;
    logic [15:0] n_data_msgs;
    logic [15:0] msg_seq;
    logic [31:0] data_addr;
    logic [15:0] data_len;
    logic [7:0]  msg_type;
    logic [7:0]  trailing;
  } msg_hdr_t;

  // Counters an endpoint reports.
  typedef struct packed {
    logic [31:0] msgs_produced;     // messages the producer has emitted
    logic [31:0] frames_sent;       // frames built by the sender
    logic [31:0] retransmissions;   // FDU timeouts (all FDUs)
    logic [31:0] acks_matched;      // ack frames that released an FDU
    logic [31:0] stale_acks;        // ack frames that matched nothing
    logic [31:0] acks_generated;    // ack frames built by the aggregator
    logic [31:0] frames_received;   // frames taken in by the FAUs
    logic [31:0] msgs_delivered;    // messages the receiver passed on
    logic [31:0] correct_count;     // messages the consumer found correct
    logic [31:0] error_count;       // messages the consumer found wrong
    logic [31:0] l2_dropped;        // packets not for this MAC / EtherType
    logic [31:0] id_dropped;        // frames not for this endpoint ID
    logic [31:0] bad_frames;        // truncated frames seen by the receiver
    logic [31:0] tx_ack_frames;     // ack frames sent to the wire
    logic [31:0] tx_dg_frames;      // datagram frames sent to the wire
    logic [31:0] ack_to_dg;         // MergeToWire Ack Out -> Datagram Out
    logic [31:0] dg_to_ack;         // MergeToWire Datagram Out -> Ack Out
    logic        producer_done;     // the producer has finished
    logic        tx_idle;           // no frame is held by any FDU or in the sender
  } endpoint_status_t;

  // A packed struct of N bytes laid out most significant byte first on the
  // wire: wire byte i is bits [8*(N-1-i) +: 8].
  function automatic logic [FRAME_HDR_BYTES-1:0][7:0] frame_hdr_bytes(frame_hdr_t h);
    logic [FRAME_HDR_BYTES*8-1:0] v;
    v = h;
    for (int i = 0; i < FRAME_HDR_BYTES; i++) frame_hdr_bytes[i] = v[8*(FRAME_HDR_BYTES-1-i) +: 8];
  endfunction

  function automatic frame_hdr_t frame_hdr_parse(hexbyte_t d);
    logic [FRAME_HDR_BYTES*8-1:0] v;
    for (int i = 0; i < FRAME_HDR_BYTES; i++) v[8*(FRAME_HDR_BYTES-1-i) +: 8] = d[i];
    return frame_hdr_t'(v);
  endfunction

  function automatic logic [MSG_HDR_BYTES-1:0][7:0] msg_hdr_bytes(msg_hdr_t h);
    logic [MSG_HDR_BYTES*8-1:0] v;
    v = h;
    for (int i = 0; i < MSG_HDR_BYTES; i++) msg_hdr_bytes[i] = v[8*(MSG_HDR_BYTES-1-i) +: 8];
  endfunction

  function automatic msg_hdr_t msg_hdr_parse(logic [MSG_HDR_BYTES-1:0][7:0] d);
    logic [MSG_HDR_BYTES*8-1:0] v;
    for (int i = 0; i < MSG_HDR_BYTES; i++) v[8*(MSG_HDR_BYTES-1-i) +: 8] = d[i];
    return msg_hdr_t'(v);
  endfunction

  // Meta data on the wire: 4-byte length, op code, three zero bytes.
  function automatic logic [META_BYTES-1:0][7:0] meta_bytes(mlmeta_t m);
    meta_bytes    = '0;
    meta_bytes[0] = m.length[31:24];
    meta_bytes[1] = m.length[23:16];
    meta_bytes[2] = m.length[15:8];
    meta_bytes[3] = m.length[7:0];
    meta_bytes[4] = m.opcode;
  endfunction

  // Number of valid bytes in a quad (valid bytes are packed from lane 0).
  function automatic logic [2:0] qabs_nvalid(qabs_t q);
    logic [2:0] n;
    n = 3'd0;
    for (int k = 0; k < 4; k++)
      if (q[k].tag == ABS_VALID_NOT_EOP || q[k].tag == ABS_VALID_EOP) n = n + 3'd1;
    return n;
  endfunction

  function automatic logic qabs_is_eop(qabs_t q);
    logic e;
    e = 1'b0;
    for (int k = 0; k < 4; k++)
      if (q[k].tag != ABS_VALID_NOT_EOP) e = 1'b1;
    return e;
  endfunction

  // Build a quad from n valid bytes; eop marks the last valid byte ValidEOP
  // (or lane 0 EmptyEOP when n is 0) and the lanes after it EmptyEOP.
  function automatic qabs_t qabs_make(logic [3:0][7:0] b, logic [2:0] n, logic eop);
    qabs_t q;
    for (int k = 0; k < 4; k++) begin
      q[k].b = (k < int'(n)) ? b[k] : 8'h00;
      if (k < int'(n)) q[k].tag = (eop && k == int'(n) - 1) ? ABS_VALID_EOP : ABS_VALID_NOT_EOP;
      else             q[k].tag = ABS_EMPTY_EOP;
    end
    return q;
  endfunction

endpackage
