// sender: builds one DG-RDMA frame per message.  It takes a meta data item
// and the payload items that follow it (MLMesg) and emits the frame as
// HexBDG beats:
//
//   frame header (10 B) | message header (24 B) | meta data (8 B) |
//   message header (24 B) | payload (length B)
//
// As in the document, a state variable steps through Generate Frame Header,
// Generate Message Header, forwarding the meta data, Generate Message Header
// again and Generate Message Data.  Each step pushes its bytes into a byte
// shifter, and a pump takes 16-byte beats out of it into the output FIFO.
// The pump holds back the last beat until the whole frame is in the shifter
// so that it can mark it end-of-packet with the right byte count.  The next
// frame starts only once the shifter is empty.  Headers and meta data are
// packed back to back (no padding), which gives the 74-byte frame that the
// document's packet capture shows for an 8-byte payload.
//
// Header contents: destination and source IDs come from ports; frame IDs
// and transaction IDs are rolling counters starting at 0; ACKStart and
// ACKCount are 0 and Flags is 1 (one message).  The remaining message
// header fields take the constants seen in the document's capture
// (completion address/data, data address, two data messages, sequence 1,
// type 1 for meta data and 0 for payload, trailing flag 1 then 0).  The data
// length field of the payload header is the low 16 bits of the meta length.
// Throughput: one 16-byte payload beat per cycle; each frame adds about
// five cycles of header and flush overhead.
module sender
  import dgr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] my_id,
  input  logic [15:0] peer_id,
  input  logic        in_valid,
  output logic        in_ready,
  input  mlmesg_t     in_msg,
  output logic        out_valid,
  input  logic        out_ready,
  output hexbdg_t     out_beat,
  output logic [31:0] frames_sent
);
  typedef enum logic [2:0] {S_FH, S_MH_META, S_META, S_MH_DATA, S_DATA, S_FLUSH} sstate_e;

  sstate_e     state;
  logic [15:0] frame_id;
  logic [31:0] txn_id;
  mlmeta_t     meta_q;
  logic [31:0] remaining;

  // input FIFO
  logic    iq_valid, iq_ready;
  mlmesg_t iq_msg;
  stream_fifo #(.T(mlmesg_t), .DEPTH(2)) u_in_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_msg),
    .out_valid(iq_valid), .out_ready(iq_ready), .out_data(iq_msg));

  // output FIFO
  logic    oq_valid, oq_ready;
  hexbdg_t oq_beat;
  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_out_fifo (
    .clk, .rst_n, .in_valid(oq_valid), .in_ready(oq_ready), .in_data(oq_beat),
    .out_valid, .out_ready, .out_data(out_beat));

  // byte shifter
  logic                  bs_push, bs_in_ready;
  logic [23:0][7:0]      bs_in;
  logic [4:0]            bs_in_n;
  logic [23:0][7:0]      bs_out;
  logic [5:0]            bs_count;
  logic [4:0]            bs_pop;
  byte_shifter #(.IN_BYTES(24), .OUT_BYTES(24), .DEPTH(48)) u_bs (
    .clk, .rst_n, .clear(1'b0), .in_valid(bs_push), .in_ready(bs_in_ready),
    .in_data(bs_in), .in_n(bs_in_n), .out_data(bs_out), .count(bs_count), .pop_n(bs_pop));

  frame_hdr_t fh;
  msg_hdr_t   mh;
  logic [4:0] data_n;

  always_comb begin
    fh           = '0;
    fh.did       = peer_id;
    fh.sid       = my_id;
    fh.frame_id  = frame_id;
    fh.flags     = 8'h01;
    mh             = '0;
    mh.txn_id      = txn_id;
    mh.compl_addr  = COMPL_ADDR_DEF;
    mh.compl_data  = COMPL_DATA_DEF;
    mh.n_data_msgs = 16'd2;
    mh.msg_seq     = 16'd1;
    mh.data_addr   = DATA_ADDR_DEF;
    if (state == S_MH_META) begin
      mh.data_len = 16'(META_BYTES);
      mh.msg_type = 8'h01;
      mh.trailing = 8'h01;
    end else begin
      mh.data_len = meta_q.length[15:0];
      mh.msg_type = 8'h00;
      mh.trailing = 8'h00;
    end
    data_n = (remaining >= 32'd16) ? 5'd16 : remaining[4:0];

    bs_push  = 1'b0;
    bs_in    = '0;
    bs_in_n  = '0;
    iq_ready = 1'b0;
    case (state)
      S_FH: begin
        if (iq_valid && !iq_msg.is_meta) iq_ready = 1'b1;  // stray payload: drop
        bs_in[FRAME_HDR_BYTES-1:0] = frame_hdr_bytes(fh);
        bs_in_n = 5'(FRAME_HDR_BYTES);
        bs_push = iq_valid && iq_msg.is_meta && bs_count == 0;
      end
      S_MH_META, S_MH_DATA: begin
        bs_in   = msg_hdr_bytes(mh);
        bs_in_n = 5'(MSG_HDR_BYTES);
        bs_push = 1'b1;
      end
      S_META: begin
        bs_in[META_BYTES-1:0] = meta_bytes(meta_q);
        bs_in_n  = 5'(META_BYTES);
        bs_push  = iq_valid;
        iq_ready = bs_in_ready;
      end
      S_DATA: begin
        bs_in[HEX_BYTES-1:0] = iq_msg.data;
        bs_in_n  = data_n;
        bs_push  = iq_valid && !iq_msg.is_meta;
        iq_ready = bs_in_ready && !iq_msg.is_meta;
      end
      default: ;
    endcase
  end

  // Frame source pump: full beats while more bytes will follow, the final
  // (end-of-packet) beat once the whole frame is in the shifter.
  logic last_beat;
  always_comb begin
    last_beat = (state == S_FLUSH) && (bs_count <= 6'd16);
    oq_valid  = (bs_count > 6'd16) || (state == S_FLUSH && bs_count != 0);
    oq_beat.data  = bs_out[HEX_BYTES-1:0];
    oq_beat.nbval = last_beat ? 5'(bs_count) : 5'd16;
    oq_beat.eop   = last_beat;
    bs_pop = (oq_valid && oq_ready) ? oq_beat.nbval : 5'd0;
  end

  wire push_ok = bs_push && bs_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_FH;
      frame_id    <= '0;
      txn_id      <= '0;
      meta_q      <= '0;
      remaining   <= '0;
      frames_sent <= '0;
    end else begin
      case (state)
        S_FH:      if (push_ok) begin meta_q <= iq_msg.meta; state <= S_MH_META; end
        S_MH_META: if (push_ok) state <= S_META;
        S_META:    if (push_ok) state <= S_MH_DATA;
        S_MH_DATA: if (push_ok) begin
          remaining <= meta_q.length;
          state     <= (meta_q.length == 0) ? S_FLUSH : S_DATA;
        end
        S_DATA:    if (push_ok) begin
          remaining <= remaining - 32'(data_n);
          if (remaining <= 32'd16) state <= S_FLUSH;
        end
        default:   if (last_beat && oq_valid && oq_ready) begin
          state       <= S_FH;
          frame_id    <= frame_id + 1'b1;
          txn_id      <= txn_id + 1'b1;
          frames_sent <= frames_sent + 1'b1;
        end
      endcase
    end
  end
endmodule
