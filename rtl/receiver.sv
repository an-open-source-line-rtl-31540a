// receiver: takes frames (HexBDG) from merge_receive, strips the DG-RDMA
// headers and passes the meta data and payload on as MLMesg items.
//
// Beats are loaded into a byte shifter; a state variable then removes, in
// order, the 10-byte frame header, the 24-byte message header of the meta
// data, the 8 meta data bytes (forwarded as a meta item), the 24-byte
// message header of the payload, and finally the payload, forwarded in
// 16-byte items.  The payload length is the header's data length field;
// bytes of the last item past that length carry NUKE.  Whatever follows the
// payload up to end-of-packet (for example MAC padding) is discarded, as
// are frames whose Flags bit 0 says they carry no message.  A frame that
// ends early is discarded from that point and counted in bad_frames.  The
// header sizes and the order of the steps follow the document; the byte
// shifter's size and the discard rules are this design's.  A payload item
// leaves per cycle once its bytes are in the shifter.
module receiver
  import dgr_pkg::*;
#(
  parameter logic [7:0] NUKE = 8'hAA
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  hexbdg_t     in_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output mlmesg_t     out_msg,
  output logic [31:0] messages,
  output logic [31:0] bad_frames
);
  typedef enum logic [2:0] {R_FH, R_MH1, R_META, R_MH2, R_DATA, R_DRAIN} rstate_e;
  rstate_e     state;
  logic        eop_seen;
  logic [15:0] remaining;

  logic              bs_in_ready;
  logic [23:0][7:0]  bs_out;
  logic [5:0]        bs_count;
  logic [4:0]        bs_pop;
  logic              bs_clear;

  assign in_ready = bs_in_ready && !eop_seen;

  byte_shifter #(.IN_BYTES(16), .OUT_BYTES(24), .DEPTH(48)) u_bs (
    .clk, .rst_n, .clear(bs_clear), .in_valid(in_valid && in_ready), .in_ready(bs_in_ready),
    .in_data(in_beat.data), .in_n(in_beat.nbval), .out_data(bs_out), .count(bs_count),
    .pop_n(bs_pop));

  logic    q_valid, q_ready;
  mlmesg_t q_msg;
  stream_fifo #(.T(mlmesg_t), .DEPTH(2)) u_out_fifo (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_msg),
    .out_valid, .out_ready, .out_data(out_msg));

  logic [4:0] data_n;
  msg_hdr_t   mh;
  logic       short_frame;

  always_comb begin
    mh     = msg_hdr_parse(bs_out);
    data_n = (remaining >= 16'd16) ? 5'd16 : remaining[4:0];
    q_valid = 1'b0;
    q_msg   = '0;
    bs_pop  = '0;
    bs_clear = 1'b0;
    short_frame = 1'b0;
    case (state)
      R_FH:  if (bs_count >= 6'(FRAME_HDR_BYTES)) bs_pop = 5'(FRAME_HDR_BYTES);
             else short_frame = eop_seen;
      R_MH1, R_MH2: if (bs_count >= 6'(MSG_HDR_BYTES)) bs_pop = 5'(MSG_HDR_BYTES);
             else short_frame = eop_seen;
      R_META: begin
        q_msg.is_meta     = 1'b1;
        q_msg.meta.length = {bs_out[0], bs_out[1], bs_out[2], bs_out[3]};
        q_msg.meta.opcode = bs_out[4];
        if (bs_count >= 6'(META_BYTES)) begin
          q_valid = 1'b1;
          bs_pop  = q_ready ? 5'(META_BYTES) : 5'd0;
        end else short_frame = eop_seen;
      end
      R_DATA: begin
        for (int i = 0; i < HEX_BYTES; i++)
          q_msg.data[i] = (i < int'(data_n)) ? bs_out[i] : NUKE;
        if (bs_count >= 6'(data_n)) begin
          q_valid = 1'b1;
          bs_pop  = q_ready ? data_n : 5'd0;
        end else short_frame = eop_seen;
      end
      default: begin  // R_DRAIN
        bs_pop   = (bs_count > 6'd24) ? 5'd24 : bs_count[4:0];
        bs_clear = eop_seen;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_FH;
      eop_seen   <= 1'b0;
      remaining  <= '0;
      messages   <= '0;
      bad_frames <= '0;
    end else begin
      if (in_valid && in_ready && in_beat.eop) eop_seen <= 1'b1;
      if (short_frame) begin
        state      <= R_DRAIN;
        bad_frames <= bad_frames + 1'b1;
      end else begin
        case (state)
          R_FH:   if (bs_pop != 0) state <= bs_out[9][0] ? R_MH1 : R_DRAIN;
          R_MH1:  if (bs_pop != 0) state <= R_META;
          R_META: if (bs_pop != 0) state <= R_MH2;
          R_MH2:  if (bs_pop != 0) begin
            remaining <= mh.data_len;
            if (mh.data_len == 0) begin
              state    <= R_DRAIN;
              messages <= messages + 1'b1;
            end else state <= R_DATA;
          end
          R_DATA: if (bs_pop != 0) begin
            remaining <= remaining - 16'(data_n);
            if (remaining <= 16'd16) begin
              state    <= R_DRAIN;
              messages <= messages + 1'b1;
            end
          end
          default: if (eop_seen) begin
            state    <= R_FH;
            eop_seen <= 1'b0;
          end
        endcase
      end
    end
  end
endmodule
