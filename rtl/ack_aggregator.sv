// ack_aggregator: Acknowledgment Aggregator.  For every frame that a Frame
// Arrival Unit reports ({source ID, frame ID}), it builds one
// acknowledgment frame and sends it to merge_fork_fau.  It also counts the
// acknowledgments it has generated.
//
// The acknowledgment frame is a frame header alone (10 bytes, one HexBDG
// beat with end-of-packet): destination ID = the reporting frame's source,
// source ID = my_id, frame ID = a rolling counter of acknowledgment frames,
// ACKStart = the acknowledged frame ID, ACKCount = 1, Flags = 0 (no
// message).  One acknowledgment per received frame, as in the document; the
// header-only frame layout and the round-robin service of the N reports are
// this design's choices.  One acknowledgment frame can be issued per cycle
// into a 2-entry output FIFO.
module ack_aggregator
  import dgr_pkg::*;
#(
  parameter int N = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        my_id,
  input  logic [N-1:0]       rep_valid,
  output logic [N-1:0]       rep_ready,
  input  logic [N-1:0][15:0] rep_sid,
  input  logic [N-1:0][15:0] rep_fid,
  output logic               out_valid,
  input  logic               out_ready,
  output hexbdg_t            out_beat,
  output logic [31:0]        acks_generated
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] rr_ptr, pick;
  logic          pick_ok;
  logic [15:0]   ack_seq;
  logic          q_valid, q_ready;
  hexbdg_t       q_beat;
  frame_hdr_t    h;

  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (rep_valid[(int'(rr_ptr) + k) % N]) begin
        pick    = IW'((int'(rr_ptr) + k) % N);
        pick_ok = 1'b1;
      end
    end
    h           = '0;
    h.did       = rep_sid[pick];
    h.sid       = my_id;
    h.frame_id  = ack_seq;
    h.ack_start = rep_fid[pick];
    h.ack_count = 8'd1;
    h.flags     = 8'h00;
    q_beat       = '0;
    q_beat.data[FRAME_HDR_BYTES-1:0] = frame_hdr_bytes(h);
    q_beat.nbval = 5'(FRAME_HDR_BYTES);
    q_beat.eop   = 1'b1;
    q_valid      = pick_ok;
    rep_ready       = '0;
    rep_ready[pick] = pick_ok && q_ready;
  end

  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_out_fifo (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_beat),
    .out_valid, .out_ready, .out_data(out_beat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr         <= '0;
      ack_seq        <= '0;
      acks_generated <= '0;
    end else if (q_valid && q_ready) begin
      rr_ptr         <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
      ack_seq        <= ack_seq + 1'b1;
      acks_generated <= acks_generated + 1'b1;
    end
  end
endmodule
