// merge_fork_fau: MergeForkFAU.  Incoming: assigns each datagram frame that
// merge_to_wire routes to the receiving side to a Frame Arrival Unit that
// has announced itself free (the same frame-dispatch logic as ForkSend, a
// fork_send instance).  Outgoing: passes the acknowledgment frames built by
// the acknowledgment aggregator on to merge_to_wire through a FIFO.  Both
// directions follow the document.  The acknowledgment FIFO depth
// (ACK_DEPTH, 8 frames) is this design's choice: it lets the Frame Arrival
// Units keep reporting while the wire is busy with a long datagram, so that
// the endpoint's own incoming traffic, acknowledgments for its FDUs
// included, is not held up behind its outgoing acknowledgments.
module merge_fork_fau
  import dgr_pkg::*;
#(
  parameter int N         = 2,
  parameter int ACK_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           dg_valid,
  output logic           dg_ready,
  input  hexbdg_t        dg_beat,
  output logic [N-1:0]   fau_valid,
  input  logic [N-1:0]   fau_ready,
  output hexbdg_t        fau_beat,
  input  logic [N-1:0]   free_valid,
  output logic [N-1:0]   free_ready,
  input  logic           ack_in_valid,
  output logic           ack_in_ready,
  input  hexbdg_t        ack_in_beat,
  output logic           ack_out_valid,
  input  logic           ack_out_ready,
  output hexbdg_t        ack_out_beat,
  output logic [31:0]    frames_forked
);
  fork_send #(.N(N)) u_fork (
    .clk, .rst_n, .in_valid(dg_valid), .in_ready(dg_ready), .in_beat(dg_beat),
    .out_valid(fau_valid), .out_ready(fau_ready), .out_beat(fau_beat),
    .free_valid, .free_ready, .frames_forked);

  stream_fifo #(.T(hexbdg_t), .DEPTH(ACK_DEPTH)) u_ack_fifo (
    .clk, .rst_n, .in_valid(ack_in_valid), .in_ready(ack_in_ready), .in_data(ack_in_beat),
    .out_valid(ack_out_valid), .out_ready(ack_out_ready), .out_data(ack_out_beat));
endmodule
