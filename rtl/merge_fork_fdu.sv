// merge_fork_fdu: MergeForkFDU.  Outgoing: merges the N Frame Departure
// Units' frames into the one datagram stream towards merge_to_wire, whole
// frames at a time, round robin with FDU 0 first after reset (a
// merge_receive instance).  Incoming: passes the acknowledgment frames that
// merge_to_wire has routed to the sending side on to the acknowledgment
// tracker through a FIFO.  Both directions follow the document; the FIFO
// depths (2 beats) are this design's choice.
module merge_fork_fdu
  import dgr_pkg::*;
#(
  parameter int N = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   fdu_valid,
  output logic [N-1:0]   fdu_ready,
  input  hexbdg_t        fdu_beat [N],
  output logic           dg_valid,
  input  logic           dg_ready,
  output hexbdg_t        dg_beat,
  input  logic           ack_in_valid,
  output logic           ack_in_ready,
  input  hexbdg_t        ack_in_beat,
  output logic           ack_out_valid,
  input  logic           ack_out_ready,
  output hexbdg_t        ack_out_beat,
  output logic [31:0]    frames_merged
);
  merge_receive #(.N(N)) u_merge (
    .clk, .rst_n, .in_valid(fdu_valid), .in_ready(fdu_ready), .in_beat(fdu_beat),
    .out_valid(dg_valid), .out_ready(dg_ready), .out_beat(dg_beat), .frames_merged);

  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_ack_fifo (
    .clk, .rst_n, .in_valid(ack_in_valid), .in_ready(ack_in_ready), .in_data(ack_in_beat),
    .out_valid(ack_out_valid), .out_ready(ack_out_ready), .out_data(ack_out_beat));
endmodule
