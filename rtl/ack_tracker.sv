// ack_tracker: Acknowledgment Tracker, one per endpoint, shared by all N
// Frame Departure Units.  It records the frame ID each FDU has in flight and
// reads the acknowledgment frames that arrive from the peer.
//
// From an acknowledgment frame it uses the frame header in the first beat:
// ACKStart (bytes 6-7) and ACKCount (byte 8).  Every FDU whose in-flight ID
// lies in [ACKStart, ACKStart+ACKCount) (16-bit, wrapping) gets an ack_valid
// pulse with its ID in the following cycle and its entry is cleared; the
// rest of the frame is discarded.  An acknowledgment that matches nothing
// (a duplicate, or one for a retransmitted frame already released) is
// counted in stale_acks.  Frame IDs are accepted at once (fid_ready is
// always high): an FDU has at most one frame in flight.  The range check
// over ACKStart/ACKCount follows the document's description of the frame
// header; the table of one entry per FDU is this design's choice.
module ack_tracker
  import dgr_pkg::*;
#(
  parameter int N = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        fid_valid,
  output logic [N-1:0]        fid_ready,
  input  logic [N-1:0][15:0]  fid,
  input  logic                in_valid,
  output logic                in_ready,
  input  hexbdg_t             in_beat,
  output logic [N-1:0]        ack_valid,
  output logic [N-1:0][15:0]  ack_fid,
  output logic [31:0]         acks_matched,
  output logic [31:0]         stale_acks
);
  logic [N-1:0]       inflight;
  logic [N-1:0][15:0] inflight_id;
  logic               in_body;   // skipping the rest of an ack frame

  frame_hdr_t   h;
  logic [N-1:0] hit;
  always_comb begin
    h = frame_hdr_parse(in_beat.data);
    for (int i = 0; i < N; i++)
      hit[i] = inflight[i] && (16'(inflight_id[i] - h.ack_start) < 16'(h.ack_count));
  end

  assign fid_ready = '1;
  assign in_ready  = 1'b1;
  wire   hdr_fire  = in_valid && !in_body;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight     <= '0;
      inflight_id  <= '0;
      in_body      <= 1'b0;
      ack_valid    <= '0;
      ack_fid      <= '0;
      acks_matched <= '0;
      stale_acks   <= '0;
    end else begin
      ack_valid <= '0;
      for (int i = 0; i < N; i++) begin
        if (fid_valid[i]) begin
          inflight[i]    <= 1'b1;
          inflight_id[i] <= fid[i];
        end
      end
      if (in_valid) in_body <= !in_beat.eop;
      if (hdr_fire) begin
        for (int i = 0; i < N; i++) begin
          if (hit[i]) begin
            ack_valid[i] <= 1'b1;
            ack_fid[i]   <= inflight_id[i];
            inflight[i]  <= 1'b0;
          end
        end
        if (hit != '0) acks_matched <= acks_matched + 1'b1;
        else           stale_acks   <= stale_acks + 1'b1;
      end
    end
  end
endmodule
