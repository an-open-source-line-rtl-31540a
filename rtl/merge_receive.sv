// merge_receive: merges the frames of N HexBDG streams into one, a whole
// frame at a time.  The endpoint uses it as MergeReceive (Frame Arrival
// Units to the receiver) and, inside merge_fork_fdu, to merge the Frame
// Departure Units' outputs.
//
// While idle, the first input with a beat waiting, searched from a
// round-robin pointer, is granted; that beat passes through in the same
// cycle and the grant is held until the end-of-packet beat has passed, so
// frames are never interleaved.  The pointer then moves past the granted
// input.  Input 0 has priority after reset.  Output goes through a 2-entry
// FIFO, so up to one beat per cycle leaves.  The round-robin scheme and the
// priority at reset follow the document's MergeForkFDU description.
module merge_receive
  import dgr_pkg::*;
#(
  parameter int N = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   in_valid,
  output logic [N-1:0]   in_ready,
  input  hexbdg_t        in_beat [N],
  output logic           out_valid,
  input  logic           out_ready,
  output hexbdg_t        out_beat,
  output logic [31:0]    frames_merged
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [IW-1:0] lock_sel, rr_ptr, pick, grant;
  logic          pick_ok;

  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (in_valid[(int'(rr_ptr) + k) % N]) begin
        pick    = IW'((int'(rr_ptr) + k) % N);
        pick_ok = 1'b1;
      end
    end
    grant = locked ? lock_sel : pick;
  end

  logic    q_valid, q_ready;
  hexbdg_t q_beat;
  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_out_fifo (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_beat),
    .out_valid, .out_ready, .out_data(out_beat));

  always_comb begin
    in_ready        = '0;
    q_valid         = (locked || pick_ok) && in_valid[grant];
    q_beat          = in_beat[grant];
    in_ready[grant] = q_ready && (locked || pick_ok);
  end

  wire fire = q_valid && q_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked        <= 1'b0;
      lock_sel      <= '0;
      rr_ptr        <= '0;
      frames_merged <= '0;
    end else if (fire) begin
      if (q_beat.eop) begin
        locked        <= 1'b0;
        rr_ptr        <= (int'(grant) == N - 1) ? '0 : grant + 1'b1;
        frames_merged <= frames_merged + 1'b1;
      end else begin
        locked   <= 1'b1;
        lock_sel <= grant;
      end
    end
  end
endmodule
