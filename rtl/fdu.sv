// fdu: Frame Departure Unit.  It takes one frame at a time, keeps it in a
// RAM, sends it, and holds it until the acknowledgment tracker reports
// that the frame has been acknowledged.  If a cycle counter reaches TIMEOUT
// first, the frame is sent again from the RAM, as often as needed.
//
// Sequence: announce free (free_valid until fork_send takes the token);
// load the frame, saving the frame ID from header bytes 4-5 and passing it to
// the tracker (fid_valid/fid_ready); send the beats once the tracker has the
// ID; wait for ack_valid with a matching ack_fid, then announce free again.
// An acknowledgment that arrives during a retransmission is remembered and
// frees the unit when that transmission ends.  A frame longer than
// DEPTH_BEATS beats is truncated (its extra beats are dropped).
//
// The document gives the behaviour (frame buffer, timeout and retransmission,
// frame ID to the tracker, free signal); the timeout value is not given and
// TIMEOUT's default (125,000 cycles = 1 ms at 125 MHz) is this design's
// choice, long enough for two full-size frames at 1 Gb/s plus the return
// acknowledgment.  DEPTH_BEATS defaults to a frame carrying the document's
// largest payload, 8192 bytes.  The RAM is read asynchronously, so one beat
// leaves per cycle.
module fdu
  import dgr_pkg::*;
#(
  parameter int DEPTH_BEATS = FRAME_MAX_BEATS,
  parameter int TIMEOUT     = 125000
) (
  input  logic        clk,
  input  logic        rst_n,
  // frame in, from fork_send
  input  logic        in_valid,
  output logic        in_ready,
  input  hexbdg_t     in_beat,
  output logic        free_valid,
  input  logic        free_ready,
  // frame ID to the acknowledgment tracker, acknowledgment back
  output logic        fid_valid,
  input  logic        fid_ready,
  output logic [15:0] fid,
  input  logic        ack_valid,
  input  logic [15:0] ack_fid,
  // frame out, to merge_fork_fdu
  output logic        out_valid,
  input  logic        out_ready,
  output hexbdg_t     out_beat,
  // status
  output logic        holding,        // a frame is in flight (sent, not yet acked)
  output logic        timeout_pulse,
  output logic [31:0] retransmissions
);
  localparam int AW = $clog2(DEPTH_BEATS + 1);
  localparam int IW = DEPTH_BEATS > 1 ? $clog2(DEPTH_BEATS) : 1;  // RAM address
  localparam int TW = $clog2(TIMEOUT + 1);

  typedef enum logic [1:0] {F_FREE, F_LOAD, F_SEND, F_WAIT} fstate_e;

  fstate_e       state;
  hexbdg_t       mem [DEPTH_BEATS];
  logic [AW-1:0] wr_ptr, rd_ptr, n_beats;
  logic          first_beat, fid_pending, acked;
  logic [15:0]   frame_id;
  logic [TW-1:0] timer;

  assign free_valid = (state == F_FREE);
  assign holding    = (state == F_SEND) || (state == F_WAIT);
  assign in_ready   = (state == F_LOAD);
  assign fid_valid  = fid_pending;
  assign fid        = frame_id;
  assign out_valid  = (state == F_SEND) && !fid_pending;
  assign out_beat   = mem[rd_ptr < AW'(DEPTH_BEATS) ? rd_ptr[IW-1:0] : '0];

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;
  wire ack_hit  = ack_valid && ack_fid == frame_id && (state == F_SEND || state == F_WAIT);
  wire can_wr   = int'(wr_ptr) < DEPTH_BEATS;

  always_ff @(posedge clk) begin
    if (in_fire && can_wr) mem[wr_ptr[IW-1:0]] <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= F_FREE;
      wr_ptr          <= '0;
      rd_ptr          <= '0;
      n_beats         <= '0;
      first_beat      <= 1'b1;
      fid_pending     <= 1'b0;
      acked           <= 1'b0;
      frame_id        <= '0;
      timer           <= '0;
      timeout_pulse   <= 1'b0;
      retransmissions <= '0;
    end else begin
      timeout_pulse <= 1'b0;
      if (fid_valid && fid_ready) fid_pending <= 1'b0;
      case (state)
        F_FREE: if (free_ready) begin
          state      <= F_LOAD;
          wr_ptr     <= '0;
          first_beat <= 1'b1;
          acked      <= 1'b0;
        end
        F_LOAD: if (in_fire) begin
          if (can_wr) wr_ptr <= wr_ptr + 1'b1;
          first_beat <= 1'b0;
          if (first_beat) begin
            frame_id    <= {in_beat.data[4], in_beat.data[5]};
            fid_pending <= 1'b1;
          end
          if (in_beat.eop) begin
            n_beats <= can_wr ? wr_ptr + 1'b1 : wr_ptr;
            rd_ptr  <= '0;
            state   <= F_SEND;
          end
        end
        F_SEND: begin
          if (ack_hit) acked <= 1'b1;
          if (out_fire) begin
            rd_ptr <= rd_ptr + 1'b1;
            if (rd_ptr + 1'b1 == n_beats) begin
              timer <= '0;
              state <= (acked || ack_hit) ? F_FREE : F_WAIT;
            end
          end
        end
        default: begin  // F_WAIT
          if (ack_hit) state <= F_FREE;
          else if (int'(timer) >= TIMEOUT - 1) begin
            timeout_pulse   <= 1'b1;
            retransmissions <= retransmissions + 1'b1;
            rd_ptr          <= '0;
            state           <= F_SEND;
          end else timer <= timer + 1'b1;
        end
      endcase
    end
  end
endmodule
