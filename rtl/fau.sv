// fau: Frame Arrival Unit.  It takes one incoming frame at a time into a
// block RAM, reports the frame to the acknowledgment aggregator and forwards
// it to merge_receive, then announces itself free again.
//
// Sequence: announce free (free_valid until merge_fork_fau takes the token);
// load the frame, saving the source ID (header bytes 2-3) and frame ID
// (bytes 4-5) from the first beat; once the whole frame is in, offer
// {source ID, frame ID} to the aggregator (rep_valid/rep_ready) and, at the
// same time, send the stored beats out, one per cycle; when both are done,
// announce free.  The acknowledgment is thus requested as soon as the frame
// has arrived in full, without waiting for it to reach the consumer.  A
// frame longer than DEPTH_BEATS beats is truncated.  The behaviour follows
// the document; DEPTH_BEATS defaults to a frame with the largest payload the
// document measures (8192 bytes).
module fau
  import dgr_pkg::*;
#(
  parameter int DEPTH_BEATS = FRAME_MAX_BEATS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  hexbdg_t     in_beat,
  output logic        free_valid,
  input  logic        free_ready,
  output logic        rep_valid,
  input  logic        rep_ready,
  output logic [15:0] rep_sid,
  output logic [15:0] rep_fid,
  output logic        out_valid,
  input  logic        out_ready,
  output hexbdg_t     out_beat,
  output logic [31:0] frames_received
);
  localparam int AW = $clog2(DEPTH_BEATS + 1);
  localparam int IW = DEPTH_BEATS > 1 ? $clog2(DEPTH_BEATS) : 1;  // RAM address
  typedef enum logic [1:0] {A_FREE, A_LOAD, A_SEND} astate_e;

  astate_e       state;
  hexbdg_t       mem [DEPTH_BEATS];
  logic [AW-1:0] wr_ptr, rd_ptr, n_beats;
  logic          first_beat, rep_pending, send_done;

  assign free_valid = (state == A_FREE);
  assign in_ready   = (state == A_LOAD);
  assign rep_valid  = (state == A_SEND) && rep_pending;
  assign out_valid  = (state == A_SEND) && !send_done;
  assign out_beat   = mem[rd_ptr < AW'(DEPTH_BEATS) ? rd_ptr[IW-1:0] : '0];

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;
  wire can_wr   = int'(wr_ptr) < DEPTH_BEATS;
  wire last_out = out_fire && (rd_ptr + 1'b1 == n_beats);

  always_ff @(posedge clk) begin
    if (in_fire && can_wr) mem[wr_ptr[IW-1:0]] <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= A_FREE;
      wr_ptr          <= '0;
      rd_ptr          <= '0;
      n_beats         <= '0;
      first_beat      <= 1'b1;
      rep_pending     <= 1'b0;
      send_done       <= 1'b0;
      rep_sid         <= '0;
      rep_fid         <= '0;
      frames_received <= '0;
    end else begin
      case (state)
        A_FREE: if (free_ready) begin
          state      <= A_LOAD;
          wr_ptr     <= '0;
          first_beat <= 1'b1;
        end
        A_LOAD: if (in_fire) begin
          if (can_wr) wr_ptr <= wr_ptr + 1'b1;
          first_beat <= 1'b0;
          if (first_beat) begin
            rep_sid <= {in_beat.data[2], in_beat.data[3]};
            rep_fid <= {in_beat.data[4], in_beat.data[5]};
          end
          if (in_beat.eop) begin
            n_beats         <= can_wr ? wr_ptr + 1'b1 : wr_ptr;
            rd_ptr          <= '0;
            rep_pending     <= 1'b1;
            send_done       <= 1'b0;
            frames_received <= frames_received + 1'b1;
            state           <= A_SEND;
          end
        end
        default: begin  // A_SEND
          if (rep_valid && rep_ready) rep_pending <= 1'b0;
          if (out_fire) rd_ptr <= rd_ptr + 1'b1;
          if (last_out) send_done <= 1'b1;
          if ((send_done || last_out) && (!rep_pending || rep_ready)) state <= A_FREE;
        end
      endcase
    end
  end
endmodule
