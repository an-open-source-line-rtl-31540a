// merge_to_wire: MergeToWire, the one point where the sending and receiving
// sides of an endpoint meet the wire.
//
// Transmit: a three-state arbiter (IDLE, ACK_OUT, DG_OUT) chooses between
// acknowledgment frames from merge_fork_fau and datagram frames from
// merge_fork_fdu and sends whole frames only.  From IDLE a waiting ack frame
// goes first, a datagram only when no ack waits.  At the end of an ack frame
// the arbiter moves to DG_OUT if a datagram waits, else to IDLE; at the end
// of a datagram it moves to ACK_OUT if an ack waits, else to IDLE.  Inside a
// frame it stays put.  These transitions are the document's; IDLE costs one
// cycle before the next frame.
//
// Receive: the first beat of each incoming frame decides its route.  If its
// destination ID differs from my_id the frame is dropped; otherwise a
// non-zero ACKCount sends it to the acknowledgment tracker (via
// merge_fork_fdu) and a zero ACKCount to the receiving side (via
// merge_fork_fau).  The route holds until the end-of-packet beat.  Each of
// the three outputs has a 2-entry FIFO (this design's choice).
module merge_to_wire
  import dgr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] my_id,
  // transmit side
  input  logic        dg_valid,
  output logic        dg_ready,
  input  hexbdg_t     dg_beat,
  input  logic        ack_valid,
  output logic        ack_ready,
  input  hexbdg_t     ack_beat,
  output logic        tx_valid,
  input  logic        tx_ready,
  output hexbdg_t     tx_beat,
  // receive side
  input  logic        rx_valid,
  output logic        rx_ready,
  input  hexbdg_t     rx_beat,
  output logic        rx_ack_valid,
  input  logic        rx_ack_ready,
  output hexbdg_t     rx_ack_beat,
  output logic        rx_dg_valid,
  input  logic        rx_dg_ready,
  output hexbdg_t     rx_dg_beat,
  // status
  output logic [31:0] tx_ack_frames,
  output logic [31:0] tx_dg_frames,
  output logic [31:0] ack_to_dg_switches,
  output logic [31:0] dg_to_ack_switches,
  output logic [31:0] rx_dropped
);
  // ---------------- transmit arbiter ----------------
  typedef enum logic [1:0] {T_IDLE, T_ACK_OUT, T_DG_OUT} tstate_e;
  tstate_e tstate;

  logic    tq_valid, tq_ready;
  hexbdg_t tq_beat;
  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_tx_fifo (
    .clk, .rst_n, .in_valid(tq_valid), .in_ready(tq_ready), .in_data(tq_beat),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_beat));

  always_comb begin
    tq_valid  = 1'b0;
    tq_beat   = dg_beat;
    dg_ready  = 1'b0;
    ack_ready = 1'b0;
    case (tstate)
      T_ACK_OUT: begin tq_valid = ack_valid; tq_beat = ack_beat; ack_ready = tq_ready; end
      T_DG_OUT:  begin tq_valid = dg_valid;  tq_beat = dg_beat;  dg_ready  = tq_ready; end
      default: ;
    endcase
  end

  wire ack_end = (tstate == T_ACK_OUT) && ack_valid && ack_ready && ack_beat.eop;
  wire dg_end  = (tstate == T_DG_OUT)  && dg_valid  && dg_ready  && dg_beat.eop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate             <= T_IDLE;
      tx_ack_frames      <= '0;
      tx_dg_frames       <= '0;
      ack_to_dg_switches <= '0;
      dg_to_ack_switches <= '0;
    end else begin
      case (tstate)
        T_IDLE: begin
          if (ack_valid)     tstate <= T_ACK_OUT;
          else if (dg_valid) tstate <= T_DG_OUT;
        end
        T_ACK_OUT: if (ack_end) begin
          tx_ack_frames <= tx_ack_frames + 1'b1;
          if (dg_valid) begin
            tstate             <= T_DG_OUT;
            ack_to_dg_switches <= ack_to_dg_switches + 1'b1;
          end else tstate <= T_IDLE;
        end
        default: if (dg_end) begin
          tx_dg_frames <= tx_dg_frames + 1'b1;
          if (ack_valid) begin
            tstate             <= T_ACK_OUT;
            dg_to_ack_switches <= dg_to_ack_switches + 1'b1;
          end else tstate <= T_IDLE;
        end
      endcase
    end
  end

  // ---------------- receive router ----------------
  typedef enum logic [1:0] {R_NONE, R_ACK, R_DG, R_DROP} route_e;
  route_e     rlock, route;
  frame_hdr_t rh;

  logic    ra_valid, ra_ready, rd_valid, rd_ready;
  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_rx_ack_fifo (
    .clk, .rst_n, .in_valid(ra_valid), .in_ready(ra_ready), .in_data(rx_beat),
    .out_valid(rx_ack_valid), .out_ready(rx_ack_ready), .out_data(rx_ack_beat));
  stream_fifo #(.T(hexbdg_t), .DEPTH(2)) u_rx_dg_fifo (
    .clk, .rst_n, .in_valid(rd_valid), .in_ready(rd_ready), .in_data(rx_beat),
    .out_valid(rx_dg_valid), .out_ready(rx_dg_ready), .out_data(rx_dg_beat));

  always_comb begin
    rh = frame_hdr_parse(rx_beat.data);
    if (rlock != R_NONE)        route = rlock;
    else if (rh.did != my_id)   route = R_DROP;
    else if (rh.ack_count != 0) route = R_ACK;
    else                        route = R_DG;
    ra_valid = rx_valid && route == R_ACK;
    rd_valid = rx_valid && route == R_DG;
    case (route)
      R_ACK:   rx_ready = ra_ready;
      R_DG:    rx_ready = rd_ready;
      default: rx_ready = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rlock      <= R_NONE;
      rx_dropped <= '0;
    end else if (rx_valid && rx_ready) begin
      rlock <= rx_beat.eop ? R_NONE : route;
      if (rx_beat.eop && route == R_DROP) rx_dropped <= rx_dropped + 1'b1;
    end
  end
endmodule
