// tb_dgrdma_full: full-size run of two DG-RDMA endpoints at their default
// parameters (no parameter overrides).
//
// Endpoint A (ID 1) and endpoint B (ID 2) are joined by two gigabit Ethernet
// link models, one per direction: one byte per 125 MHz cycle, plus 24 byte
// times of FCS, inter-frame gap and preamble per packet, and no losses. Each
// endpoint's producer runs its default sweep: one message of every length
// from 0 to 1024 bytes, 1025 messages, with rolling payload data. The
// endpoints build frames, hold them in their FDUs until acknowledged, and
// check what they receive against their own control copy of the sender's
// stream.
//
// One complete operation is the whole sweep delivered both ways. The bench
// checks that each consumer counts 1025 correct messages and no errors, that
// every frame was acknowledged, that no frame was retransmitted, dropped or
// found bad on this clean link, and that both ends return to idle.
//
// It also measures goodput (payload bytes per cycle, as MB/s at 125 MHz) over
// the last 100 messages, whose lengths are 925..1024 bytes, and compares it
// with the link's own limit for those lengths: each data frame costs its
// payload plus 66 bytes of frame and message headers, 14 bytes of Ethernet
// header and 24 byte times of gap, and each acknowledgement travelling the
// same way for the other endpoint's traffic costs 10 + 14 + 24 bytes. With
// traffic both ways, each acknowledgement may wait behind a full-size frame
// going the other way, and two FDUs allow only two frames in flight, so the
// goodput stays below the link limit (about 82% here); the bench requires 75%.
module tb_dgrdma_full;
  import dgr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #4 clk = ~clk;   // 125 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [47:0] MAC_A = 48'h000A_3502_A242;
  localparam logic [47:0] MAC_B = 48'h000A_3502_76B3;
  localparam int NMSG = 1025;

  logic  a_tx_v, a_tx_r, a_rx_v, a_rx_r, b_tx_v, b_tx_r, b_rx_v, b_rx_r;
  qabs_t a_tx_q, a_rx_q, b_tx_q, b_rx_q;
  logic  a_mon_v, b_mon_v;
  mlmesg_t a_mon, b_mon;
  endpoint_status_t sa, sb;
  int    ab_in, ab_drop, ba_in, ba_drop;

  dgrdma_endpoint u_a (
    .clk, .rst_n, .my_id(16'd1), .peer_id(16'd2), .my_mac(MAC_A), .peer_mac(MAC_B),
    .prod_enable(1'b1), .tx_valid(a_tx_v), .tx_ready(a_tx_r), .tx_quad(a_tx_q),
    .rx_valid(a_rx_v), .rx_ready(a_rx_r), .rx_quad(a_rx_q),
    .rx_mon_valid(a_mon_v), .rx_mon_msg(a_mon), .status(sa));
  dgrdma_endpoint u_b (
    .clk, .rst_n, .my_id(16'd2), .peer_id(16'd1), .my_mac(MAC_B), .peer_mac(MAC_A),
    .prod_enable(1'b1), .tx_valid(b_tx_v), .tx_ready(b_tx_r), .tx_quad(b_tx_q),
    .rx_valid(b_rx_v), .rx_ready(b_rx_r), .rx_quad(b_rx_q),
    .rx_mon_valid(b_mon_v), .rx_mon_msg(b_mon), .status(sb));

  l2_link_model u_ab (
    .clk, .rst_n, .drop_every(0), .gbe_rate(1'b1), .dst_mac(MAC_B),
    .inject_req(1'b0), .inject_kind(1'b0),
    .in_valid(a_tx_v), .in_ready(a_tx_r), .in_quad(a_tx_q),
    .out_valid(b_rx_v), .out_ready(b_rx_r), .out_quad(b_rx_q),
    .packets_in(ab_in), .packets_dropped(ab_drop));
  l2_link_model u_ba (
    .clk, .rst_n, .drop_every(0), .gbe_rate(1'b1), .dst_mac(MAC_A),
    .inject_req(1'b0), .inject_kind(1'b0),
    .in_valid(b_tx_v), .in_ready(b_tx_r), .in_quad(b_tx_q),
    .out_valid(a_rx_v), .out_ready(a_rx_r), .out_quad(a_rx_q),
    .packets_in(ba_in), .packets_dropped(ba_drop));

  localparam int LIMIT = 2_000_000;
  initial begin
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (A correct %0d, B correct %0d)", sa.correct_count, sb.correct_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  // cycle at which endpoint B had delivered n messages
  int t_b924 = -1, t_b1025 = -1;
  always @(posedge clk) begin
    if (t_b924 < 0 && sb.msgs_delivered == 32'd925) t_b924 = cycle;
    if (t_b1025 < 0 && sb.msgs_delivered == 32'(NMSG)) t_b1025 = cycle;
  end

  initial begin
    int t_end, bytes, wire_bytes;
    real mbps, limit_mbps;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!(sa.correct_count + sa.error_count == NMSG && sb.correct_count + sb.error_count == NMSG
             && sa.tx_idle && sb.tx_idle)) @(posedge clk);
    t_end = cycle;
    repeat (20) @(posedge clk);
    $display("sweep 0..1024 bytes delivered both ways in %0d cycles (%0d us at 125 MHz)", t_end, t_end / 125);
    check(sa.correct_count == NMSG && sb.correct_count == NMSG, "1025 correct messages at each end");
    check(sa.error_count == 0 && sb.error_count == 0, "no message errors");
    check(sa.msgs_produced == NMSG && sb.msgs_produced == NMSG && sa.producer_done && sb.producer_done, "producers finished");
    check(sa.frames_sent == NMSG && sb.frames_sent == NMSG, "one frame per message");
    check(sa.acks_matched == NMSG && sb.acks_matched == NMSG, "every frame acknowledged");
    check(sa.acks_generated == NMSG && sb.acks_generated == NMSG, "every frame received once");
    check(sa.retransmissions == 0 && sb.retransmissions == 0, "no retransmission on a clean link");
    check(sa.l2_dropped == 0 && sb.l2_dropped == 0 && sa.id_dropped == 0 && sb.id_dropped == 0
          && sa.bad_frames == 0 && sb.bad_frames == 0 && sa.stale_acks == 0 && sb.stale_acks == 0,
          "nothing dropped or bad");
    check(sa.tx_idle && sb.tx_idle, "both ends idle");
    // goodput over the last 100 messages (lengths 925..1024)
    bytes = 0; wire_bytes = 0;
    for (int l = 925; l <= 1024; l++) begin
      bytes += l;
      wire_bytes += 4 * ((l + 66 + 14 + 3) / 4) + 24 + (12 + 24);  // data frame + ack from the other end
    end
    mbps       = real'(bytes) * 125.0 / real'(t_b1025 - t_b924);
    limit_mbps = real'(bytes) * 125.0 / real'(wire_bytes);
    $display("goodput for 925..1024-byte messages: %0.1f MB/s (%0.0f Mb/s); link limit %0.1f MB/s",
             mbps, mbps * 8.0, limit_mbps);
    check(t_b924 > 0 && t_b1025 > t_b924, "timing points seen");
    check(mbps >= 0.75 * limit_mbps, "goodput at least 75% of the link limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
