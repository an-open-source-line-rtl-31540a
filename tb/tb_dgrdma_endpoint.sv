// tb_dgrdma_endpoint: end-to-end test of two endpoints (IDs 1 and 2) joined
// by two link models, at reduced sizes (payloads 0..MAXL bytes, short
// retransmission timeout).
//
// Run 1, clean link (gigabit pace from 1 to 2): both producers send every message; each consumer must
// find all of them correct; every frame must be acknowledged.
// Run 2, lossy link: every 5th datagram from 1 to 2 and every 4th from 2
// to 1 is discarded, and a packet for another MAC and a frame for another
// endpoint ID are injected.  Retransmission must recover every message.
// Lost frames arrive late, so messages may be reordered and the in-order
// consumer may flag some; the test therefore checks that the set of
// delivered messages is complete with an order-independent sum (message
// count, total length and sum of all payload bytes).
// Each mechanism (retransmission, both MergeToWire switches, L2 and ID
// drops, both FDUs and both FAUs used, zero-length and partial-beat
// messages) must be seen at least once.
module tb_dgrdma_endpoint;
  import dgr_pkg::*;

  localparam int MAXL    = 300;
  localparam int TIMEOUT = 4000;
  localparam int NMSG    = MAXL + 1;

  logic clk = 1'b0, rst_n = 1'b1;
  always #4 clk = ~clk;   // 125 MHz

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [47:0] MAC_A = 48'h000A_3502_A242;
  localparam logic [47:0] MAC_B = 48'h000A_3502_76B3;

  logic  a_tx_v, a_tx_r, a_rx_v, a_rx_r, b_tx_v, b_tx_r, b_rx_v, b_rx_r;
  qabs_t a_tx_q, a_rx_q, b_tx_q, b_rx_q;
  logic  a_mon_v, b_mon_v;
  mlmesg_t a_mon, b_mon;
  endpoint_status_t sa, sb;
  int    drop_ab, drop_ba;
  logic  inj_req, inj_kind, gbe_ab, gbe_ba;
  int    ab_in, ab_drop, ba_in, ba_drop;
  // Endpoint 2 starts messages only in some 50-cycle windows, so that its
  // traffic, and the acknowledgments endpoint 1 returns for it, drift
  // against endpoint 1's own datagrams.
  logic  b_en = 1'b1;
  always @(posedge clk) if ($urandom_range(49) == 0) b_en <= 1'($urandom_range(1));

  dgrdma_endpoint #(.TIMEOUT(TIMEOUT), .MAXL(MAXL), .FRAME_BEATS(24)) u_a (
    .clk, .rst_n, .my_id(16'd1), .peer_id(16'd2), .my_mac(MAC_A), .peer_mac(MAC_B),
    .prod_enable(1'b1), .tx_valid(a_tx_v), .tx_ready(a_tx_r), .tx_quad(a_tx_q),
    .rx_valid(a_rx_v), .rx_ready(a_rx_r), .rx_quad(a_rx_q),
    .rx_mon_valid(a_mon_v), .rx_mon_msg(a_mon), .status(sa));
  dgrdma_endpoint #(.TIMEOUT(TIMEOUT), .MAXL(MAXL), .FRAME_BEATS(24)) u_b (
    .clk, .rst_n, .my_id(16'd2), .peer_id(16'd1), .my_mac(MAC_B), .peer_mac(MAC_A),
    .prod_enable(b_en), .tx_valid(b_tx_v), .tx_ready(b_tx_r), .tx_quad(b_tx_q),
    .rx_valid(b_rx_v), .rx_ready(b_rx_r), .rx_quad(b_rx_q),
    .rx_mon_valid(b_mon_v), .rx_mon_msg(b_mon), .status(sb));

  l2_link_model u_ab (
    .clk, .rst_n, .drop_every(drop_ab), .gbe_rate(gbe_ab), .dst_mac(MAC_B),
    .inject_req(inj_req), .inject_kind(inj_kind),
    .in_valid(a_tx_v), .in_ready(a_tx_r), .in_quad(a_tx_q),
    .out_valid(b_rx_v), .out_ready(b_rx_r), .out_quad(b_rx_q),
    .packets_in(ab_in), .packets_dropped(ab_drop));
  l2_link_model u_ba (
    .clk, .rst_n, .drop_every(drop_ba), .gbe_rate(gbe_ba), .dst_mac(MAC_A),
    .inject_req(1'b0), .inject_kind(1'b0),
    .in_valid(b_tx_v), .in_ready(b_tx_r), .in_quad(b_tx_q),
    .out_valid(a_rx_v), .out_ready(a_rx_r), .out_quad(a_rx_q),
    .packets_in(ba_in), .packets_dropped(ba_drop));

  // order-independent record of what each receiver delivered
  longint sum_len [2], sum_bytes [2], n_msg [2];
  int     rem [2];
  int     zero_len_seen, partial_seen, fdu1_used, fau1_used;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int e = 0; e < 2; e++) begin
        logic v; mlmesg_t m;
        v = (e == 1) ? b_mon_v : a_mon_v;
        m = (e == 1) ? b_mon : a_mon;
        if (v) begin
          if (m.is_meta) begin
            n_msg[e]++; sum_len[e] += longint'(m.meta.length); rem[e] = int'(m.meta.length);
            if (m.meta.length == 0) zero_len_seen++;
          end else begin
            for (int i = 0; i < 16 && i < rem[e]; i++) sum_bytes[e] += longint'(m.data[i]);
            if (rem[e] < 16) partial_seen++;
            rem[e] -= 16;
          end
        end
      end
      if (u_a.fd_holding[1]) fdu1_used++;
      if (u_b.fa_free_valid[1] == 1'b0) fau1_used++;
    end
  end

  // expected sums for messages of length 0..MAXL with rolling data
  longint exp_len, exp_bytes;
  initial begin
    longint k;
    exp_len = 0; exp_bytes = 0; k = 0;
    for (int l = 0; l <= MAXL; l++) begin
      exp_len += longint'(l);
      for (int i = 0; i < l; i++) begin exp_bytes += (k % 256); k++; end
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    #(8 * 3000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_all();
    #1 rst_n = 1'b0;
    for (int e = 0; e < 2; e++) begin sum_len[e] = 0; sum_bytes[e] = 0; n_msg[e] = 0; rem[e] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  endtask

  task automatic wait_done(int limit);
    int t;
    t = 0;
    while (!(sa.producer_done && sb.producer_done && sa.tx_idle && sb.tx_idle &&
             n_msg[0] == longint'(NMSG) && n_msg[1] == longint'(NMSG) && rem[0] <= 0 && rem[1] <= 0) && t < limit) begin
      @(posedge clk); t++;
    end
    repeat (200) @(posedge clk);
  endtask

  int t0, t1, retx_total, a2d, d2a;
  initial begin
    drop_ab = 0; drop_ba = 0; inj_req = 0; inj_kind = 0;
    // gigabit pace from 1 to 2 only: endpoint 1 then has datagrams and
    // acknowledgments waiting at once, which exercises its MergeToWire arbiter.
    gbe_ab = 1; gbe_ba = 0;
    // ---------------- run 1: clean link ----------------
    reset_all();
    t0 = cyc;
    wait_done(1000000);
    t1 = cyc;
    check(sa.producer_done && sb.producer_done, "run 1: producers finished");
    check(sb.correct_count == NMSG, $sformatf("run 1: B correct %0d of %0d", sb.correct_count, NMSG));
    check(sa.correct_count == NMSG, $sformatf("run 1: A correct %0d of %0d", sa.correct_count, NMSG));
    check(sa.error_count == 0 && sb.error_count == 0, "run 1: no consumer errors");
    check(sa.acks_matched == NMSG && sb.acks_matched == NMSG, "run 1: every frame acknowledged");
    check(sa.acks_generated == NMSG && sb.acks_generated == NMSG, "run 1: one ack per frame");
    check(sa.retransmissions == 0 && sb.retransmissions == 0, "run 1: no retransmission");
    check(sum_bytes[1] == exp_bytes && sum_len[1] == exp_len, "run 1: B payload sums");
    a2d = sa.ack_to_dg + sb.ack_to_dg;
    d2a = sa.dg_to_ack + sb.dg_to_ack;
    $display("run 1: %0d messages each way in %0d cycles; A tx ack=%0d dg=%0d a2d=%0d d2a=%0d", NMSG, t1 - t0, sa.tx_ack_frames, sa.tx_dg_frames, sa.ack_to_dg, sa.dg_to_ack);

    // ---------------- run 2: lossy link, injected foreign packets ------
    drop_ab = 5; drop_ba = 4;
    reset_all();
    repeat (50) @(posedge clk);
    inj_kind = 1'b0; inj_req = 1'b1; @(posedge clk); inj_req = 1'b0;
    repeat (300) @(posedge clk);
    inj_kind = 1'b1; inj_req = 1'b1; @(posedge clk); inj_req = 1'b0;
    wait_done(1000000);
    check(ab_drop > 0 && ba_drop > 0, "run 2: link dropped packets");
    check(sa.retransmissions >= ba_drop / 2 && sa.retransmissions > 0, "run 2: A retransmitted");
    check(sb.retransmissions > 0, "run 2: B retransmitted");
    check(n_msg[1] == longint'(NMSG) && sum_len[1] == exp_len && sum_bytes[1] == exp_bytes,
          $sformatf("run 2: B received all (%0d msgs)", n_msg[1]));
    check(n_msg[0] == longint'(NMSG) && sum_len[0] == exp_len && sum_bytes[0] == exp_bytes,
          $sformatf("run 2: A received all (%0d msgs)", n_msg[0]));
    check(sb.correct_count + sb.error_count == NMSG, "run 2: B consumer saw every message");
    check(sb.l2_dropped == 1, $sformatf("run 2: L2 drop count %0d", sb.l2_dropped));
    check(sb.id_dropped == 1, $sformatf("run 2: ID drop count %0d", sb.id_dropped));
    check(sa.bad_frames == 0 && sb.bad_frames == 0, "run 2: no truncated frames");
    retx_total = sa.retransmissions + sb.retransmissions;
    a2d += sa.ack_to_dg + sb.ack_to_dg;
    d2a += sa.dg_to_ack + sb.dg_to_ack;

    // ---------------- mechanism coverage ----------------
    $display("coverage: retx=%0d ack->dg=%0d dg->ack=%0d zero_len=%0d partial=%0d fdu1=%0d fau1=%0d",
             retx_total, a2d, d2a, zero_len_seen, partial_seen, fdu1_used, fau1_used);
    check(retx_total > 0, "coverage: retransmission");
    check(a2d > 0, "coverage: MergeToWire Ack Out -> Datagram Out");
    check(d2a > 0, "coverage: MergeToWire Datagram Out -> Ack Out");
    check(zero_len_seen > 0, "coverage: zero-length message");
    check(partial_seen > 0, "coverage: partial last beat");
    check(fdu1_used > 0, "coverage: second FDU used");
    check(fau1_used > 0, "coverage: second FAU used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
