// tb_dgrdma_bandwidth: bandwidth of the DG-RDMA endpoint with the largest
// payload of the protocol's bandwidth evaluation, 8192 bytes, over
// gigabit-paced links.
//
// Two endpoint pairs run side by side. In the first, endpoint A sends ten
// 8192-byte messages to B. In the second, both endpoints send ten each at
// the same time. Every endpoint keeps its default parameters apart from the
// producer's length setting (constant, 8192 bytes), so each frame fills all
// 517 beats of an FDU or FAU buffer.
//
// For every pair the bench checks:
//   - every message arrives once and correct;
//   - no frame is retransmitted, dropped or stale on these clean links.
//
// It also measures goodput: payload bytes per 8 ns cycle, as MB/s. The
// measurement runs from the 2nd to the 10th delivered message. The bench
// compares it with the link's own limit for that size. A data packet costs
// its payload, 66 bytes of frame and message headers, 14 bytes of Ethernet
// header (rounded up to whole quads) and 24 byte times of FCS, gap and
// preamble. For the two-way pair each direction also carries one 48-byte
// acknowledgement per frame. The bench requires 75% of the limit. The
// measured values are about 80% one way and 79% both ways; where the
// remaining time goes has not been traced.
module tb_dgrdma_bandwidth;
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

  localparam int NP = 2;
  localparam int LENS [NP] = '{8192, 8192};
  localparam int KS   [NP] = '{10, 10};
  localparam bit BOTHS[NP] = '{0, 1};

  logic             done    [NP];
  int               t_first [NP], t_last [NP];
  endpoint_status_t sa [NP], sb [NP];

  bw_pair #(.LEN(8192), .K(10), .BOTH(1'b0)) u_pair0 (
    .clk, .rst_n, .done(done[0]), .t_first(t_first[0]), .t_last(t_last[0]), .sa(sa[0]), .sb(sb[0]));
  bw_pair #(.LEN(8192), .K(10), .BOTH(1'b1)) u_pair1 (
    .clk, .rst_n, .done(done[1]), .t_first(t_first[1]), .t_last(t_last[1]), .sa(sa[1]), .sb(sb[1]));

  localparam int LIMIT = 400_000;
  initial begin
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int p = 0; p < NP; p++)
      $display("  pair %0d: done %0d produced %0d sent %0d acked %0d rxB %0d ackgenB %0d delivered %0d correct %0d err %0d idle %0d/%0d retx %0d",
               p, done[p], sa[p].msgs_produced, sa[p].frames_sent, sa[p].acks_matched, sb[p].frames_received, sb[p].acks_generated, sb[p].msgs_delivered, sb[p].correct_count, sb[p].error_count,
               sa[p].tx_idle, sb[p].tx_idle, sa[p].retransmissions);
    for (int p = 0; p < NP; p++) $display("  pair %0d: A txdg %0d txack %0d B l2drop %0d iddrop %0d bad %0d B txack %0d A rxstale %0d", p, sa[p].tx_dg_frames, sa[p].tx_ack_frames, sb[p].l2_dropped, sb[p].id_dropped, sb[p].bad_frames, sb[p].tx_ack_frames, sa[p].stale_acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int p = 0; p < NP; p++) if (!done[p]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real mbps, limit_mbps, need;
    int  wire_bytes;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int p = 0; p < NP; p++) begin
      int l, k;
      l = LENS[p];
      k = KS[p];
      check(sb[p].correct_count == 32'(k) && sb[p].error_count == 0,
            $sformatf("%0d B: %0d of %0d correct at B", l, sb[p].correct_count, k));
      if (BOTHS[p])
        check(sa[p].correct_count == 32'(k) && sa[p].error_count == 0,
              $sformatf("%0d B both ways: %0d of %0d correct at A", l, sa[p].correct_count, k));
      check(sa[p].retransmissions == 0 && sb[p].retransmissions == 0
            && sa[p].stale_acks == 0 && sb[p].stale_acks == 0
            && sa[p].l2_dropped == 0 && sb[p].l2_dropped == 0,
            $sformatf("%0d B: no retransmission, stale ack or drop", l));
      wire_bytes = 4 * ((l + 66 + 14 + 3) / 4) + 24 + (BOTHS[p] ? 48 : 0);
      mbps       = real'(k - 2) * real'(l) * 125.0 / real'(t_last[p] - t_first[p]);
      limit_mbps = real'(l) * 125.0 / real'(wire_bytes);
      need       = 0.75;
      $display("%5d-byte payloads%s: %6.1f MB/s (%4.0f Mb/s), link limit %6.1f MB/s (%3.0f%%)",
               l, BOTHS[p] ? ", both ways" : "          ", mbps, mbps * 8.0, limit_mbps,
               100.0 * mbps / limit_mbps);
      check(t_first[p] > 0 && t_last[p] > t_first[p], $sformatf("%0d B: timing points seen", l));
      check(mbps >= need * limit_mbps, $sformatf("%0d B: goodput at least %0.0f%% of the link limit", l, need * 100.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
