// bw_pair: two DG-RDMA endpoints joined by gigabit-paced link models, for
// bandwidth measurements (testbench helper, not synthesizable).
//
// Endpoint A sends constant-length messages of LEN bytes until it has
// produced K of them. If BOTH is set, endpoint B sends the same traffic
// back at the same time, so each direction's link also carries the
// acknowledgements for the other direction. Apart from the producer
// settings, every endpoint parameter keeps its default (two FDUs, two FAUs,
// 517-beat frame buffers, 1 ms timeout).
//
// Outputs, all valid once done is high:
//   t_first/t_last  cycle at which B had delivered 2 and K messages; the
//                   goodput is (K-2)*LEN bytes over t_last-t_first cycles,
//                   which leaves out the pipeline fill
//   sa/sb           status counters of both endpoints
//   done            both consumers have seen every message they should
//                   receive, and both ends are idle
module bw_pair
  import dgr_pkg::*;
#(
  parameter int LEN  = 1024,
  parameter int K    = 16,
  parameter bit BOTH = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             done,
  output int               t_first,
  output int               t_last,
  output endpoint_status_t sa,
  output endpoint_status_t sb
);
  localparam logic [47:0] MAC_A = 48'h000A_3502_A242;
  localparam logic [47:0] MAC_B = 48'h000A_3502_76B3;

  logic  a_tx_v, a_tx_r, a_rx_v, a_rx_r, b_tx_v, b_tx_r, b_rx_v, b_rx_r;
  qabs_t a_tx_q, a_rx_q, b_tx_q, b_rx_q;
  logic  a_mon_v, b_mon_v;
  mlmesg_t a_mon, b_mon;
  int    ab_in, ab_drop, ba_in, ba_drop;
  logic  a_en, b_en;

  // stop each producer after K messages (a new message starts only while
  // its enable is high)
  assign a_en = sa.msgs_produced < 32'(K);
  assign b_en = BOTH && sb.msgs_produced < 32'(K);

  dgrdma_endpoint #(.LMODE(LEN_CONSTANT), .LENGTH(LEN)) u_a (
    .clk, .rst_n, .my_id(16'd1), .peer_id(16'd2), .my_mac(MAC_A), .peer_mac(MAC_B),
    .prod_enable(a_en), .tx_valid(a_tx_v), .tx_ready(a_tx_r), .tx_quad(a_tx_q),
    .rx_valid(a_rx_v), .rx_ready(a_rx_r), .rx_quad(a_rx_q),
    .rx_mon_valid(a_mon_v), .rx_mon_msg(a_mon), .status(sa));
  dgrdma_endpoint #(.LMODE(LEN_CONSTANT), .LENGTH(LEN)) u_b (
    .clk, .rst_n, .my_id(16'd2), .peer_id(16'd1), .my_mac(MAC_B), .peer_mac(MAC_A),
    .prod_enable(b_en), .tx_valid(b_tx_v), .tx_ready(b_tx_r), .tx_quad(b_tx_q),
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

  int cycle;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle   <= 0;
      t_first <= -1;
      t_last  <= -1;
    end else begin
      cycle <= cycle + 1;
      if (t_first < 0 && sb.msgs_delivered == 32'd2) t_first <= cycle;
      if (t_last < 0 && sb.msgs_delivered == 32'(K)) t_last <= cycle;
    end
  end

  assign done = rst_n && sb.correct_count + sb.error_count == 32'(K)
             && (!BOTH || sa.correct_count + sa.error_count == 32'(K))
             && sa.tx_idle && sb.tx_idle;
endmodule
