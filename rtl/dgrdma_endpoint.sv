// dgrdma_endpoint: one full-duplex DG-RDMA endpoint, the top of the design.
// It sends its producer's messages to a peer endpoint as acknowledged,
// retransmitted datagrams and receives the peer's datagrams, acknowledges
// them and checks them in its consumer.  The MAC (and the PHY behind it) is
// outside: the endpoint's wire side is the 4-byte QABS packet stream in each
// direction, which a gigabit MAC serialises at one byte per cycle.
//
// Sending path:  producer -> sender -> fork_send -> N_FDU x fdu ->
//   merge_fork_fdu -> merge_to_wire -> funnel -> l2_inserter -> tx_*.
// Receiving path: rx_* -> l2_remover -> unfunnel -> merge_to_wire, which
//   routes acknowledgments to merge_fork_fdu -> ack_tracker -> FDUs, and
//   datagrams to merge_fork_fau -> N_FAU x fau -> merge_receive -> receiver
//   -> consumer.  The FAUs report each frame to ack_aggregator, whose
//   acknowledgment frames go out through merge_fork_fau and merge_to_wire.
// The consumer's reference is a second producer ("control") configured
// like the peer's producer; in this top both producers share the producer
// parameters, so two endpoints built from the same parameters check each
// other's traffic.
//
// Structure, block names and the two FDUs/FAUs follow the document.  The
// endpoint IDs and MAC addresses are inputs rather than constants so that
// the same build can serve either end of a link.  rx_mon_* shows each item
// the receiver hands to the consumer, for observation only.
module dgrdma_endpoint
  import dgr_pkg::*;
#(
  parameter int           N_FDU       = 2,
  parameter int           N_FAU       = 2,
  parameter int           FRAME_BEATS = FRAME_MAX_BEATS,
  parameter int           TIMEOUT     = 125000,
  parameter int unsigned  LENGTH      = 1024,
  parameter length_mode_e LMODE       = LEN_INCREMENTAL,
  parameter int unsigned  MINL        = 0,
  parameter int unsigned  MAXL        = 1024,
  parameter data_mode_e   DMODE       = DATA_ROLLING,
  parameter logic [7:0]   NUKE        = 8'hAA,
  parameter logic [7:0]   OPCODE      = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      my_id,
  input  logic [15:0]      peer_id,
  input  logic [47:0]      my_mac,
  input  logic [47:0]      peer_mac,
  input  logic             prod_enable,
  // packets to the MAC
  output logic             tx_valid,
  input  logic             tx_ready,
  output qabs_t            tx_quad,
  // packets from the MAC
  input  logic             rx_valid,
  output logic             rx_ready,
  input  qabs_t            rx_quad,
  // observation
  output logic             rx_mon_valid,
  output mlmesg_t          rx_mon_msg,
  output endpoint_status_t status
);
  // ---------------- sending side ----------------
  logic    p_valid, p_ready;
  mlmesg_t p_msg;
  producer #(.LENGTH(LENGTH), .LMODE(LMODE), .MINL(MINL), .MAXL(MAXL), .DMODE(DMODE),
             .NUKE(NUKE), .OPCODE(OPCODE)) u_producer (
    .clk, .rst_n, .enable(prod_enable), .out_valid(p_valid), .out_ready(p_ready),
    .out_msg(p_msg), .done(status.producer_done), .msg_count(status.msgs_produced));

  logic    s_valid, s_ready;
  hexbdg_t s_beat;
  sender u_sender (
    .clk, .rst_n, .my_id, .peer_id, .in_valid(p_valid), .in_ready(p_ready), .in_msg(p_msg),
    .out_valid(s_valid), .out_ready(s_ready), .out_beat(s_beat), .frames_sent(status.frames_sent));

  logic [N_FDU-1:0]       fd_in_valid, fd_in_ready, fd_free_valid, fd_free_ready;
  hexbdg_t                fd_in_beat;
  logic [N_FDU-1:0]       fd_fid_valid, fd_fid_ready, fd_ack_valid, fd_out_valid, fd_out_ready;
  logic [N_FDU-1:0][15:0] fd_fid, fd_ack_fid;
  hexbdg_t                fd_out_beat [N_FDU];
  logic [N_FDU-1:0]       fd_holding, fd_timeout;
  logic [31:0]            fd_retx [N_FDU];
  logic [31:0]            fs_frames;

  fork_send #(.N(N_FDU)) u_fork_send (
    .clk, .rst_n, .in_valid(s_valid), .in_ready(s_ready), .in_beat(s_beat),
    .out_valid(fd_in_valid), .out_ready(fd_in_ready), .out_beat(fd_in_beat),
    .free_valid(fd_free_valid), .free_ready(fd_free_ready), .frames_forked(fs_frames));

  for (genvar i = 0; i < N_FDU; i++) begin : g_fdu
    fdu #(.DEPTH_BEATS(FRAME_BEATS), .TIMEOUT(TIMEOUT)) u_fdu (
      .clk, .rst_n,
      .in_valid(fd_in_valid[i]), .in_ready(fd_in_ready[i]), .in_beat(fd_in_beat),
      .free_valid(fd_free_valid[i]), .free_ready(fd_free_ready[i]),
      .fid_valid(fd_fid_valid[i]), .fid_ready(fd_fid_ready[i]), .fid(fd_fid[i]),
      .ack_valid(fd_ack_valid[i]), .ack_fid(fd_ack_fid[i]),
      .out_valid(fd_out_valid[i]), .out_ready(fd_out_ready[i]), .out_beat(fd_out_beat[i]),
      .holding(fd_holding[i]), .timeout_pulse(fd_timeout[i]), .retransmissions(fd_retx[i]));
  end

  always_comb begin
    status.retransmissions = '0;
    for (int i = 0; i < N_FDU; i++) status.retransmissions += fd_retx[i];
  end

  logic    mdg_valid, mdg_ready, mack_valid, mack_ready, trk_valid, trk_ready;
  hexbdg_t mdg_beat, mack_beat, trk_beat;
  logic [31:0] mff_frames;
  merge_fork_fdu #(.N(N_FDU)) u_merge_fork_fdu (
    .clk, .rst_n, .fdu_valid(fd_out_valid), .fdu_ready(fd_out_ready), .fdu_beat(fd_out_beat),
    .dg_valid(mdg_valid), .dg_ready(mdg_ready), .dg_beat(mdg_beat),
    .ack_in_valid(mack_valid), .ack_in_ready(mack_ready), .ack_in_beat(mack_beat),
    .ack_out_valid(trk_valid), .ack_out_ready(trk_ready), .ack_out_beat(trk_beat),
    .frames_merged(mff_frames));

  ack_tracker #(.N(N_FDU)) u_ack_tracker (
    .clk, .rst_n, .fid_valid(fd_fid_valid), .fid_ready(fd_fid_ready), .fid(fd_fid),
    .in_valid(trk_valid), .in_ready(trk_ready), .in_beat(trk_beat),
    .ack_valid(fd_ack_valid), .ack_fid(fd_ack_fid),
    .acks_matched(status.acks_matched), .stale_acks(status.stale_acks));

  assign status.tx_idle = (fd_holding == '0) && !s_valid && !p_valid;

  // ---------------- shared (wire) side ----------------
  logic    aout_valid, aout_ready, wtx_valid, wtx_ready, wrx_valid, wrx_ready;
  logic    rdg_valid, rdg_ready;
  hexbdg_t aout_beat, wtx_beat, wrx_beat, rdg_beat;
  merge_to_wire u_merge_to_wire (
    .clk, .rst_n, .my_id,
    .dg_valid(mdg_valid), .dg_ready(mdg_ready), .dg_beat(mdg_beat),
    .ack_valid(aout_valid), .ack_ready(aout_ready), .ack_beat(aout_beat),
    .tx_valid(wtx_valid), .tx_ready(wtx_ready), .tx_beat(wtx_beat),
    .rx_valid(wrx_valid), .rx_ready(wrx_ready), .rx_beat(wrx_beat),
    .rx_ack_valid(mack_valid), .rx_ack_ready(mack_ready), .rx_ack_beat(mack_beat),
    .rx_dg_valid(rdg_valid), .rx_dg_ready(rdg_ready), .rx_dg_beat(rdg_beat),
    .tx_ack_frames(status.tx_ack_frames), .tx_dg_frames(status.tx_dg_frames),
    .ack_to_dg_switches(status.ack_to_dg), .dg_to_ack_switches(status.dg_to_ack),
    .rx_dropped(status.id_dropped));

  logic  fq_valid, fq_ready;
  qabs_t fq_quad;
  funnel u_funnel (
    .clk, .rst_n, .in_valid(wtx_valid), .in_ready(wtx_ready), .in_beat(wtx_beat),
    .out_valid(fq_valid), .out_ready(fq_ready), .out_quad(fq_quad));

  logic [31:0] l2_tx_packets, l2_rx_accepted;
  l2_inserter u_l2_inserter (
    .clk, .rst_n, .src_mac(my_mac), .dst_mac(peer_mac),
    .in_valid(fq_valid), .in_ready(fq_ready), .in_quad(fq_quad),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_quad(tx_quad), .packets(l2_tx_packets));

  logic  rq_valid, rq_ready;
  qabs_t rq_quad;
  l2_remover u_l2_remover (
    .clk, .rst_n, .my_mac,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_quad(rx_quad),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_quad(rq_quad),
    .accepted(l2_rx_accepted), .dropped(status.l2_dropped));

  unfunnel u_unfunnel (
    .clk, .rst_n, .in_valid(rq_valid), .in_ready(rq_ready), .in_quad(rq_quad),
    .out_valid(wrx_valid), .out_ready(wrx_ready), .out_beat(wrx_beat));

  // ---------------- receiving side ----------------
  logic [N_FAU-1:0]       fa_in_valid, fa_in_ready, fa_free_valid, fa_free_ready;
  hexbdg_t                fa_in_beat;
  logic [N_FAU-1:0]       fa_rep_valid, fa_rep_ready, fa_out_valid, fa_out_ready;
  logic [N_FAU-1:0][15:0] fa_rep_sid, fa_rep_fid;
  hexbdg_t                fa_out_beat [N_FAU];
  logic [31:0]            fa_frames [N_FAU];
  logic                   agg_valid, agg_ready;
  hexbdg_t                agg_beat;
  logic [31:0]            mfa_frames, mr_frames;

  merge_fork_fau #(.N(N_FAU)) u_merge_fork_fau (
    .clk, .rst_n, .dg_valid(rdg_valid), .dg_ready(rdg_ready), .dg_beat(rdg_beat),
    .fau_valid(fa_in_valid), .fau_ready(fa_in_ready), .fau_beat(fa_in_beat),
    .free_valid(fa_free_valid), .free_ready(fa_free_ready),
    .ack_in_valid(agg_valid), .ack_in_ready(agg_ready), .ack_in_beat(agg_beat),
    .ack_out_valid(aout_valid), .ack_out_ready(aout_ready), .ack_out_beat(aout_beat),
    .frames_forked(mfa_frames));

  for (genvar i = 0; i < N_FAU; i++) begin : g_fau
    fau #(.DEPTH_BEATS(FRAME_BEATS)) u_fau (
      .clk, .rst_n,
      .in_valid(fa_in_valid[i]), .in_ready(fa_in_ready[i]), .in_beat(fa_in_beat),
      .free_valid(fa_free_valid[i]), .free_ready(fa_free_ready[i]),
      .rep_valid(fa_rep_valid[i]), .rep_ready(fa_rep_ready[i]),
      .rep_sid(fa_rep_sid[i]), .rep_fid(fa_rep_fid[i]),
      .out_valid(fa_out_valid[i]), .out_ready(fa_out_ready[i]), .out_beat(fa_out_beat[i]),
      .frames_received(fa_frames[i]));
  end

  always_comb begin
    status.frames_received = '0;
    for (int i = 0; i < N_FAU; i++) status.frames_received += fa_frames[i];
  end

  ack_aggregator #(.N(N_FAU)) u_ack_aggregator (
    .clk, .rst_n, .my_id, .rep_valid(fa_rep_valid), .rep_ready(fa_rep_ready),
    .rep_sid(fa_rep_sid), .rep_fid(fa_rep_fid),
    .out_valid(agg_valid), .out_ready(agg_ready), .out_beat(agg_beat),
    .acks_generated(status.acks_generated));

  logic    mr_valid, mr_ready;
  hexbdg_t mr_beat;
  merge_receive #(.N(N_FAU)) u_merge_receive (
    .clk, .rst_n, .in_valid(fa_out_valid), .in_ready(fa_out_ready), .in_beat(fa_out_beat),
    .out_valid(mr_valid), .out_ready(mr_ready), .out_beat(mr_beat), .frames_merged(mr_frames));

  logic    r_valid, r_ready;
  mlmesg_t r_msg;
  receiver #(.NUKE(NUKE)) u_receiver (
    .clk, .rst_n, .in_valid(mr_valid), .in_ready(mr_ready), .in_beat(mr_beat),
    .out_valid(r_valid), .out_ready(r_ready), .out_msg(r_msg),
    .messages(status.msgs_delivered), .bad_frames(status.bad_frames));

  logic    c_valid, c_ready, c_done;
  mlmesg_t c_msg;
  logic [31:0] c_count;
  producer #(.LENGTH(LENGTH), .LMODE(LMODE), .MINL(MINL), .MAXL(MAXL), .DMODE(DMODE),
             .NUKE(NUKE), .OPCODE(OPCODE)) u_control (
    .clk, .rst_n, .enable(1'b1), .out_valid(c_valid), .out_ready(c_ready),
    .out_msg(c_msg), .done(c_done), .msg_count(c_count));

  consumer u_consumer (
    .clk, .rst_n, .rx_valid(r_valid), .rx_ready(r_ready), .rx_msg(r_msg),
    .ctl_valid(c_valid), .ctl_ready(c_ready), .ctl_msg(c_msg),
    .correct_count(status.correct_count), .error_count(status.error_count), .msg_done());

  assign rx_mon_valid = r_valid && r_ready;
  assign rx_mon_msg   = r_msg;
endmodule
