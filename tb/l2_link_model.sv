// l2_link_model: behavioural model of one direction of the path between two
// endpoints (MAC, cable and layer 2 switch), for testbenches only.
//
// It takes whole packets of QABS quads, optionally discards some of them,
// and delivers the others in order.  drop_every = N > 0 discards every N-th
// packet longer than MIN_DROP_BYTES (datagrams, not the short
// acknowledgments).  When gbe_rate is set, quads leave at most one per four
// cycles (one byte per cycle), each packet is followed by a gap of GAP byte
// times (default 24: 4-byte FCS, 12-byte inter-frame gap and the 8-byte
// preamble of the next packet), and the input stalls while 8 quads wait;
// this is the pace of gigabit Ethernet with a 125 MHz clock.  Otherwise
// quads pass at one per cycle.  inject_req queues one extra
// 32-byte packet: inject_kind 0 carries a wrong destination MAC, 1 the right
// MAC but a frame for endpoint ID 7.
module l2_link_model
  import dgr_pkg::*;
#(
  parameter int MIN_DROP_BYTES = 40,
  parameter int GAP            = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int          drop_every,
  input  logic        gbe_rate,
  input  logic [47:0] dst_mac,
  input  logic        inject_req,
  input  logic        inject_kind,
  input  logic        in_valid,
  output logic        in_ready,
  input  qabs_t       in_quad,
  output logic        out_valid,
  input  logic        out_ready,
  output qabs_t       out_quad,
  output int          packets_in,
  output int          packets_dropped
);
  qabs_t cur [$];
  qabs_t outq [$];
  int    cur_bytes, long_count, gap, pace;

  // At gigabit pace the model stalls its input like a MAC with a small FIFO.
  assign in_ready  = !gbe_rate || (outq.size() < 8);
  assign out_valid = (outq.size() > 0) && gap == 0 && pace == 0;
  assign out_quad  = (outq.size() > 0) ? outq[0] : '0;

  function automatic qabs_t mk(logic [3:0][7:0] b, logic last);
    return qabs_make(b, 3'd4, last);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur.delete();
      outq.delete();
      cur_bytes       <= 0;
      long_count      <= 0;
      gap             <= 0;
      pace            <= 0;
      packets_in      <= 0;
      packets_dropped <= 0;
    end else begin
      if (in_valid && in_ready) begin
        cur.push_back(in_quad);
        cur_bytes <= cur_bytes + int'(qabs_nvalid(in_quad));
        if (qabs_is_eop(in_quad)) begin
          int nb;
          bit drop;
          nb = cur_bytes + int'(qabs_nvalid(in_quad));
          drop = 1'b0;
          if (nb > MIN_DROP_BYTES) begin
            long_count <= long_count + 1;
            if (drop_every > 0 && ((long_count + 1) % drop_every) == 0) drop = 1'b1;
          end
          packets_in <= packets_in + 1;
          if (drop) packets_dropped <= packets_dropped + 1;
          else foreach (cur[i]) outq.push_back(cur[i]);
          cur.delete();
          cur_bytes <= 0;
        end
      end
      if (inject_req) begin
        logic [31:0][7:0] p;
        p = '0;
        for (int i = 0; i < 6; i++) p[i] = inject_kind ? dst_mac[8*(5-i) +: 8] : 8'hEE;
        p[12] = 8'h33; p[13] = 8'h33;
        p[14] = 8'h00; p[15] = 8'h07;          // destination ID 7
        for (int q = 0; q < 8; q++) outq.push_back(mk(p[4*q +: 4], q == 7));
      end
      if (gap > 0) gap <= gap - 1;
      if (pace > 0) pace <= pace - 1;
      if (out_valid && out_ready) begin
        if (gbe_rate) pace <= 3;
        if (gbe_rate && qabs_is_eop(outq[0])) gap <= 3 + GAP;
        void'(outq.pop_front());
      end
    end
  end
endmodule
