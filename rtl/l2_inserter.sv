// l2_inserter: prepends the 14-byte Ethernet (layer 2) header, destination
// MAC, source MAC and the DG-RDMA EtherType 0x3333, to every frame on the
// 4-byte QABS stream, turning the frame into a packet for the MAC.
//
// Because 14 is not a multiple of 4, the frame bytes are re-aligned: header
// and frame bytes go through a byte shifter and leave four at a time.  At
// least one byte is held back until the frame's end-of-packet has been
// seen, so that the last byte can be tagged ValidEOP.  The next frame's
// header is inserted only after the previous packet has fully left.  The
// MAC addresses are inputs (the document hard-codes them and suggests
// reading them from a local flash).  After the first quad of a frame the
// stream runs at one quad per cycle; each packet costs one cycle more than
// its quads.  The document gives the function; the re-alignment is this
// design's.
module l2_inserter
  import dgr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] src_mac,
  input  logic [47:0] dst_mac,
  input  logic        in_valid,
  output logic        in_ready,
  input  qabs_t       in_quad,
  output logic        out_valid,
  input  logic        out_ready,
  output qabs_t       out_quad,
  output logic [31:0] packets
);
  logic              body;      // header inserted, frame bytes flowing
  logic              eop_in;    // the frame's end is in the shifter
  logic              bs_push, bs_in_ready;
  logic [13:0][7:0]  bs_in;
  logic [3:0]        bs_in_n;
  logic [3:0][7:0]   bs_out;
  logic [4:0]        bs_count;
  logic [2:0]        bs_pop;
  logic [2:0]        out_n;
  logic              out_last;

  byte_shifter #(.IN_BYTES(14), .OUT_BYTES(4), .DEPTH(24)) u_bs (
    .clk, .rst_n, .clear(1'b0), .in_valid(bs_push), .in_ready(bs_in_ready),
    .in_data(bs_in), .in_n(bs_in_n), .out_data(bs_out), .count(bs_count), .pop_n(bs_pop));

  always_comb begin
    bs_in    = '0;
    bs_in_n  = '0;
    bs_push  = 1'b0;
    in_ready = 1'b0;
    if (!body) begin
      for (int i = 0; i < 6; i++) begin
        bs_in[i]     = dst_mac[8*(5-i) +: 8];
        bs_in[6 + i] = src_mac[8*(5-i) +: 8];
      end
      bs_in[12] = ETHERTYPE_DGRDMA[15:8];
      bs_in[13] = ETHERTYPE_DGRDMA[7:0];
      bs_in_n   = 4'd14;
      bs_push   = in_valid && !eop_in && bs_count == 0;
    end else begin
      for (int k = 0; k < 4; k++) bs_in[k] = in_quad[k].b;
      bs_in_n  = 4'(qabs_nvalid(in_quad));
      in_ready = bs_in_ready && !eop_in;
      bs_push  = in_valid && in_ready;
    end
    out_last  = eop_in && bs_count <= 5'd4;
    out_valid = (bs_count > 5'd4) || (eop_in && bs_count != 0);
    out_n     = out_last ? bs_count[2:0] : 3'd4;
    out_quad  = qabs_make(bs_out, out_n, out_last);
    bs_pop    = (out_valid && out_ready) ? out_n : 3'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      body    <= 1'b0;
      eop_in  <= 1'b0;
      packets <= '0;
    end else begin
      if (!body && bs_push && bs_in_ready) body <= 1'b1;
      if (body && bs_push && qabs_is_eop(in_quad)) begin
        eop_in <= 1'b1;
        body   <= 1'b0;
      end
      if (out_valid && out_ready && out_last) begin
        eop_in  <= 1'b0;
        packets <= packets + 1'b1;
      end
    end
  end
endmodule
