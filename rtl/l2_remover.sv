// l2_remover: checks and strips the 14-byte Ethernet (layer 2) header of
// each incoming packet on the 4-byte QABS stream.  A packet whose
// destination MAC is not my_mac, or whose EtherType is not 0x3333, or that
// ends before a whole header has arrived, is discarded and counted in
// dropped; the others continue, without header, as frames.
//
// Bytes go through a byte shifter: once 14 bytes are held the header is
// checked and popped, after which frame bytes leave four at a time,
// re-aligned.  One byte is held back until end-of-packet has been seen so
// that the last byte can carry ValidEOP.  The next packet is accepted only
// after the previous one has fully left.  One quad per cycle in and out.
// The check follows the document; the re-alignment is this design's.
module l2_remover
  import dgr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] my_mac,
  input  logic        in_valid,
  output logic        in_ready,
  input  qabs_t       in_quad,
  output logic        out_valid,
  input  logic        out_ready,
  output qabs_t       out_quad,
  output logic [31:0] accepted,
  output logic [31:0] dropped
);
  typedef enum logic [1:0] {L_HDR, L_BODY, L_DROP} lstate_e;
  lstate_e           state;
  logic              eop_in;
  logic              bs_in_ready;
  logic [3:0][7:0]   bs_in;
  logic [2:0]        bs_in_n;
  logic [13:0][7:0]  bs_out;
  logic [4:0]        bs_count;
  logic [3:0]        bs_pop;
  logic [2:0]        out_n;
  logic              out_last, hdr_ok, hdr_ready;

  byte_shifter #(.IN_BYTES(4), .OUT_BYTES(14), .DEPTH(24)) u_bs (
    .clk, .rst_n, .clear(1'b0), .in_valid(in_valid && in_ready), .in_ready(bs_in_ready),
    .in_data(bs_in), .in_n(bs_in_n), .out_data(bs_out), .count(bs_count), .pop_n(bs_pop));

  always_comb begin
    for (int k = 0; k < 4; k++) bs_in[k] = in_quad[k].b;
    bs_in_n  = qabs_nvalid(in_quad);
    in_ready = bs_in_ready && !eop_in;
    hdr_ready = bs_count >= 5'd14;
    hdr_ok = 1'b1;
    for (int i = 0; i < 6; i++)
      if (bs_out[i] != my_mac[8*(5-i) +: 8]) hdr_ok = 1'b0;
    if ({bs_out[12], bs_out[13]} != ETHERTYPE_DGRDMA) hdr_ok = 1'b0;

    out_last  = eop_in && bs_count <= 5'd4;
    out_valid = (state == L_BODY) && ((bs_count > 5'd4) || (eop_in && bs_count != 0));
    out_n     = out_last ? bs_count[2:0] : 3'd4;
    out_quad  = qabs_make(bs_out[3:0], out_n, out_last);
    case (state)
      L_HDR:   bs_pop = (hdr_ready && hdr_ok) ? 4'd14 : 4'd0;
      L_BODY:  bs_pop = (out_valid && out_ready) ? {1'b0, out_n} : 4'd0;
      default: bs_pop = (bs_count > 5'd14) ? 4'd14 : bs_count[3:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_HDR;
      eop_in   <= 1'b0;
      accepted <= '0;
      dropped  <= '0;
    end else begin
      if (in_valid && in_ready && qabs_is_eop(in_quad)) eop_in <= 1'b1;
      case (state)
        L_HDR: begin
          if (hdr_ready) begin
            if (hdr_ok) state <= L_BODY;
            else        state <= L_DROP;
          end else if (eop_in) state <= L_DROP;
        end
        L_BODY: if (out_valid && out_ready && out_last) begin
          state    <= L_HDR;
          eop_in   <= 1'b0;
          accepted <= accepted + 1'b1;
        end
        default: if (eop_in && bs_count == 0) begin
          state   <= L_HDR;
          eop_in  <= 1'b0;
          dropped <= dropped + 1'b1;
        end
      endcase
    end
  end
endmodule
