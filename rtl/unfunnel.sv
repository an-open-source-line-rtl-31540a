// unfunnel: converts the 4-byte QABS stream from the wire back into 16-byte
// HexBDG beats.  Valid bytes of each quad are appended to the beat being
// built; the beat is emitted when it holds 16 bytes or when a quad carries
// an end-of-packet tag (ValidEOP or EmptyEOP), with nbval set to the bytes
// it holds.  A frame whose last quad is all EmptyEOP right after a full beat
// ends with an empty end-of-packet beat.  AbortEOP is treated as an end of
// packet.  One quad is taken per cycle; a beat is presented one cycle after
// its last quad.  The document gives the conversion; the buffering is this
// design's choice.
module unfunnel
  import dgr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  qabs_t   in_quad,
  output logic    out_valid,
  input  logic    out_ready,
  output hexbdg_t out_beat
);
  hexbyte_t   acc;
  logic [4:0] n;
  logic [2:0] nv;
  logic       eop;
  hexbyte_t   acc_next;
  logic [4:0] n_next;

  always_comb begin
    nv       = qabs_nvalid(in_quad);
    eop      = qabs_is_eop(in_quad);
    acc_next = acc;
    for (int k = 0; k < 4; k++)
      if (k < int'(nv) && int'(n) + k < HEX_BYTES) acc_next[int'(n) + k] = in_quad[k].b;
    n_next = n + 5'(nv);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      n         <= '0;
      out_valid <= 1'b0;
      out_beat  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (eop || n_next >= 5'd16) begin
          out_valid      <= 1'b1;
          out_beat.data  <= acc_next;
          out_beat.nbval <= n_next;
          out_beat.eop   <= eop;
          acc            <= '0;
          n              <= '0;
        end else begin
          acc <= acc_next;
          n   <= n_next;
        end
      end
    end
  end
endmodule
