// funnel: converts the 16-byte HexBDG stream into the 4-byte QABS stream
// used next to the wire.  Each beat becomes ceil(nbval/4) quads (at least
// one for an end-of-packet beat).  Bytes are tagged ValidNotEOP, except the
// last valid byte of the frame, tagged ValidEOP; lanes after it are
// EmptyEOP.  An end-of-packet beat with no valid bytes becomes one quad of
// EmptyEOP lanes (end of frame after the bytes already sent), as the ABS
// type defines.  AbortEOP is never produced.  Beats that are not the last of
// a frame are expected to be full (16 bytes).
//
// One quad leaves per cycle; the next beat is taken in the cycle its
// predecessor's last quad leaves, so a full beat takes four cycles.  Tagging
// follows the document; the buffering is this design's choice.
module funnel
  import dgr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  hexbdg_t in_beat,
  output logic    out_valid,
  input  logic    out_ready,
  output qabs_t   out_quad
);
  hexbdg_t    cur;
  logic       have;
  logic [1:0] qi;       // quad being sent
  logic [2:0] nq;       // quads in this beat
  logic [4:0] base;
  logic [4:0] left;

  always_comb begin
    nq = 3'((int'(cur.nbval) + 3) / 4);
    if (cur.eop && nq == 0) nq = 3'd1;
    base = {1'b0, qi, 2'b00};
    left = (cur.nbval > base) ? cur.nbval - base : 5'd0;
    out_quad = qabs_make(cur.data[4*qi +: 4], (left > 5'd4) ? 3'd4 : left[2:0],
                         cur.eop && (left <= 5'd4));
  end

  assign out_valid = have && nq != 0;
  wire last_q = (3'(qi) + 3'd1 >= nq);
  assign in_ready = !have || (out_ready && last_q) || (nq == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0;
      qi   <= '0;
      cur  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        cur  <= in_beat;
        have <= 1'b1;
        qi   <= '0;
      end else if (have && (nq == 0 || (out_ready && last_q))) begin
        have <= 1'b0;
      end else if (out_valid && out_ready) begin
        qi <= qi + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_ready && !in_beat.eop |-> in_beat.nbval == 5'd16);
endmodule
