// producer: test-traffic source of the DG-RDMA endpoint.  It emits one
// message after another on an MLMesg stream: first a meta data item (payload
// length and op code), then ceil(length/16) payload items of 16 bytes.
//
// Length modes (LMODE), as the document describes them:
//   LEN_CONSTANT    every payload is LENGTH bytes long;
//   LEN_INCREMENTAL payloads grow by one byte from MINL to MAXL, and the
//                   producer stops (done) after the MAXL message;
//   LEN_RANDOM      a 16-bit LFSR picks MINL + (lfsr mod (MAXL-MINL+1)).
// Data modes (DMODE): every payload is a count that rises by one per byte,
// modulo 256; it starts at 0 (DATA_ZERO_ORIGIN), at the message number
// (DATA_INCR_ORIGIN), or where the previous payload ended (DATA_ROLLING).
// Bytes of the last item past the payload length carry the NUKE value.
//
// The LFSR polynomial (x^16+x^14+x^13+x^11+1), its seed, the op code value
// and the enable input are this design's choices; the document gives the
// modes and parameter names only.  A new message starts only while enable is
// high; a started message always completes.  One item leaves per cycle while
// out_ready is high; msg_count counts completed messages.
module producer
  import dgr_pkg::*;
#(
  parameter int unsigned  LENGTH = 1024,
  parameter length_mode_e LMODE  = LEN_INCREMENTAL,
  parameter int unsigned  MINL   = 0,
  parameter int unsigned  MAXL   = 1024,
  parameter data_mode_e   DMODE  = DATA_ROLLING,
  parameter logic [7:0]   NUKE   = 8'hAA,
  parameter logic [7:0]   OPCODE = 8'h01,
  parameter logic [15:0]  SEED   = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        out_valid,
  input  logic        out_ready,
  output mlmesg_t     out_msg,
  output logic        done,
  output logic [31:0] msg_count
);
  typedef enum logic [1:0] {P_META, P_DATA, P_DONE} pstate_e;

  pstate_e     state;
  logic [31:0] cur_len;     // length of the message being produced
  logic [31:0] remaining;   // payload bytes still to send
  logic [7:0]  next_byte;   // value of the next payload byte
  logic [15:0] lfsr;
  logic [31:0] msg_idx;

  function automatic logic [15:0] lfsr_step(logic [15:0] s);
    return {1'b0, s[15:1]} ^ (s[0] ? 16'hB400 : 16'h0000);
  endfunction

  function automatic logic [31:0] rand_len(logic [15:0] s);
    return MINL + (32'(s) % (MAXL - MINL + 1));
  endfunction

  wire fire = out_valid && out_ready;
  logic [4:0] beat_n;

  always_comb begin
    beat_n   = (remaining >= 32'd16) ? 5'd16 : remaining[4:0];
    out_msg  = '0;
    out_valid = 1'b0;
    if (state == P_META) begin
      out_valid           = enable;
      out_msg.is_meta     = 1'b1;
      out_msg.meta.length = cur_len;
      out_msg.meta.opcode = OPCODE;
    end else if (state == P_DATA) begin
      out_valid = 1'b1;
      for (int i = 0; i < HEX_BYTES; i++)
        out_msg.data[i] = (i < int'(beat_n)) ? next_byte + 8'(i) : NUKE;
    end
  end

  assign done = (state == P_DONE);

  // A message ends on its meta item (zero length) or its last data item.
  wire end_msg = fire && ((state == P_META && cur_len == 0) ||
                          (state == P_DATA && remaining <= 32'd16));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_META;
      lfsr      <= SEED;
      cur_len   <= (LMODE == LEN_CONSTANT) ? LENGTH : (LMODE == LEN_INCREMENTAL) ? MINL : rand_len(SEED);
      remaining <= '0;
      next_byte <= 8'h00;
      msg_idx   <= '0;
      msg_count <= '0;
    end else if (fire) begin
      if (state == P_META) begin
        remaining <= cur_len;
        if (cur_len != 0) state <= P_DATA;
      end else begin
        remaining <= remaining - 32'(beat_n);
        next_byte <= next_byte + 8'(beat_n);
      end
      // End-of-message bookkeeping: choose the next length and data origin.
      if (end_msg) begin
        msg_count <= msg_count + 1;
        msg_idx   <= msg_idx + 1;
        case (DMODE)
          DATA_ZERO_ORIGIN: next_byte <= 8'h00;
          DATA_INCR_ORIGIN: next_byte <= 8'(msg_idx + 1);
          default:          ;  // rolling: keep counting
        endcase
        case (LMODE)
          LEN_CONSTANT: state <= P_META;
          LEN_INCREMENTAL: begin
            if (cur_len >= MAXL) state <= P_DONE;
            else begin cur_len <= cur_len + 1; state <= P_META; end
          end
          default: begin
            lfsr    <= lfsr_step(lfsr);
            cur_len <= rand_len(lfsr_step(lfsr));
            state   <= P_META;
          end
        endcase
      end
    end
  end
endmodule
