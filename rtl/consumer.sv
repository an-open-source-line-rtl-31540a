// consumer: checks what the receiving side delivers.  It reads two MLMesg
// streams in lock step, the received messages and the expected ones from a
// control producer configured like the peer's producer, and compares them
// item by item: meta items on length and op code, payload items on the
// valid bytes only (the payload length is taken from the expected meta
// data).  Each message that matches completely increments correct_count,
// which the document shows on the board's LEDs; each that does not
// increments error_count.  Both streams are consumed one item per cycle
// when both have an item.  The comparison is the document's; the error
// counter is this design's addition.
module consumer
  import dgr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  mlmesg_t     rx_msg,
  input  logic        ctl_valid,
  output logic        ctl_ready,
  input  mlmesg_t     ctl_msg,
  output logic [31:0] correct_count,
  output logic [31:0] error_count,
  output logic        msg_done
);
  logic [31:0] remaining;
  logic        ok;
  logic        item_ok, last;
  logic [4:0]  n;

  wire fire = rx_valid && ctl_valid;
  assign rx_ready  = ctl_valid;
  assign ctl_ready = rx_valid;

  always_comb begin
    n = (remaining >= 32'd16) ? 5'd16 : remaining[4:0];
    if (ctl_msg.is_meta) begin
      item_ok = rx_msg.is_meta && rx_msg.meta == ctl_msg.meta;
      last    = (ctl_msg.meta.length == 0);
    end else begin
      item_ok = !rx_msg.is_meta;
      for (int i = 0; i < HEX_BYTES; i++)
        if (i < int'(n) && rx_msg.data[i] != ctl_msg.data[i]) item_ok = 1'b0;
      last = (remaining <= 32'd16);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining     <= '0;
      ok            <= 1'b1;
      correct_count <= '0;
      error_count   <= '0;
      msg_done      <= 1'b0;
    end else begin
      msg_done <= 1'b0;
      if (fire) begin
        remaining <= ctl_msg.is_meta ? ctl_msg.meta.length : remaining - 32'(n);
        ok        <= (ctl_msg.is_meta ? 1'b1 : ok) && item_ok;
        if (last) begin
          msg_done <= 1'b1;
          ok       <= 1'b1;
          if ((ctl_msg.is_meta || ok) && item_ok) correct_count <= correct_count + 1'b1;
          else                                    error_count   <= error_count + 1'b1;
        end
      end
    end
  end
endmodule
