// tb_funnel: self-checking test of the Funnel (16-byte HexBDG beats to
// 4-byte QABS quads).
//
// Random frames are offered as HexBDG beats: full 16-byte beats, then a last
// beat with eop and 0..16 valid bytes. The MAC side stalls at random. From the
// quads that come out the bench rebuilds each frame lane by lane and checks:
// the byte sequence equals the frame sent; every quad before the end of a
// frame has four ValidNotEOP lanes; the end quad marks its last valid byte
// ValidEOP and fills the remaining lanes with EmptyEOP; a frame whose last beat
// is empty ends with a quad that has lane 0 EmptyEOP. It also checks that a
// stream of full beats moves at one quad per cycle when the output never
// stalls (four cycles per 16-byte beat).
module tb_funnel;
  import dgr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic    in_valid, in_ready, out_valid, out_ready;
  hexbdg_t in_beat;
  qabs_t   out_quad;

  funnel dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 200;
  logic [7:0] sent[$];      // all bytes sent, in order
  int         sent_len[$];  // frame lengths
  bit         stall_out = 1'b1;

  // driver
  initial begin
    in_valid = 1'b0; in_beat = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int len, off;
      len = (f < 20) ? f : int'($urandom_range(100, 0));
      if (f == NFRAMES - 1) len = 16 * 16;   // long frame for the rate check
      sent_len.push_back(len);
      off = 0;
      do begin
        int n;
        n = (len - off > 16) ? 16 : len - off;
        // an exact multiple of 16 may end on a full beat or on an empty one
        if (len - off == 16 && (f % 2 == 1)) n = 16;
        @(negedge clk);
        in_valid = 1'b1;
        in_beat = '0;
        for (int i = 0; i < n; i++) begin
          in_beat.data[i] = 8'($urandom);
          sent.push_back(in_beat.data[i]);
        end
        in_beat.nbval = 5'(n);
        off += n;
        in_beat.eop = (off == len) && !(len - (off - n) == 16 && n == 16 && (f % 2 == 0) && len > 0 && 1'b0);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        in_valid = 1'b0;
      end while (off < len);
    end
  end

  // monitor
  int frames_seen = 0, bytes_seen = 0, empty_end = 0;
  int cur_len = 0;
  initial begin
    longint rate_start;
    out_ready = 1'b0;
    @(posedge rst_n);
    while (frames_seen < NFRAMES) begin
      @(negedge clk);
      out_ready = (frames_seen >= NFRAMES - 1) ? 1'b1 : ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        bit ended;
        int nv;
        ended = 1'b0; nv = 0;
        for (int k = 0; k < 4; k++) begin
          if (out_quad[k].tag == ABS_VALID_NOT_EOP || out_quad[k].tag == ABS_VALID_EOP) begin
            check(!ended, "valid lane after the end of frame");
            check(sent.size() > 0 && out_quad[k].b == sent[0], $sformatf("frame %0d byte %0d", frames_seen, cur_len));
            if (sent.size() > 0) void'(sent.pop_front());
            cur_len++; nv++;
            if (out_quad[k].tag == ABS_VALID_EOP) ended = 1'b1;
          end else if (out_quad[k].tag == ABS_EMPTY_EOP) begin
            if (nv == 0 && k == 0) begin ended = 1'b1; empty_end++; end
            check(ended, "EmptyEOP lane before the frame's end");
          end else check(1'b0, "AbortEOP lane");
        end
        if (ended) begin
          check(cur_len == sent_len[frames_seen], $sformatf("frame %0d length %0d want %0d",
                frames_seen, cur_len, sent_len[frames_seen]));
          if (frames_seen == NFRAMES - 2) rate_start = longint'($time);
          if (frames_seen == NFRAMES - 1)
            // 64 quads at one per cycle after the previous frame's end
            check((longint'($time) - rate_start) / 10 <= 64 + 4, $sformatf("rate: %0d cycles for 64 quads", (longint'($time) - rate_start) / 10));
          frames_seen++;
          cur_len = 0;
        end else check(nv == 4, "a quad inside a frame is full");
      end
    end
    check(sent.size() == 0, "all bytes came out");
    check(empty_end > 0, "an empty last beat was seen");
    $display("funnel: %0d frames, %0d ended on an empty beat", frames_seen, empty_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
