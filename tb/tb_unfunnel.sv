// tb_unfunnel: self-checking test of the Unfunnel (4-byte QABS quads to
// 16-byte HexBDG beats).
//
// Random frames of 0..120 bytes are offered as quads: full ValidNotEOP quads,
// then an end quad holding 0..4 valid bytes (ValidEOP on the last, EmptyEOP
// after it; lane 0 EmptyEOP for an empty end quad). The output stalls at
// random. The bench checks that every beat before the end of a frame carries
// 16 valid bytes, that the eop beat carries the remainder, and that the byte
// sequence and frame lengths equal what was sent.
module tb_unfunnel;
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
  qabs_t   in_quad;
  hexbdg_t out_beat;

  unfunnel dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 300;
  logic [7:0] sent[$];
  int         sent_len[$];

  initial begin
    in_valid = 1'b0; in_quad = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int len, off, n;
      bit last;
      len = (f < 20) ? f : int'($urandom_range(120, 0));
      sent_len.push_back(len);
      off = 0;
      do begin
        // full quads while more than 4 bytes remain; the end quad may be full or empty
        n = (len - off > 4) ? 4 : len - off;
        last = (len - off <= 4);
        if (len - off == 4 && $urandom_range(1, 0) == 1) last = 1'b0;  // end on an empty quad
        @(negedge clk);
        while ($urandom_range(4, 0) == 0) @(negedge clk);  // input gaps
        in_valid = 1'b1;
        for (int k = 0; k < 4; k++) begin
          if (k < n) begin
            in_quad[k].b = 8'($urandom);
            in_quad[k].tag = (last && k == n - 1) ? ABS_VALID_EOP : ABS_VALID_NOT_EOP;
            sent.push_back(in_quad[k].b);
          end else begin
            in_quad[k].b = 8'h00;
            in_quad[k].tag = ABS_EMPTY_EOP;
          end
        end
        off += n;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        in_valid = 1'b0;
      end while (!last);
    end
  end

  int frames_seen = 0, cur_len = 0, beats = 0;
  initial begin
    out_ready = 1'b0;
    @(posedge rst_n);
    while (frames_seen < NFRAMES) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        beats++;
        if (!out_beat.eop) check(out_beat.nbval == 5'd16, $sformatf("non-eop beat has %0d bytes", out_beat.nbval));
        check(out_beat.nbval <= 5'd16, "nbval in range");
        for (int i = 0; i < int'(out_beat.nbval) && i < 16; i++) begin
          check(sent.size() > 0 && out_beat.data[i] == sent[0], $sformatf("frame %0d byte %0d", frames_seen, cur_len));
          if (sent.size() > 0) void'(sent.pop_front());
          cur_len++;
        end
        if (out_beat.eop) begin
          check(cur_len == sent_len[frames_seen], $sformatf("frame %0d length %0d want %0d",
                frames_seen, cur_len, sent_len[frames_seen]));
          frames_seen++;
          cur_len = 0;
        end
      end
    end
    check(sent.size() == 0, "all bytes came out");
    $display("unfunnel: %0d frames in %0d beats", frames_seen, beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
