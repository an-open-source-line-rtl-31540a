// tb_sender: self-checking test of the Sender (message stream to frames).
//
// Messages of random length (0..100 bytes, plus every length 0..33) are fed
// as MLMesg items: a meta item with length and opcode, then the payload in
// 16-byte data items with filler past the end. The frame stream stalls at
// random. For every message the bench builds the expected frame on its own,
// byte by byte: the 10-byte frame header (destination ID, source ID, frame
// ID, no ack, flags 1), a 24-byte message header for the meta data (with the
// fixed completion and data address words, length 8, type 1), the 8 meta
// bytes (big-endian length, opcode, three zeros), a second message header for
// the payload (length, type 0), then the payload. It checks every byte, that
// each beat before the last holds 16 bytes, the frame count, and that frame
// and transaction IDs count up from zero.
module tb_sender;
  import dgr_pkg::*;

  localparam logic [15:0] MY_ID = 16'h0102, PEER_ID = 16'h0A0B;
  localparam logic [7:0]  OPC   = 8'h5C;

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

  logic        in_valid, in_ready, out_valid, out_ready;
  mlmesg_t     in_msg;
  hexbdg_t     out_beat;
  logic [31:0] frames_sent;
  logic [15:0] my_id, peer_id;
  assign my_id = MY_ID;
  assign peer_id = PEER_ID;

  sender dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NMSG = 120;
  logic [7:0] expect_q[$];
  int         frame_len[$];

  task automatic push32(logic [31:0] v);
    for (int i = 3; i >= 0; i--) expect_q.push_back(v[8*i +: 8]);
  endtask
  task automatic push16(logic [15:0] v);
    expect_q.push_back(v[15:8]); expect_q.push_back(v[7:0]);
  endtask
  task automatic push_msg_hdr(int k, int len, logic [7:0] typ);
    push32(32'(k)); push32(32'hFEEDC0DE); push32(32'hCAFEBABE);
    push16(16'd2); push16(16'd1); push32(32'hBEEFF00D);
    push16(16'(len)); expect_q.push_back(typ); expect_q.push_back(typ);
  endtask

  initial begin
    in_valid = 1'b0; in_msg = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NMSG; k++) begin
      int len;
      logic [7:0] pay[$];
      len = (k < 34) ? k : int'($urandom_range(100, 0));
      pay.delete();
      for (int i = 0; i < len; i++) pay.push_back(8'($urandom));
      // expected frame
      push16(PEER_ID); push16(MY_ID); push16(16'(k)); push16(16'h0); expect_q.push_back(8'h00);
      expect_q.push_back(8'h01);
      push_msg_hdr(k, 8, 8'h01);
      push32(32'(len)); expect_q.push_back(OPC); repeat (3) expect_q.push_back(8'h00);
      push_msg_hdr(k, len, 8'h00);
      foreach (pay[i]) expect_q.push_back(pay[i]);
      frame_len.push_back(10 + 24 + 8 + 24 + len);
      // items: meta, then data
      for (int it = 0; it <= (len + 15) / 16; it++) begin
        @(negedge clk);
        while ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_msg = '0;
        if (it == 0) begin
          in_msg.is_meta = 1'b1; in_msg.meta.length = 32'(len); in_msg.meta.opcode = OPC;
        end else
          for (int i = 0; i < 16; i++)
            in_msg.data[i] = ((it - 1) * 16 + i < len) ? pay[(it - 1) * 16 + i] : 8'hAA;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        in_valid = 1'b0;
      end
    end
  end

  int frames_seen = 0, cur = 0;
  initial begin
    out_ready = 1'b0;
    @(posedge rst_n);
    while (frames_seen < NMSG) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (!out_beat.eop) check(out_beat.nbval == 5'd16, "non-eop beat is full");
        for (int i = 0; i < int'(out_beat.nbval) && i < 16; i++) begin
          check(expect_q.size() > 0 && out_beat.data[i] == expect_q[0],
                $sformatf("frame %0d byte %0d: got %02h want %02h", frames_seen, cur, out_beat.data[i],
                          expect_q.size() > 0 ? expect_q[0] : 8'h00));
          if (expect_q.size() > 0) void'(expect_q.pop_front());
          cur++;
        end
        if (out_beat.eop) begin
          check(cur == frame_len[frames_seen], $sformatf("frame %0d is %0d bytes, want %0d", frames_seen, cur, frame_len[frames_seen]));
          frames_seen++;
          cur = 0;
        end
      end
    end
    repeat (2) @(posedge clk);
    check(frames_sent == NMSG, $sformatf("frames_sent %0d", frames_sent));
    check(expect_q.size() == 0, "all expected bytes seen");
    $display("sender: %0d frames checked", frames_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
