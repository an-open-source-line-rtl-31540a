// tb_receiver: self-checking test of the Receiver (frames to message stream).
//
// The bench builds frames byte by byte in the layout the Sender produces
// (10-byte frame header, message header, 8 meta bytes, message header,
// payload) and feeds them as HexBDG beats with random input gaps and random
// output stalls. It checks that each good frame yields one meta item with the
// right length and opcode followed by ceil(length/16) data items whose valid
// bytes equal the payload and whose unused bytes hold the NUKE filler. Two
// kinds of frame must yield nothing: a header-only frame whose flags say it
// carries no message, and a frame cut short inside its first message header,
// which must also be counted in bad_frames. The message counter is checked
// at the end.
module tb_receiver;
  import dgr_pkg::*;

  localparam logic [7:0] NUKE = 8'hAA;

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
  hexbdg_t     in_beat;
  mlmesg_t     out_msg;
  logic [31:0] messages, bad_frames;

  receiver #(.NUKE(NUKE)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 150;
  mlmesg_t exp_q[$];
  int      n_good = 0;
  logic [7:0] fr[$];

  task automatic push32(logic [31:0] v);
    for (int i = 3; i >= 0; i--) fr.push_back(v[8*i +: 8]);
  endtask
  task automatic push16(logic [15:0] v);
    fr.push_back(v[15:8]); fr.push_back(v[7:0]);
  endtask
  task automatic push_msg_hdr(int k, int len, logic [7:0] typ);
    push32(32'(k)); push32(32'hFEEDC0DE); push32(32'hCAFEBABE);
    push16(16'd2); push16(16'd1); push32(32'hBEEFF00D);
    push16(16'(len)); fr.push_back(typ); fr.push_back(typ);
  endtask

  initial begin
    in_valid = 1'b0; in_beat = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NFRAMES; k++) begin
      int len, kind, off;
      mlmesg_t m;
      fr.delete();
      len  = (k < 40) ? k : int'($urandom_range(90, 0));
      kind = (k % 17 == 5) ? 1 : (k % 23 == 7) ? 2 : 0;   // 1: no message, 2: cut short
      push16(16'd2); push16(16'd1); push16(16'(k)); push16(16'd0); fr.push_back(8'h00);
      fr.push_back(kind == 1 ? 8'h00 : 8'h01);
      if (kind != 1) begin
        push_msg_hdr(k, 8, 8'h01);
        push32(32'(len)); fr.push_back(8'(k)); repeat (3) fr.push_back(8'h00);
        push_msg_hdr(k, len, 8'h00);
        m = '0; m.is_meta = 1'b1; m.meta.length = 32'(len); m.meta.opcode = 8'(k);
        if (kind == 0) exp_q.push_back(m);
        for (int i = 0; i < len; i++) fr.push_back(8'($urandom));
        if (kind == 0) begin
          for (int off2 = 0; off2 < len; off2 += 16) begin
            m = '0;
            for (int i = 0; i < 16; i++) m.data[i] = (off2 + i < len) ? fr[66 + off2 + i] : NUKE;
            exp_q.push_back(m);
          end
          n_good++;
        end
        if (kind == 2) while (fr.size() > 20) void'(fr.pop_back());
      end
      off = 0;
      while (off < fr.size()) begin
        @(negedge clk);
        while ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        in_beat = '0;
        for (int i = 0; i < 16 && off + i < fr.size(); i++) in_beat.data[i] = fr[off + i];
        in_beat.nbval = 5'((fr.size() - off > 16) ? 16 : fr.size() - off);
        off += int'(in_beat.nbval);
        in_beat.eop = (off == fr.size());
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        in_valid = 1'b0;
      end
    end
  end

  int items = 0, idle = 0;
  initial begin
    out_ready = 1'b0;
    @(posedge rst_n);
    // run until the expected items are all out and the input has gone quiet
    while (idle < 300) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      idle++;
      if (in_valid) idle = 0;
      if (out_valid && out_ready) begin
        idle = 0;
        if (exp_q.size() == 0) check(1'b0, "unexpected item");
        else begin
          mlmesg_t e;
          e = exp_q.pop_front();
          check(out_msg == e, $sformatf("item %0d: meta=%0b len=%0d d0=%02h, want meta=%0b len=%0d d0=%02h",
                items, out_msg.is_meta, out_msg.meta.length, out_msg.data[0], e.is_meta, e.meta.length, e.data[0]));
        end
        items++;
      end
    end
    check(exp_q.size() == 0, $sformatf("%0d expected items never came", exp_q.size()));
    check(messages == 32'(n_good), $sformatf("messages %0d want %0d", messages, n_good));
    check(bad_frames == 32'(7), $sformatf("bad_frames %0d want 7", bad_frames));
    check(items > 300, "traffic");
    $display("receiver: %0d items from %0d good frames", items, n_good);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
