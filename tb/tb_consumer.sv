// tb_consumer: self-checking test of the Consumer (received messages
// compared against the local control copy).
//
// The control stream and the received stream carry the same random messages
// (meta item, then 16-byte data items), each offered with its own random gaps.
// Some received messages are damaged on purpose: a payload byte changed, or
// the opcode changed. Others have a changed filler byte past the end of the
// payload, which is not part of the message and must not count as an error.
// The bench checks the correct and error counters against its own tally,
// counts msg_done pulses, and checks that an item is never taken from one
// stream without the other (the two move in lock step).
module tb_consumer;
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

  logic        rx_valid, rx_ready, ctl_valid, ctl_ready, msg_done;
  mlmesg_t     rx_msg, ctl_msg;
  logic [31:0] correct_count, error_count;

  consumer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog %0d %0d %0d %0d", rx_i, ctl_i, rx_q.size(), ctl_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NMSG = 200;
  mlmesg_t rx_q[$], ctl_q[$];
  int exp_good = 0, exp_bad = 0;

  initial begin
    for (int k = 0; k < NMSG; k++) begin
      int len, dmg;
      mlmesg_t m, r;
      len = (k < 20) ? k : int'($urandom_range(70, 0));
      dmg = int'($urandom_range(5, 0));   // 0: payload byte, 1: opcode, 2: filler only, else none
      if (len == 0 && dmg == 0) dmg = 3;
      if (len % 16 == 0 && dmg == 2) dmg = 3;
      m = '0; m.is_meta = 1'b1; m.meta.length = 32'(len); m.meta.opcode = 8'h01;
      r = m;
      if (dmg == 1) r.meta.opcode = 8'h02;
      ctl_q.push_back(m); rx_q.push_back(r);
      for (int off = 0; off < len; off += 16) begin
        m = '0;
        for (int i = 0; i < 16; i++) m.data[i] = (off + i < len) ? 8'($urandom) : 8'hAA;
        r = m;
        if (dmg == 0 && off == 0) begin
          int bi;
          bi = $urandom_range((len > 16 ? 16 : len) - 1, 0);
          r.data[bi] ^= 8'h10;
        end
        if (dmg == 2 && off + 16 >= len) r.data[15] ^= 8'h01;
        ctl_q.push_back(m); rx_q.push_back(r);
      end
      if (dmg <= 1) exp_bad++; else exp_good++;
    end
  end

  int rx_i = 0, ctl_i = 0, done_pulses = 0;
  initial begin
    rx_valid = 1'b0; ctl_valid = 1'b0; rx_msg = '0; ctl_msg = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (rx_i < rx_q.size() || ctl_i < ctl_q.size()) begin
      @(negedge clk);
      if (!rx_valid && rx_i < rx_q.size() && $urandom_range(2, 0) != 0) begin
        rx_valid = 1'b1; rx_msg = rx_q[rx_i];
      end
      if (!ctl_valid && ctl_i < ctl_q.size() && $urandom_range(2, 0) != 0) begin
        ctl_valid = 1'b1; ctl_msg = ctl_q[ctl_i];
      end
      #1;
      check(!(rx_ready && !ctl_valid) && !(ctl_ready && !rx_valid), "streams move in lock step");
      begin
        bit rx_fire, ctl_fire;
        rx_fire  = rx_valid && rx_ready;
        ctl_fire = ctl_valid && ctl_ready;
        @(posedge clk);
        #1;
        if (rx_fire)  begin rx_valid = 1'b0; rx_i++; end
        if (ctl_fire) begin ctl_valid = 1'b0; ctl_i++; end
      end
      check(rx_i == ctl_i || rx_valid != ctl_valid, "lock step count");
    end
    repeat (3) @(posedge clk);
    check(correct_count == 32'(exp_good), $sformatf("correct %0d want %0d", correct_count, exp_good));
    check(error_count == 32'(exp_bad), $sformatf("errors %0d want %0d", error_count, exp_bad));
    check(done_pulses == NMSG, $sformatf("msg_done pulses %0d want %0d", done_pulses, NMSG));
    $display("consumer: %0d correct, %0d errors", correct_count, error_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && msg_done) done_pulses++;
endmodule
