// tb_producer: self-checking test of the message Producer.
//
// The Producer is run in incremental-length mode (lengths 0..MAXL, one message
// per length) with rolling payload data, and the consumer side of its stream
// stalls at random. A reference model written here predicts every item: a
// meta item carrying the length and opcode, then ceil(length/16) data items
// whose valid bytes continue a byte counter that runs across messages and
// whose unused tail bytes hold the NUKE filler. The bench checks every item,
// that nothing is offered while `enable` is low at a message boundary, that
// msg_count matches, and that `done` rises after the last message.
module tb_producer;
  import dgr_pkg::*;
  localparam int unsigned MAXL   = 40;
  localparam logic [7:0]  NUKE   = 8'hAA;
  localparam logic [7:0]  OPCODE = 8'h01;

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

  logic        enable, out_valid, out_ready, done;
  mlmesg_t     out_msg;
  logic [31:0] msg_count;

  producer #(.LMODE(LEN_INCREMENTAL), .MINL(0), .MAXL(MAXL), .DMODE(DATA_ROLLING),
             .NUKE(NUKE), .OPCODE(OPCODE)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected item stream
  mlmesg_t exp_q[$];
  initial begin
    logic [7:0] b;
    mlmesg_t m;
    b = 8'h00;
    for (int unsigned len = 0; len <= MAXL; len++) begin
      m = '0; m.is_meta = 1'b1; m.meta.length = len; m.meta.opcode = OPCODE;
      exp_q.push_back(m);
      for (int unsigned off = 0; off < len; off += 16) begin
        m = '0;
        for (int i = 0; i < 16; i++)
          if (off + i < len) begin m.data[i] = b; b++; end
          else m.data[i] = NUKE;
        exp_q.push_back(m);
      end
    end
  end

  int items = 0, stall_seen = 0, gated = 0;
  bit in_msg = 0;
  initial begin
    int total;
    enable = 1'b0; out_ready = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    total = exp_q.size();
    repeat (5) begin
      @(negedge clk);
      check(!out_valid, "no item offered while enable is low");
    end
    while (items < total) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      if (!in_msg) enable = ($urandom_range(4, 0) != 0);
      #1;
      if (!in_msg && !enable) begin
        gated++;
        check(!out_valid, "meta offered while enable low");
      end
      if (out_valid && !out_ready) stall_seen++;
      @(posedge clk);
      if (out_valid && out_ready) begin
        mlmesg_t e;
        e = exp_q.pop_front();
        check(out_msg == e, $sformatf("item %0d: got meta=%0b len=%0d d0=%02h want meta=%0b len=%0d d0=%02h",
              items, out_msg.is_meta, out_msg.meta.length, out_msg.data[0], e.is_meta, e.meta.length, e.data[0]));
        items++;
        // inside a message until its last data item (or a zero-length meta)
        if (e.is_meta) in_msg = (e.meta.length != 0);
        else in_msg = (exp_q.size() != 0 && !exp_q[0].is_meta);
      end
    end
    repeat (3) @(posedge clk);
    check(done, "done after the last message");
    check(!out_valid, "nothing offered after done");
    check(msg_count == MAXL + 1, $sformatf("msg_count %0d", msg_count));
    check(stall_seen > 10 && gated > 10, "stalls and gating exercised");
    $display("producer: %0d items, %0d stalled cycles, %0d gated cycles", items, stall_seen, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
