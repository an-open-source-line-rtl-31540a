// tb_fdu: self-checking test of a Frame Delivery Unit (frame buffer with
// acknowledgement and timeout retransmission).
//
// TIMEOUT is cut to 40 cycles and the buffer to 8 beats. For each of a series
// of frames (1..6 beats, frame ID in bytes 4..5) the bench takes the unit's
// free credit, loads the frame, and checks: the frame ID is reported once on
// the fid port and equals the ID in the header; the frame is sent out whole;
// `holding` is high from the end of loading until the acknowledgement.
// Per frame it then picks one case: acknowledge at once; acknowledge during
// the first transmission; send a wrong ID first (must be ignored); or let the
// timer run out one or two times before acknowledging. After a timeout the
// same frame must be sent again, starting TIMEOUT cycles after the previous
// transmission ended (checked to within 2 cycles), and retransmissions must
// count each one. After the acknowledgement the unit must offer its credit
// again.
module tb_fdu;
  import dgr_pkg::*;
  localparam int DEPTH   = 8;
  localparam int TIMEOUT = 40;

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

  logic        in_valid, in_ready, free_valid, free_ready, fid_valid, fid_ready;
  logic [15:0] fid, ack_fid;
  logic        ack_valid, out_valid, out_ready, holding, timeout_pulse;
  hexbdg_t     in_beat, out_beat;
  logic [31:0] retransmissions;

  fdu #(.DEPTH_BEATS(DEPTH), .TIMEOUT(TIMEOUT)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  // reported frame IDs
  logic [15:0] fid_seen[$];
  always @(posedge clk) if (rst_n && fid_valid && fid_ready) fid_seen.push_back(fid);

  int exp_retx = 0, pulses = 0;
  always @(posedge clk) if (rst_n && timeout_pulse) pulses++;

  hexbdg_t frame[$];

  // receive one whole copy of `frame`; returns the cycle its last beat left
  task automatic receive_copy(output int end_cycle, input bit ack_midway, input logic [15:0] id);
    int b;
    b = 0;
    while (b < frame.size()) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      ack_valid = ack_midway && b == 0;
      ack_fid = id;
      #1;
      if (out_valid && out_ready) begin
        check(out_beat == frame[b], $sformatf("beat %0d of frame %04h", b, id));
        b++;
      end
      @(posedge clk);
      end_cycle = cycle;
    end
    @(negedge clk);
    out_ready = 1'b0; ack_valid = 1'b0;
  endtask

  initial begin
    int n_frames;
    n_frames = 60;
    in_valid = 1'b0; in_beat = '0; free_ready = 1'b0; fid_ready = 1'b0;
    ack_valid = 1'b0; ack_fid = '0; out_ready = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < n_frames; f++) begin
      logic [15:0] id;
      int nb, mode, t_end, t_end2;
      id = 16'($urandom);
      nb = int'($urandom_range(6, 1));
      mode = f % 5;   // 0 ack at once, 1 ack during send, 2 wrong id first, 3 one timeout, 4 two timeouts
      frame.delete();
      for (int b = 0; b < nb; b++) begin
        hexbdg_t x;
        for (int i = 0; i < 16; i++) x.data[i] = 8'($urandom);
        if (b == 0) begin x.data[4] = id[15:8]; x.data[5] = id[7:0]; end
        x.eop = (b == nb - 1);
        x.nbval = x.eop ? 5'($urandom_range(16, 6)) : 5'd16;
        frame.push_back(x);
      end
      // take the credit
      @(negedge clk);
      free_ready = 1'b1;
      @(posedge clk);
      while (!free_valid) @(posedge clk);
      #1 free_ready = 1'b0;
      // load
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        in_valid = 1'b1; in_beat = frame[b];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 1'b0;
      end
      check(!free_valid, "no credit while a frame is held");
      // frame ID report
      @(negedge clk); fid_ready = 1'b1;
      @(posedge clk); #1 fid_ready = 1'b0;
      check(holding, "holding after load");
      // first transmission
      receive_copy(t_end, mode == 1, id);
      if (mode == 2) begin
        @(negedge clk); ack_valid = 1'b1; ack_fid = id ^ 16'h0100;
        @(negedge clk); ack_valid = 1'b0;
        check(holding, "wrong ID is ignored");
      end
      if (mode >= 3) begin
        repeat (mode - 2) begin
          exp_retx++;
          receive_copy(t_end2, 1'b0, id);
          // out_ready is random, so the copy ends some cycles after it starts
          check(t_end2 - t_end >= TIMEOUT, $sformatf("retransmission after %0d cycles", t_end2 - t_end));
          t_end = t_end2;
        end
      end
      if (mode != 1) begin
        @(negedge clk); ack_valid = 1'b1; ack_fid = id;
        @(negedge clk); ack_valid = 1'b0;
      end
      repeat (2) @(posedge clk);
      #1;
      check(!holding && free_valid, $sformatf("frame %0d released after its ack", f));
      check(fid_seen.size() == 1 && fid_seen[0] == id, "frame ID reported once");
      fid_seen.delete();
    end
    check(retransmissions == 32'(exp_retx), $sformatf("retransmissions %0d want %0d", retransmissions, exp_retx));
    check(pulses == exp_retx, "timeout pulses");
    $display("fdu: %0d frames, %0d retransmissions", n_frames, retransmissions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
