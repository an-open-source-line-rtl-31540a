// tb_fork_send: self-checking test of ForkSend (frame distribution to the
// Frame Delivery Units).
//
// Two unit models stand in for the FDUs. A free unit raises free_valid; once
// that credit is taken it accepts one frame with random stalls, then stays
// busy for a random time before it offers a new credit. The bench checks that
// a frame only goes to a unit that gave a credit and is not already loading,
// that every frame arrives whole and in order at exactly one unit, that when
// both units are free the frames alternate between them, that both units are
// used, and the frames_forked counter.
module tb_fork_send;
  import dgr_pkg::*;
  localparam int N = 2;

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

  logic          in_valid, in_ready;
  hexbdg_t       in_beat, out_beat;
  logic [N-1:0]  out_valid, out_ready, free_valid, free_ready;
  logic [31:0]   frames_forked;

  fork_send #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 200;
  logic [7:0] sent[$];

  initial begin
    in_valid = 1'b0; in_beat = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int nb;
      nb = int'($urandom_range(4, 1));
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int i = 0; i < 16; i++) in_beat.data[i] = 8'($urandom);
        in_beat.nbval = 5'd16;
        in_beat.eop = (b == nb - 1);
        for (int i = 0; i < 16; i++) sent.push_back(in_beat.data[i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        in_valid = 1'b0;
      end
    end
  end

  // unit models: 0 free (offering credit), 1 loading, 2 busy
  int ustate[N], ubusy[N], per_unit[N];
  int frames_seen = 0, alternations = 0, both_free_picks = 0, last_unit = -1;
  bit both_free_at_start = 0;
  initial begin
    for (int u = 0; u < N; u++) begin ustate[u] = 0; ubusy[u] = 0; per_unit[u] = 0; end
    free_valid = '0; out_ready = '0;
    @(posedge rst_n);
    while (frames_seen < NFRAMES) begin
      @(negedge clk);
      for (int u = 0; u < N; u++) begin
        free_valid[u] = (ustate[u] == 0);
        out_ready[u]  = (ustate[u] == 1) && ($urandom_range(3, 0) != 0);
      end
      #1;
      for (int u = 0; u < N; u++)
        check(!out_valid[u] || ustate[u] == 1, $sformatf("beat offered to unit %0d without its credit", u));
      begin
        logic [N-1:0] took, fv, fr, ov, orr;
        fv = free_valid; fr = free_ready; ov = out_valid; orr = out_ready;
        @(posedge clk);
        #1;
        for (int u = 0; u < N; u++) begin
          if (ustate[u] == 2) begin
            if (ubusy[u] == 0) ustate[u] = 0; else ubusy[u]--;
          end
          if (ov[u] && orr[u]) begin
            for (int i = 0; i < 16; i++) begin
              check(sent.size() > 0 && out_beat_q[i] == sent[0], "frame bytes arrive in order");
              if (sent.size() > 0) void'(sent.pop_front());
            end
            if (eop_q) begin
              ustate[u] = 2; ubusy[u] = int'($urandom_range(60, 0));
              per_unit[u]++;
              if (last_unit >= 0 && u != last_unit) alternations++;
              last_unit = u;
              frames_seen++;
            end
          end
          if (fv[u] && fr[u]) ustate[u] = 1;
        end
      end
    end
    repeat (2) @(posedge clk);
    check(frames_forked == NFRAMES, $sformatf("frames_forked %0d", frames_forked));
    check(per_unit[0] > 20 && per_unit[1] > 20, $sformatf("both units used: %0d %0d", per_unit[0], per_unit[1]));
    check(alternations > 40, $sformatf("alternations %0d", alternations));
    check(sent.size() == 0, "all bytes delivered");
    $display("fork_send: unit0 %0d frames, unit1 %0d frames, %0d alternations", per_unit[0], per_unit[1], alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the beat as it was at the clock edge
  hexbyte_t out_beat_q;
  logic     eop_q;
  always @(posedge clk) begin out_beat_q <= out_beat.data; eop_q <= out_beat.eop; end
endmodule
