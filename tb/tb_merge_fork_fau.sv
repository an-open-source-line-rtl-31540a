// tb_merge_fork_fau: self-checking test of MergeForkFAU (the receive side's
// junction: datagram frames handed to free FAUs, ack frames passed on to the
// AckTracker).
//
// Two FAU models each offer a free credit, accept one frame with random
// stalls, then stay busy for a random time. A separate source offers
// single-beat ack frames and the ack output stalls at random. The bench checks
// that frame beats only go to a unit holding a credit, that every frame
// arrives whole and in order, that both units take frames, that the ack
// stream passes unchanged and in order, and the frames_forked counter.
module tb_merge_fork_fau;
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

  logic          dg_valid, dg_ready, ack_in_valid, ack_in_ready, ack_out_valid, ack_out_ready;
  hexbdg_t       dg_beat, fau_beat, ack_in_beat, ack_out_beat;
  logic [N-1:0]  fau_valid, fau_ready, free_valid, free_ready;
  logic [31:0]   frames_forked;

  merge_fork_fau #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 150, NA = 150;
  logic [7:0] sent[$];

  function automatic hexbdg_t ack_beat(int a);
    hexbdg_t x;
    x = '0;
    for (int i = 0; i < 10; i++) x.data[i] = 8'(a * 3 + i);
    x.nbval = 5'd10; x.eop = 1'b1;
    return x;
  endfunction

  initial begin
    dg_valid = 1'b0; dg_beat = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int nb;
      nb = int'($urandom_range(4, 1));
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        dg_valid = 1'b1;
        for (int i = 0; i < 16; i++) dg_beat.data[i] = 8'($urandom);
        dg_beat.nbval = 5'd16; dg_beat.eop = (b == nb - 1);
        for (int i = 0; i < 16; i++) sent.push_back(dg_beat.data[i]);
        @(posedge clk); while (!dg_ready) @(posedge clk);
        #1 dg_valid = 1'b0;
      end
    end
  end

  initial begin
    ack_in_valid = 1'b0; ack_in_beat = '0;
    @(posedge rst_n);
    for (int a = 0; a < NA; a++) begin
      @(negedge clk);
      while ($urandom_range(2, 0) == 0) @(negedge clk);
      ack_in_valid = 1'b1; ack_in_beat = ack_beat(a);
      @(posedge clk); while (!ack_in_ready) @(posedge clk);
      #1 ack_in_valid = 1'b0;
    end
  end

  int acks = 0;
  initial begin
    ack_out_ready = 1'b0;
    @(posedge rst_n);
    while (acks < NA) begin
      @(negedge clk);
      ack_out_ready = ($urandom_range(2, 0) != 0);
      @(posedge clk);
      if (ack_out_valid && ack_out_ready) begin
        check(ack_out_beat == ack_beat(acks), $sformatf("ack beat %0d", acks));
        acks++;
      end
    end
  end

  int ustate[N], ubusy[N], per_unit[N];
  int frames_seen = 0;
  initial begin
    for (int u = 0; u < N; u++) begin ustate[u] = 0; ubusy[u] = 0; per_unit[u] = 0; end
    free_valid = '0; fau_ready = '0;
    @(posedge rst_n);
    while (frames_seen < NFRAMES || acks < NA) begin
      @(negedge clk);
      for (int u = 0; u < N; u++) begin
        free_valid[u] = (ustate[u] == 0);
        fau_ready[u]  = (ustate[u] == 1) && ($urandom_range(3, 0) != 0);
      end
      #1;
      for (int u = 0; u < N; u++)
        check(!fau_valid[u] || ustate[u] == 1, $sformatf("beat offered to unit %0d without its credit", u));
      begin
        logic [N-1:0] fv, fr, ov, orr;
        hexbdg_t beat;
        fv = free_valid; fr = free_ready; ov = fau_valid; orr = fau_ready; beat = fau_beat;
        @(posedge clk);
        #1;
        for (int u = 0; u < N; u++) begin
          if (ustate[u] == 2) begin
            if (ubusy[u] == 0) ustate[u] = 0; else ubusy[u]--;
          end
          if (ov[u] && orr[u]) begin
            for (int i = 0; i < 16; i++) begin
              check(sent.size() > 0 && beat.data[i] == sent[0], "frame bytes arrive in order");
              if (sent.size() > 0) void'(sent.pop_front());
            end
            if (beat.eop) begin
              ustate[u] = 2; ubusy[u] = int'($urandom_range(60, 0));
              per_unit[u]++; frames_seen++;
            end
          end
          if (fv[u] && fr[u]) ustate[u] = 1;
        end
      end
    end
    repeat (2) @(posedge clk);
    check(frames_forked == NFRAMES, $sformatf("frames_forked %0d", frames_forked));
    check(per_unit[0] > 20 && per_unit[1] > 20, $sformatf("both units used: %0d %0d", per_unit[0], per_unit[1]));
    check(sent.size() == 0, "all bytes delivered");
    $display("merge_fork_fau: unit0 %0d frames, unit1 %0d frames, %0d acks", per_unit[0], per_unit[1], acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
