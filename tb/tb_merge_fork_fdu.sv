// tb_merge_fork_fdu: self-checking test of MergeForkFDU (the send side's
// junction: FDU frames merged toward the wire, ack frames passed beside them).
//
// Two FDU models offer multi-beat frames tagged with source and frame number;
// a third source offers single-beat ack frames. Both outputs stall at random.
// The bench checks that the datagram output carries every FDU frame whole,
// unmixed and in per-source order, that the ack output carries every ack beat
// unchanged and in order, and the frames_merged counter.
module tb_merge_fork_fdu;
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

  logic [N-1:0] fdu_valid, fdu_ready;
  hexbdg_t      fdu_beat [N];
  logic         dg_valid, dg_ready, ack_in_valid, ack_in_ready, ack_out_valid, ack_out_ready;
  hexbdg_t      dg_beat, ack_in_beat, ack_out_beat;
  logic [31:0]  frames_merged;

  merge_fork_fdu #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 100, NA = 200;

  function automatic hexbdg_t mk(int s, int f, int b, int nb);
    hexbdg_t x;
    x = '0;
    x.data[0] = 8'(s); x.data[1] = 8'(f); x.data[2] = 8'(b);
    for (int i = 3; i < 16; i++) x.data[i] = 8'(s * 31 + f * 13 + b * 7 + i);
    x.eop = (b == nb - 1);
    x.nbval = x.eop ? 5'd12 : 5'd16;
    return x;
  endfunction

  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      fdu_valid[s] = 1'b0; fdu_beat[s] = '0;
      @(posedge rst_n);
      for (int f = 0; f < NF; f++) begin
        int nb;
        nb = (f + s) % 4 + 1;
        for (int b = 0; b < nb; b++) begin
          @(negedge clk);
          while ($urandom_range(3, 0) == 0) @(negedge clk);
          fdu_valid[s] = 1'b1; fdu_beat[s] = mk(s, f, b, nb);
          @(posedge clk); while (!fdu_ready[s]) @(posedge clk);
          #1 fdu_valid[s] = 1'b0;
        end
      end
    end
  end

  initial begin
    ack_in_valid = 1'b0; ack_in_beat = '0;
    @(posedge rst_n);
    for (int a = 0; a < NA; a++) begin
      @(negedge clk);
      while ($urandom_range(2, 0) == 0) @(negedge clk);
      ack_in_valid = 1'b1; ack_in_beat = mk(7, a, 0, 1);
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
        check(ack_out_beat == mk(7, acks, 0, 1), $sformatf("ack beat %0d", acks));
        acks++;
      end
    end
  end

  int next_f[N], next_b[N], done_frames = 0, cur_src = -1;
  initial begin
    dg_ready = 1'b0;
    for (int s = 0; s < N; s++) begin next_f[s] = 0; next_b[s] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (done_frames < N * NF || acks < NA) begin
      @(negedge clk);
      dg_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (dg_valid && dg_ready) begin
        int s;
        s = int'(dg_beat.data[0]);
        check(s < N, "valid source tag");
        if (s >= N) s = 0;
        if (cur_src >= 0) check(s == cur_src, "frames are not mixed");
        check(dg_beat == mk(s, next_f[s], next_b[s], (next_f[s] + s) % 4 + 1),
              $sformatf("source %0d frame %0d beat %0d", s, next_f[s], next_b[s]));
        cur_src = s;
        next_b[s]++;
        if (dg_beat.eop) begin next_f[s]++; next_b[s] = 0; cur_src = -1; done_frames++; end
      end
    end
    repeat (3) @(posedge clk);
    check(frames_merged == N * NF, $sformatf("frames_merged %0d", frames_merged));
    $display("merge_fork_fdu: %0d frames merged, %0d acks passed", done_frames, acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
