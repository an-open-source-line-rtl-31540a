// tb_merge_receive: self-checking test of MergeReceive (merges the frames
// of several units into one stream without mixing their beats).
//
// Two sources offer multi-beat frames with random gaps; the output stalls at
// random. Every beat carries its source number and frame number in its first
// bytes, so the bench can tell them apart. It checks that once a frame starts
// on the output no beat of another frame appears until its eop, that each
// source's frames come out complete and in order, that both sources get
// through while both are waiting, and the frames_merged counter.
module tb_merge_receive;
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

  logic [N-1:0] in_valid, in_ready;
  hexbdg_t      in_beat [N];
  logic         out_valid, out_ready;
  hexbdg_t      out_beat;
  logic [31:0]  frames_merged;

  merge_receive #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 150;   // frames per source

  // source s, frame f, beat b of nb
  function automatic hexbdg_t mk(int s, int f, int b, int nb);
    hexbdg_t x;
    x = '0;
    x.data[0] = 8'(s); x.data[1] = 8'(f); x.data[2] = 8'(f >> 8); x.data[3] = 8'(b);
    for (int i = 4; i < 16; i++) x.data[i] = 8'(s * 37 + f * 11 + b * 5 + i);
    x.eop = (b == nb - 1);
    x.nbval = 5'd16;
    return x;
  endfunction

  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      in_valid[s] = 1'b0; in_beat[s] = '0;
      @(posedge rst_n);
      for (int f = 0; f < NF; f++) begin
        int nb;
        nb = (f * 7 + s * 3) % 5 + 1;
        for (int b = 0; b < nb; b++) begin
          @(negedge clk);
          while ($urandom_range(3, 0) == 0) @(negedge clk);
          in_valid[s] = 1'b1; in_beat[s] = mk(s, f, b, nb);
          @(posedge clk); while (!in_ready[s]) @(posedge clk);
          #1 in_valid[s] = 1'b0;
        end
      end
    end
  end

  int next_f[N], next_b[N], done_frames = 0, cur_src = -1, switches = 0, last_src = -1;
  initial begin
    out_ready = 1'b0;
    for (int s = 0; s < N; s++) begin next_f[s] = 0; next_b[s] = 0; end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (done_frames < N * NF) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        int s, nb;
        s = int'(out_beat.data[0]);
        check(s < N, "valid source tag");
        if (s >= N) s = 0;
        if (cur_src >= 0) check(s == cur_src, "no beat of another frame inside a frame");
        nb = (next_f[s] * 7 + s * 3) % 5 + 1;
        check(out_beat == mk(s, next_f[s], next_b[s], nb), $sformatf("source %0d frame %0d beat %0d", s, next_f[s], next_b[s]));
        cur_src = s;
        next_b[s]++;
        if (out_beat.eop) begin
          next_f[s]++; next_b[s] = 0; cur_src = -1; done_frames++;
          if (last_src >= 0 && s != last_src) switches++;
          last_src = s;
        end
      end
    end
    repeat (3) @(posedge clk);
    check(frames_merged == N * NF, $sformatf("frames_merged %0d", frames_merged));
    check(switches > 50, $sformatf("sources alternate: %0d switches", switches));
    $display("merge_receive: %0d frames, %0d source switches", done_frames, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
