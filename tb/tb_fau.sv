// tb_fau: self-checking test of a Frame Acknowledgement Unit (receive-side
// frame buffer that reports each frame for acknowledgement).
//
// The buffer is cut to 8 beats. For each frame (1..8 beats, random source ID
// in bytes 2..3 and frame ID in bytes 4..5) the bench takes the unit's free
// credit, loads the frame with gaps, and then, with random stalls on both
// outputs, checks that exactly one report carries the frame's source and
// frame IDs, that the frame comes out whole and unchanged, that the unit
// offers no credit until both the report and the frame are out, and the
// frames_received counter.
module tb_fau;
  import dgr_pkg::*;
  localparam int DEPTH = 8;

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

  logic        in_valid, in_ready, free_valid, free_ready, rep_valid, rep_ready;
  logic [15:0] rep_sid, rep_fid;
  logic        out_valid, out_ready;
  hexbdg_t     in_beat, out_beat;
  logic [31:0] frames_received;

  fau #(.DEPTH_BEATS(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NFRAMES = 150;
  hexbdg_t frame[$];

  initial begin
    in_valid = 1'b0; in_beat = '0; free_ready = 1'b0; rep_ready = 1'b0; out_ready = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int nb, b, reps;
      logic [15:0] sid, id;
      sid = 16'($urandom); id = 16'($urandom);
      nb = int'($urandom_range(DEPTH, 1));
      frame.delete();
      for (int k = 0; k < nb; k++) begin
        hexbdg_t x;
        for (int i = 0; i < 16; i++) x.data[i] = 8'($urandom);
        if (k == 0) begin x.data[2] = sid[15:8]; x.data[3] = sid[7:0]; x.data[4] = id[15:8]; x.data[5] = id[7:0]; end
        x.eop = (k == nb - 1);
        x.nbval = x.eop ? 5'($urandom_range(16, 10)) : 5'd16;
        frame.push_back(x);
      end
      @(negedge clk); free_ready = 1'b1;
      @(posedge clk); while (!free_valid) @(posedge clk);
      #1 free_ready = 1'b0;
      for (int k = 0; k < nb; k++) begin
        @(negedge clk);
        while ($urandom_range(2, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_beat = frame[k];
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 1'b0;
      end
      // drain report and frame
      b = 0; reps = 0;
      while (b < nb || reps == 0) begin
        @(negedge clk);
        check(!free_valid, "no credit while the frame or report is out");
        rep_ready = ($urandom_range(3, 0) == 0);
        out_ready = ($urandom_range(2, 0) != 0);
        #1;
        if (rep_valid && rep_ready) begin
          check(rep_sid == sid && rep_fid == id, $sformatf("report %04h/%04h want %04h/%04h", rep_sid, rep_fid, sid, id));
          reps++;
        end
        if (out_valid && out_ready) begin
          check(b < nb && out_beat == frame[b], $sformatf("frame %0d beat %0d", f, b));
          b++;
        end
        @(posedge clk);
      end
      @(negedge clk); rep_ready = 1'b0; out_ready = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      check(reps == 1 && !rep_valid && !out_valid && free_valid, "one report, unit free again");
    end
    check(frames_received == NFRAMES, $sformatf("frames_received %0d", frames_received));
    $display("fau: %0d frames", NFRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
