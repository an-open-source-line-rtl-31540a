// tb_ack_aggregator: self-checking test of the AckAggregator (turns FAU
// reports into acknowledgement frames).
//
// Two FAU models raise reports {source ID, frame ID} at random times and hold
// them until taken; the output stalls at random. Each ack frame must be one
// 10-byte beat with eop: destination = the reporting source ID, source = this
// endpoint's ID, a frame ID counting up from 0, ACKStart = the reported frame
// ID, ACKCount = 1, flags = 0 (no message). The bench checks every byte, that
// every report is acknowledged exactly once and in the order each FAU raised
// them, that both FAUs are served when both wait, and the counter.
module tb_ack_aggregator;
  import dgr_pkg::*;
  localparam int N = 2;
  localparam logic [15:0] MY_ID = 16'h00C3;

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

  logic [15:0]        my_id;
  logic [N-1:0]       rep_valid, rep_ready;
  logic [N-1:0][15:0] rep_sid, rep_fid;
  logic               out_valid, out_ready;
  hexbdg_t            out_beat;
  logic [31:0]        acks_generated;
  assign my_id = MY_ID;

  ack_aggregator #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NREP = 300;   // reports per FAU
  logic [31:0] pend[$];        // {sid, fid} reports taken by the block, in order
  int raised[N], both_wait = 0;

  initial begin
    rep_valid = '0; rep_sid = '0; rep_fid = '0;
    for (int i = 0; i < N; i++) raised[i] = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (raised[0] < NREP || raised[1] < NREP || rep_valid != '0) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (!rep_valid[i] && raised[i] < NREP && $urandom_range(2, 0) == 0) begin
          rep_valid[i] = 1'b1;
          rep_sid[i] = 16'(16'h8000 * i + raised[i]);
          rep_fid[i] = 16'($urandom);
          raised[i]++;
        end
      #1;
      if (rep_valid == '1) both_wait++;
      begin
        logic [N-1:0] taken;
        taken = rep_valid & rep_ready;
        for (int i = 0; i < N; i++) if (taken[i]) pend.push_back({rep_sid[i], rep_fid[i]});
        check($countones(taken) <= 1, "one report taken per cycle");
        @(posedge clk);
        #1;
        rep_valid &= ~taken;
      end
    end
  end

  int acks = 0;
  int from[N];
  initial begin
    out_ready = 1'b0;
    from[0] = 0; from[1] = 0;
    @(posedge rst_n);
    while (acks < N * NREP) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        logic [31:0] r;
        logic [15:0] seq;
        seq = 16'(acks);
        r = (pend.size() > 0) ? pend.pop_front() : 32'h0;
        check(out_beat.eop && out_beat.nbval == 5'd10, "one 10-byte beat");
        check(out_beat.data[0] == r[31:24] && out_beat.data[1] == r[23:16], "DID is the reporting source");
        check(out_beat.data[2] == MY_ID[15:8] && out_beat.data[3] == MY_ID[7:0], "SID is this endpoint");
        check(out_beat.data[4] == seq[15:8] && out_beat.data[5] == seq[7:0], $sformatf("ack frame ID %0d", acks));
        check(out_beat.data[6] == r[15:8] && out_beat.data[7] == r[7:0], "ACKStart is the reported frame");
        check(out_beat.data[8] == 8'd1 && out_beat.data[9] == 8'd0, "count 1, flags 0");
        if (r[31]) from[1]++; else from[0]++;
        acks++;
      end
    end
    repeat (3) @(posedge clk);
    check(pend.size() == 0 && !out_valid, "nothing left over");
    check(acks_generated == N * NREP, $sformatf("acks_generated %0d", acks_generated));
    check(from[0] == NREP && from[1] == NREP && both_wait > 20, "both FAUs served");
    $display("ack_aggregator: %0d acks, both waiting in %0d cycles", acks, both_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
