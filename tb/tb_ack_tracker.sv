// tb_ack_tracker: self-checking test of the AckTracker (matches incoming
// acknowledgement frames to the frames held by the FDUs).
//
// The bench plays both sides. It registers random frame IDs for the two FDUs
// on the fid ports, then sends acknowledgement frames whose header names a
// range (ACKStart, ACKCount). Some ranges cover one in-flight ID, some both,
// some none (stale), some wrap around 0xFFFF, and some frames carry extra
// beats after the header that must be skipped. A reference table in the bench
// predicts which FDUs must get an ack pulse (one cycle, with their own frame
// ID) after each ack frame; the bench checks the pulses and the matched and
// stale counters.
module tb_ack_tracker;
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

  logic [N-1:0]       fid_valid, fid_ready, ack_valid;
  logic [N-1:0][15:0] fid, ack_fid;
  logic               in_valid, in_ready;
  hexbdg_t            in_beat;
  logic [31:0]        acks_matched, stale_acks;

  ack_tracker #(.N(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          m_in[N];
  logic [15:0] m_id[N];
  int          exp_match = 0, exp_stale = 0, pulses_seen = 0;
  logic [N-1:0] exp_pulse;

  initial begin
    fid_valid = '0; fid = '0; in_valid = 1'b0; in_beat = '0;
    for (int i = 0; i < N; i++) m_in[i] = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      logic [15:0] st;
      logic [7:0]  cnt;
      int          kind, extra;
      // refill FDUs that are free
      @(negedge clk);
      fid_valid = '0;
      for (int i = 0; i < N; i++)
        if (!m_in[i] && $urandom_range(1, 0) == 1) begin
          fid_valid[i] = 1'b1;
          fid[i] = (t % 7 == 3) ? 16'hFFFE + 16'(i) : 16'($urandom);
          m_in[i] = 1; m_id[i] = fid[i];
        end
      @(posedge clk);
      #1 fid_valid = '0;
      // an ack frame
      kind = t % 4;
      if (kind == 0 && m_in[0]) begin st = m_id[0]; cnt = 8'd1; end
      else if (kind == 1 && m_in[1]) begin st = m_id[1] - 16'd2; cnt = 8'd3; end
      else if (kind == 2 && m_in[0] && m_in[1]) begin
        st = m_id[0]; cnt = 8'(m_id[1] - m_id[0] + 16'd1);
        if (16'(m_id[1] - m_id[0]) > 16'd200) cnt = 8'd1;
      end else begin st = 16'($urandom); cnt = 8'($urandom_range(3, 0)); end
      exp_pulse = '0;
      for (int i = 0; i < N; i++)
        if (m_in[i] && 16'(m_id[i] - st) < 16'(cnt)) begin exp_pulse[i] = 1'b1; m_in[i] = 0; end
      if (exp_pulse != '0) exp_match++; else exp_stale++;
      extra = int'($urandom_range(2, 0));
      for (int b = 0; b <= extra; b++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_beat = '0;
        for (int i = 0; i < 16; i++) in_beat.data[i] = 8'($urandom);
        if (b == 0) begin
          in_beat.data[0] = 8'h00; in_beat.data[1] = 8'h01;  // DID
          in_beat.data[6] = st[15:8]; in_beat.data[7] = st[7:0];
          in_beat.data[8] = cnt;
        end else begin
          // body beats look like headers that would match: they must be skipped
          in_beat.data[6] = m_id[0][15:8]; in_beat.data[7] = m_id[0][7:0]; in_beat.data[8] = 8'd1;
        end
        in_beat.nbval = (b == extra) ? 5'd10 : 5'd16;
        in_beat.eop = (b == extra);
        @(posedge clk);
        #1 in_valid = 1'b0;
        if (b == 0) begin
          check(ack_valid == exp_pulse, $sformatf("ack %0d: pulses %b want %b (start %04h count %0d)", t, ack_valid, exp_pulse, st, cnt));
          for (int i = 0; i < N; i++) if (exp_pulse[i]) check(ack_fid[i] == m_id[i], "ack carries the FDU's frame ID");
        end else check(ack_valid == '0, "no pulse for a body beat");
      end
      @(posedge clk); #1;
      check(ack_valid == '0, "pulse lasts one cycle");
    end
    check(acks_matched == 32'(exp_match), $sformatf("matched %0d want %0d", acks_matched, exp_match));
    check(stale_acks == 32'(exp_stale), $sformatf("stale %0d want %0d", stale_acks, exp_stale));
    check(exp_match > 100 && exp_stale > 30, "both outcomes exercised");
    $display("ack_tracker: %0d matched, %0d stale", exp_match, exp_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
