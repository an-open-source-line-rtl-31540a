// tb_merge_to_wire: self-checking test of MergeToWire (transmit arbiter
// between ack frames and datagram frames, and receive router).
//
// Transmit: a datagram source offers multi-beat frames and an ack source
// offers single-beat ack frames, each with random gaps; the wire side stalls
// at random. The bench checks that frames are never mixed on the wire, that
// every frame of each kind arrives unchanged and in order, and the switching
// rule of the arbiter: when a frame of one kind ends while a frame of the
// other kind is waiting, the other kind goes next; from idle, a waiting ack
// goes first. The frame and switch counters are checked against the bench's
// own count, and both switch directions must occur.
//
// Receive: frames addressed to this endpoint with a non-zero ACKCount must
// come out on the ack output, those with ACKCount 0 on the datagram output,
// and frames for another endpoint ID must be dropped and counted.
module tb_merge_to_wire;
  import dgr_pkg::*;
  localparam logic [15:0] MY_ID = 16'h0042;

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

  logic [15:0] my_id;
  logic        dg_valid, dg_ready, ack_valid, ack_ready, tx_valid, tx_ready;
  hexbdg_t     dg_beat, ack_beat, tx_beat, rx_beat, rx_ack_beat, rx_dg_beat;
  logic        rx_valid, rx_ready, rx_ack_valid, rx_ack_ready, rx_dg_valid, rx_dg_ready;
  logic [31:0] tx_ack_frames, tx_dg_frames, ack_to_dg_switches, dg_to_ack_switches, rx_dropped;
  assign my_id = MY_ID;

  merge_to_wire dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NDG = 200, NACK = 250, NRX = 300;

  // kind 0 = datagram, 1 = ack; byte 15 = kind, bytes 12..13 = frame number, 14 = beat
  function automatic hexbdg_t mk(int kind, int f, int b, int nb);
    hexbdg_t x;
    x = '0;
    for (int i = 0; i < 12; i++) x.data[i] = 8'(f * 5 + b * 3 + i + kind);
    x.data[12] = 8'(f); x.data[13] = 8'(f >> 8); x.data[14] = 8'(b); x.data[15] = 8'(kind);
    x.eop = (b == nb - 1);
    x.nbval = 5'd16;
    return x;
  endfunction
  function automatic int dg_len(int f); return (f * 3) % 5 + 1; endfunction

  initial begin
    dg_valid = 1'b0; dg_beat = '0;
    @(posedge rst_n);
    for (int f = 0; f < NDG; f++)
      for (int b = 0; b < dg_len(f); b++) begin
        @(negedge clk);
        while (b == 0 && $urandom_range(5, 0) == 0) @(negedge clk);
        dg_valid = 1'b1; dg_beat = mk(0, f, b, dg_len(f));
        @(posedge clk); while (!dg_ready) @(posedge clk);
        #1 dg_valid = 1'b0;
      end
  end
  initial begin
    ack_valid = 1'b0; ack_beat = '0;
    @(posedge rst_n);
    for (int f = 0; f < NACK; f++) begin
      @(negedge clk);
      while ($urandom_range(4, 0) == 0) @(negedge clk);
      ack_valid = 1'b1; ack_beat = mk(1, f, 0, 1);
      @(posedge clk); while (!ack_ready) @(posedge clk);
      #1 ack_valid = 1'b0;
    end
  end

  // arbitration rule, checked where frames are taken from the two sources
  int  want_kind = -1;   // -1: no rule pending
  bit  in_frame = 0;
  int  cur_kind = 0, sw_a2d = 0, sw_d2a = 0;
  always @(posedge clk) if (rst_n) begin
    bit dg_fire, ack_fire;
    dg_fire  = dg_valid && dg_ready;
    ack_fire = ack_valid && ack_ready;
    check(!(dg_fire && ack_fire), "one source at a time");
    if ((dg_fire || ack_fire) && !in_frame) begin
      int k;
      k = ack_fire ? 1 : 0;
      if (want_kind >= 0) begin
        check(k == want_kind, $sformatf("arbiter sent kind %0d, rule says %0d", k, want_kind));
        if (k != cur_kind) begin if (k == 0) sw_a2d++; else sw_d2a++; end
      end
      cur_kind = k;
      in_frame = 1;
    end
    if ((dg_fire && dg_beat.eop) || (ack_fire && ack_beat.eop)) begin
      in_frame = 0;
      // the other kind waiting at the end of this frame goes next
      if (ack_fire && dg_valid) want_kind = 0;
      else if (dg_fire && ack_valid) want_kind = 1;
      else want_kind = -1;
    end
  end

  int nd = 0, na = 0, nb_d = 0, tx_kind = -1;
  initial begin
    tx_ready = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (nd < NDG || na < NACK) begin
      @(negedge clk);
      tx_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (tx_valid && tx_ready) begin
        if (tx_kind < 0) tx_kind = int'(tx_beat.data[15]);
        check(int'(tx_beat.data[15]) == tx_kind, "frames are not mixed on the wire");
        if (tx_kind == 1) begin
          check(tx_beat == mk(1, na, 0, 1), $sformatf("ack frame %0d", na));
          na++; tx_kind = -1;
        end else begin
          check(tx_beat == mk(0, nd, nb_d, dg_len(nd)), $sformatf("datagram frame %0d beat %0d", nd, nb_d));
          nb_d++;
          if (tx_beat.eop) begin nd++; nb_d = 0; tx_kind = -1; end
        end
      end
    end
    repeat (4) @(posedge clk);
    check(tx_dg_frames == NDG && tx_ack_frames == NACK, "frame counters");
    check(ack_to_dg_switches == 32'(sw_a2d) && dg_to_ack_switches == 32'(sw_d2a),
          $sformatf("switches %0d/%0d want %0d/%0d", ack_to_dg_switches, dg_to_ack_switches, sw_a2d, sw_d2a));
    check(sw_a2d > 10 && sw_d2a > 10, "both switch directions happen");
    $display("merge_to_wire tx: %0d datagrams, %0d acks, ack->dg %0d, dg->ack %0d", nd, na, sw_a2d, sw_d2a);
    wait (rx_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- receive side ----------------
  int exp_kind[$];        // per rx frame: 0 dg, 1 ack, 2 drop
  int n_drop = 0;
  bit rx_done = 0;
  function automatic hexbdg_t rx_mk(int f, int b, int nb, int kind);
    hexbdg_t x;
    x = '0;
    for (int i = 0; i < 16; i++) x.data[i] = 8'(f * 7 + b + i);
    x.data[15] = 8'(f); x.data[14] = 8'(b);
    if (b == 0) begin
      x.data[0] = (kind == 2) ? MY_ID[15:8] ^ 8'h01 : MY_ID[15:8];
      x.data[1] = MY_ID[7:0];
      x.data[8] = (kind == 1) ? 8'd1 : 8'd0;
    end
    x.eop = (b == nb - 1);
    x.nbval = x.eop ? 5'd10 : 5'd16;
    return x;
  endfunction
  initial begin
    rx_valid = 1'b0; rx_beat = '0;
    @(posedge rst_n);
    for (int f = 0; f < NRX; f++) begin
      int kind, nb;
      kind = int'($urandom_range(2, 0));
      nb = (kind == 1) ? 1 : int'($urandom_range(3, 1));
      exp_kind.push_back(kind);
      if (kind == 2) n_drop++;
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        rx_valid = 1'b1; rx_beat = rx_mk(f, b, nb, kind);
        @(posedge clk); while (!rx_ready) @(posedge clk);
        #1 rx_valid = 1'b0;
      end
    end
  end
  hexbdg_t got_ack[$], got_dg[$];
  initial begin
    rx_ack_ready = 1'b0; rx_dg_ready = 1'b0;
    @(posedge rst_n);
    repeat (NRX * 8) begin
      @(negedge clk);
      rx_ack_ready = ($urandom_range(2, 0) != 0);
      rx_dg_ready  = ($urandom_range(2, 0) != 0);
      @(posedge clk);
      if (rx_ack_valid && rx_ack_ready) got_ack.push_back(rx_ack_beat);
      if (rx_dg_valid && rx_dg_ready) got_dg.push_back(rx_dg_beat);
    end
    // replay the expected routing
    for (int f = 0; f < exp_kind.size(); f++) begin
      int k;
      k = exp_kind[f];
      if (k == 1) begin
        check(got_ack.size() > 0 && int'(got_ack[0].data[15]) == (f & 255), $sformatf("rx frame %0d on the ack output", f));
        if (got_ack.size() > 0) void'(got_ack.pop_front());
      end else if (k == 0) begin
        bit last;
        last = 0;
        check(got_dg.size() > 0 && int'(got_dg[0].data[15]) == (f & 255), $sformatf("rx frame %0d on the datagram output", f));
        while (got_dg.size() > 0 && !last) begin last = got_dg[0].eop; void'(got_dg.pop_front()); end
      end
    end
    check(got_ack.size() == 0 && got_dg.size() == 0, "no dropped frame leaked");
    check(rx_dropped == 32'(n_drop), $sformatf("rx_dropped %0d want %0d", rx_dropped, n_drop));
    $display("merge_to_wire rx: %0d frames, %0d dropped", exp_kind.size(), n_drop);
    rx_done = 1;
  end
endmodule
