// tb_l2_remover: self-checking test of the L2Remover (checks and strips the
// 14-byte Ethernet header of each incoming packet).
//
// Packets are offered as QABS quads with random gaps; the output stalls at
// random. Most packets carry this endpoint's MAC address and EtherType 0x3333
// and must come out with the header removed and the frame bytes unchanged,
// with correct end-of-frame marking. Others carry another MAC address, the
// wrong EtherType, or are shorter than a header; they must vanish and be
// counted as dropped. The accepted and dropped counters are checked too.
module tb_l2_remover;
  import dgr_pkg::*;
  localparam logic [47:0] MY = 48'h000A350276B3, OTHER = 48'h000A3502A242;

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

  logic [47:0] my_mac;
  logic        in_valid, in_ready, out_valid, out_ready;
  qabs_t       in_quad, out_quad;
  logic [31:0] accepted, dropped;
  assign my_mac = MY;

  l2_remover dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NP = 200;
  logic [7:0] exp_q[$];
  int         exp_len[$];
  int         n_good = 0, n_bad = 0;
  bit         in_done = 0;

  initial begin
    in_valid = 1'b0; in_quad = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NP; p++) begin
      int len, off, kind;
      logic [7:0] pk[$];
      pk.delete();
      kind = (p % 9 == 4) ? 1 : (p % 13 == 6) ? 2 : (p % 29 == 10) ? 3 : 0;  // 1 MAC, 2 type, 3 runt
      len = int'($urandom_range(100, 10));
      for (int i = 5; i >= 0; i--) pk.push_back(kind == 1 ? OTHER[8*i +: 8] : MY[8*i +: 8]);
      for (int i = 5; i >= 0; i--) pk.push_back(OTHER[8*i +: 8]);
      pk.push_back(8'h33); pk.push_back(kind == 2 ? 8'h34 : 8'h33);
      for (int i = 0; i < len; i++) pk.push_back(8'($urandom));
      if (kind == 3) while (pk.size() > 9) void'(pk.pop_back());
      if (kind == 0) begin
        for (int i = 14; i < pk.size(); i++) exp_q.push_back(pk[i]);
        exp_len.push_back(len);
        n_good++;
      end else n_bad++;
      off = 0;
      while (off < pk.size()) begin
        int n;
        bit last;
        n = (pk.size() - off > 4) ? 4 : pk.size() - off;
        last = (off + n == pk.size());
        @(negedge clk);
        while ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        for (int k = 0; k < 4; k++) begin
          in_quad[k].b = (k < n) ? pk[off + k] : 8'h00;
          in_quad[k].tag = (k >= n) ? ABS_EMPTY_EOP : (last && k == n - 1) ? ABS_VALID_EOP : ABS_VALID_NOT_EOP;
        end
        off += n;
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end
    in_done = 1;
  end

  int seen = 0, cur = 0;
  initial begin
    out_ready = 1'b0;
    @(posedge rst_n);
    while (!in_done || seen < n_good) begin
      @(negedge clk);
      out_ready = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        bit ended;
        int nv;
        ended = 0; nv = 0;
        for (int k = 0; k < 4; k++) begin
          if (out_quad[k].tag == ABS_VALID_NOT_EOP || out_quad[k].tag == ABS_VALID_EOP) begin
            check(!ended, "valid lane after the end");
            check(exp_q.size() > 0 && out_quad[k].b == exp_q[0], $sformatf("frame %0d byte %0d", seen, cur));
            if (exp_q.size() > 0) void'(exp_q.pop_front());
            cur++; nv++;
            if (out_quad[k].tag == ABS_VALID_EOP) ended = 1;
          end else begin
            check(out_quad[k].tag == ABS_EMPTY_EOP && ended, "EmptyEOP only after the end");
            ended = 1;
          end
        end
        if (ended) begin
          check(seen < exp_len.size() && cur == exp_len[seen], $sformatf("frame %0d length %0d", seen, cur));
          seen++; cur = 0;
        end else check(nv == 4, "quads inside a frame are full");
      end
    end
    repeat (20) @(posedge clk);
    check(!out_valid && exp_q.size() == 0, "nothing extra came out");
    check(accepted == 32'(n_good), $sformatf("accepted %0d want %0d", accepted, n_good));
    check(dropped == 32'(n_bad), $sformatf("dropped %0d want %0d", dropped, n_bad));
    $display("l2_remover: %0d accepted, %0d dropped", n_good, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
