// tb_l2_inserter: self-checking test of the L2Inserter (puts the 14-byte
// Ethernet header in front of each outgoing frame).
//
// Frames of 10..120 bytes are offered as QABS quads (full quads, then an end
// quad with 1..4 valid bytes) with random gaps; the MAC side stalls at random.
// For each packet the bench expects destination MAC, source MAC, EtherType
// 0x3333 and then the frame bytes unchanged. It checks every byte, that quads
// before the end are full, that the end quad marks its last byte ValidEOP and
// pads with EmptyEOP, the packet lengths, and the packet counter.
module tb_l2_inserter;
  import dgr_pkg::*;
  localparam logic [47:0] SRC = 48'h000A3502A242, DST = 48'h000A350276B3;

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

  logic [47:0] src_mac, dst_mac;
  logic        in_valid, in_ready, out_valid, out_ready;
  qabs_t       in_quad, out_quad;
  logic [31:0] packets;
  assign src_mac = SRC;
  assign dst_mac = DST;

  l2_inserter dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NP = 150;
  logic [7:0] exp_q[$];
  int         exp_len[$];

  initial begin
    in_valid = 1'b0; in_quad = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NP; p++) begin
      int len, off;
      len = int'($urandom_range(120, 10));
      for (int i = 5; i >= 0; i--) exp_q.push_back(DST[8*i +: 8]);
      for (int i = 5; i >= 0; i--) exp_q.push_back(SRC[8*i +: 8]);
      exp_q.push_back(8'h33); exp_q.push_back(8'h33);
      exp_len.push_back(len + 14);
      off = 0;
      while (off < len) begin
        int n;
        bit last;
        n = (len - off > 4) ? 4 : len - off;
        last = (off + n == len);
        @(negedge clk);
        while ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1;
        for (int k = 0; k < 4; k++) begin
          in_quad[k].b = (k < n) ? 8'($urandom) : 8'h00;
          in_quad[k].tag = (k >= n) ? ABS_EMPTY_EOP : (last && k == n - 1) ? ABS_VALID_EOP : ABS_VALID_NOT_EOP;
          if (k < n) exp_q.push_back(in_quad[k].b);
        end
        off += n;
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end
  end

  int seen = 0, cur = 0;
  initial begin
    out_ready = 1'b0;
    @(posedge rst_n);
    while (seen < NP) begin
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
            check(exp_q.size() > 0 && out_quad[k].b == exp_q[0], $sformatf("packet %0d byte %0d", seen, cur));
            if (exp_q.size() > 0) void'(exp_q.pop_front());
            cur++; nv++;
            if (out_quad[k].tag == ABS_VALID_EOP) ended = 1;
          end else begin
            check(out_quad[k].tag == ABS_EMPTY_EOP && (ended || nv == 0), "EmptyEOP only after the end");
            ended = 1;
          end
        end
        if (ended) begin
          check(cur == exp_len[seen], $sformatf("packet %0d length %0d want %0d", seen, cur, exp_len[seen]));
          seen++; cur = 0;
        end else check(nv == 4, "quads inside a packet are full");
      end
    end
    repeat (3) @(posedge clk);
    check(packets == NP, $sformatf("packets %0d", packets));
    check(exp_q.size() == 0, "all bytes out");
    $display("l2_inserter: %0d packets", seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
