// tb_byte_shifter: self-checking test of the byte_shifter alignment buffer.
//
// A reference queue of bytes is kept beside the block. Every cycle the bench
// offers a random number of new bytes (0..IN_BYTES, consecutive values) and
// pops a random number (0..min(count, OUT_BYTES)). It checks that the block's
// byte count equals the queue length and that the popped bytes at the bottom
// of out_data are the oldest bytes of the queue, in order. It also checks that
// in_ready follows the room rule (count + IN_BYTES <= DEPTH) and that `clear`
// empties the buffer. Defaults are those the Sender uses (24 in, 24 out, 48).
module tb_byte_shifter;
  localparam int IN_BYTES  = 24;
  localparam int OUT_BYTES = 24;
  localparam int DEPTH     = 48;

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

  logic                            clear, in_valid, in_ready;
  logic [IN_BYTES-1:0][7:0]        in_data;
  logic [$clog2(IN_BYTES+1)-1:0]   in_n;
  logic [OUT_BYTES-1:0][7:0]       out_data;
  logic [$clog2(DEPTH+1)-1:0]      count;
  logic [$clog2(OUT_BYTES+1)-1:0]  pop_n;

  byte_shifter #(.IN_BYTES(IN_BYTES), .OUT_BYTES(OUT_BYTES), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model[$];
  logic [7:0] next_val = 8'd1;
  int pushed_total = 0, popped_total = 0;

  initial begin
    #1 rst_n = 1'b0;
    clear = 0; in_valid = 0; in_data = '0; in_n = '0; pop_n = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(int'(count) == model.size(), $sformatf("count %0d vs model %0d", count, model.size()));
      check(in_ready == (model.size() + IN_BYTES <= DEPTH), "in_ready rule");
      // choose a pop within what the model holds
      begin
        int lim, p;
        lim = (model.size() < OUT_BYTES) ? model.size() : OUT_BYTES;
        p   = (lim == 0) ? 0 : $urandom_range(lim, 0);
        pop_n = $bits(pop_n)'(p);
        for (int i = 0; i < p; i++)
          if (out_data[i] != model[i]) begin
            check(1'b0, $sformatf("byte %0d of pop: got %02h want %02h", i, out_data[i], model[i]));
            break;
          end
        if (p > 0) checks++;
      end
      in_valid = ($urandom_range(3, 0) != 0);
      in_n     = $bits(in_n)'($urandom_range(IN_BYTES, 0));
      for (int i = 0; i < IN_BYTES; i++) in_data[i] = next_val + 8'(i);
      clear = (cyc == 3000);
      #1;
      begin
        bit push;
        push = in_valid && in_ready;
        @(posedge clk);
        #1;
        // update the model with what the block was asked to do in that cycle
        if (clear) model.delete();
        else begin
          for (int i = 0; i < int'(pop_n); i++) void'(model.pop_front());
          popped_total += int'(pop_n);
          if (push) begin
            for (int i = 0; i < int'(in_n); i++) model.push_back(next_val + 8'(i));
            next_val += 8'(in_n);
            pushed_total += int'(in_n);
          end
        end
      end
    end
    check(pushed_total > 20000 && popped_total > 20000, $sformatf("traffic pushed=%0d popped=%0d", pushed_total, popped_total));
    $display("byte_shifter: pushed %0d bytes, popped %0d", pushed_total, popped_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
