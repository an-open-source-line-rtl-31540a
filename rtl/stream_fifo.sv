// stream_fifo: small synchronous FIFO with a valid/ready interface on both
// sides, used wherever the document draws a FIFO between two blocks.
//
// Storage is a register array of DEPTH entries with read and write pointers
// and an occupancy counter.  in_ready is high while the FIFO is not full and
// out_valid while it is not empty; both depend only on registered state, so
// the FIFO breaks every combinational valid/ready path through it.  A value
// written in cycle t can be read in cycle t+1.  The element type and depth
// are parameters; the depth of the FIFOs between blocks is not given in the
// document and is chosen by each instantiating block.
module stream_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                   mem [DEPTH];
  logic [AW-1:0]      rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (int'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end
endmodule
