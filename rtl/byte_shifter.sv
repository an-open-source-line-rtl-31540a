// byte_shifter: byte queue that accepts and releases a variable number of
// bytes per cycle.  The sender pushes headers of 10, 24 and 8 bytes and
// payload of up to 16 bytes, and reads out 16-byte beats; the receiver does
// the opposite; the L2 blocks use it to re-align the 4-byte wire stream
// around the 14-byte L2 header.  The document names this module and its
// purpose; its insides here are this design's own.
//
// The queue is a DEPTH-byte shift register; byte 0 is the oldest byte.
// out_data always shows the oldest OUT_BYTES bytes and count the number of
// bytes held.  In one cycle the user may pop pop_n bytes (pop_n <= count)
// and push in_n bytes from in_data[0..in_n-1]; pushed bytes land behind the
// bytes that remain.  in_ready is high when IN_BYTES more bytes fit without
// counting this cycle's pop.  Unused bytes are kept at zero.
module byte_shifter #(
  parameter int IN_BYTES  = 24,
  parameter int OUT_BYTES = 24,
  parameter int DEPTH     = 48
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clear,     // drop everything held
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic [IN_BYTES-1:0][7:0]            in_data,
  input  logic [$clog2(IN_BYTES+1)-1:0]       in_n,
  output logic [OUT_BYTES-1:0][7:0]           out_data,
  output logic [$clog2(DEPTH+1)-1:0]          count,
  input  logic [$clog2(OUT_BYTES+1)-1:0]      pop_n
);
  localparam int CW = $clog2(DEPTH+1);

  logic [DEPTH*8-1:0] q;
  logic [DEPTH*8-1:0] shifted, incoming;
  logic [IN_BYTES*8-1:0] masked;
  logic [CW-1:0]      kept;
  wire                push = in_valid && in_ready;

  assign in_ready = (int'(count) + IN_BYTES <= DEPTH);
  assign out_data = q[OUT_BYTES*8-1:0];

  always_comb begin
    for (int i = 0; i < IN_BYTES; i++)
      masked[8*i +: 8] = (i < int'(in_n)) ? in_data[i] : 8'h00;
    kept     = count - CW'(pop_n);
    shifted  = q >> (8 * int'(pop_n));
    incoming = (DEPTH*8)'(masked) << (8 * int'(kept));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      count <= '0;
    end else if (clear) begin
      q     <= '0;
      count <= '0;
    end else begin
      q     <= push ? (shifted | incoming) : shifted;
      count <= push ? kept + CW'(in_n) : kept;
    end
  end

  // pop_n may never exceed the number of bytes held.
  assert property (@(posedge clk) disable iff (!rst_n) int'(pop_n) <= int'(count));
endmodule
