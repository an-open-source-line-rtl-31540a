// fork_send: hands each frame of a HexBDG stream, whole, to one of N units
// that have said they are free.  The endpoint uses it between the sender
// and the Frame Departure Units (ForkSend) and, inside merge_fork_fau,
// between the wire and the Frame Arrival Units.
//
// Each unit sends a "free" token (free_valid/free_ready, the document's
// free! FIFO); fork_send keeps one credit bit per unit.  When a frame is
// waiting and at least one unit has a credit, it takes the credit of the
// first free unit at or after a round-robin pointer (unit 0 first after
// reset, as the first frame goes to unit 1 in the document's numbering),
// then forwards beats to that unit until the end-of-packet beat.  The grant
// costs one cycle per frame; beats then pass at one per cycle, with
// out_ready of the chosen unit driving in_ready combinationally.  The
// round-robin order among several free units is this design's choice.
module fork_send
  import dgr_pkg::*;
#(
  parameter int N = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  hexbdg_t        in_beat,
  output logic [N-1:0]   out_valid,
  input  logic [N-1:0]   out_ready,
  output hexbdg_t        out_beat,
  input  logic [N-1:0]   free_valid,
  output logic [N-1:0]   free_ready,
  output logic [31:0]    frames_forked
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  credit;
  logic          busy;
  logic [IW-1:0] sel, rr_ptr, pick;
  logic          pick_ok;

  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (credit[(int'(rr_ptr) + k) % N]) begin
        pick    = IW'((int'(rr_ptr) + k) % N);
        pick_ok = 1'b1;
      end
    end
  end

  assign free_ready = ~credit;
  assign out_beat   = in_beat;

  always_comb begin
    out_valid = '0;
    in_ready  = 1'b0;
    if (busy) begin
      out_valid[sel] = in_valid;
      in_ready       = out_ready[sel];
    end
  end

  wire last = busy && in_valid && in_ready && in_beat.eop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit        <= '0;
      busy          <= 1'b0;
      sel           <= '0;
      rr_ptr        <= '0;
      frames_forked <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (free_valid[i] && free_ready[i]) credit[i] <= 1'b1;
      if (!busy && in_valid && pick_ok) begin
        busy         <= 1'b1;
        sel          <= pick;
        credit[pick] <= 1'b0;
      end
      if (last) begin
        busy          <= 1'b0;
        rr_ptr        <= (int'(sel) == N - 1) ? '0 : sel + 1'b1;
        frames_forked <= frames_forked + 1'b1;
      end
    end
  end
endmodule
