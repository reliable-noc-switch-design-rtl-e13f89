// rkt_fifo: synchronous FIFO buffer used for the input and output buffers.
//
// Write w stores d at the tail when the FIFO is not full; read r removes the
// head when it is not empty. q always shows the head word (show-ahead), so a
// reader looks at q and pulses r to take it. full and empty report the
// status. A write to a full FIFO and a read of an empty one are ignored, and
// an assertion flags them. Read and write in the same cycle are both done.
// The port names r, w, d, q, full and empty follow the buffer described for
// the design; the depth, the show-ahead output and the active-low
// synchronous reset are this design's choices.
module rkt_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w,
  input  logic [WIDTH-1:0] d,
  input  logic             r,
  output logic [WIDTH-1:0] q,
  output logic             full,
  output logic             empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;

  logic do_wr, do_rd;
  assign do_wr = w && !full;
  assign do_rd = r && !empty;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign q     = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (do_wr) begin
      mem[wr_ptr] <= d;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(w && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(r && empty));

endmodule
