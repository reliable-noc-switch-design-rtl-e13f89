// output_buffer: output buffer of one switch port.
//
// Every output port has one FIFO per other port of the switch (three in the
// four-port switch), so that the routing logic of each input can deposit a
// packet independently. src_req[k] offers a packet from source slot k;
// src_gnt[k] is high in the same cycle when that FIFO has room, and the
// packet is then written. A round-robin mux picks which non-empty FIFO
// drives the head (out_data, out_valid); out_pop takes the head. The pointer
// moves past the FIFO that was read, so no source is starved.
// Three FIFOs and a mux per output port follow the switch architecture of the
// design; the depth and the round-robin order are this design's choices.
module output_buffer
  import rkt_pkg::*;
#(
  parameter int unsigned NSRC  = 3,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  flit_t            src_data [NSRC],
  input  logic [NSRC-1:0]  src_req,
  output logic [NSRC-1:0]  src_gnt,
  output flit_t            out_data,
  output logic             out_valid,
  input  logic             out_pop
);

  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1;

  flit_t           q [NSRC];
  logic [NSRC-1:0] full, empty, rd;
  logic [SW-1:0]   rr, sel;
  logic            found;

  for (genvar k = 0; k < NSRC; k++) begin : g_fifo
    rkt_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .w     (src_gnt[k]),
      .d     (src_data[k]),
      .r     (rd[k]),
      .q     (q[k]),
      .full  (full[k]),
      .empty (empty[k])
    );
  end

  assign src_gnt = src_req & ~full;

  // round robin: first non-empty FIFO at or after rr
  always_comb begin
    sel   = rr;
    found = 1'b0;
    for (int i = 0; i < NSRC; i++) begin
      int unsigned idx;
      idx = (int'(rr) + i) % NSRC;
      if (!found && !empty[idx]) begin
        sel   = SW'(idx);
        found = 1'b1;
      end
    end
  end

  assign out_valid = found;
  assign out_data  = q[sel];

  always_comb begin
    rd = '0;
    if (out_pop && found) rd[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rr <= '0;
    else if (out_pop && found) rr <= (sel == SW'(NSRC - 1)) ? '0 : sel + 1'b1;
  end

endmodule
