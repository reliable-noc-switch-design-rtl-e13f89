// loopback: loopback module between one switch port and its link.
//
// It holds two one-packet buffers: data_buf_out on the way to the link and
// data_buf_in on the way into the port's input FIFO. Its logic control
// watches the neighbour: when the neighbour is unavailable (unavailable_in)
// or detected as permanently faulty (id_in), loopback is required. Then the
// semi crossbar sends the packet in data_buf_out onto the loopback bus
// instead of the link, the input mux takes the loopback bus instead of the
// link, and the packet re-enters the port's input as a new packet, to be
// routed to another port. While a loopback is required occ_or_out is raised
// so that the neighbour sends nothing; occ_or_out is the OR of this and the
// port FSM's own occupied signal. Each looped-back packet gives a one-cycle
// loop_event pulse, which the error journal counts.
//
// Link protocol (own choice): a packet moves over the link in a cycle where
// the sender raises data_request_out; a sender raises it only while the
// receiver's occ_or_out is low, so every request is a transfer.
// Timing: output buffer head -> data_buf_out: 1 clock; data_buf_out -> link or
// loopback bus -> data_buf_in: 1 clock; data_buf_in -> input FIFO write: same
// clock as data_buf_in is valid and the FIFO has room.
// The blocks (logic control, mux, semi crossbar, two buffers, OR of the
// occupied signals) follow the loopback architecture of the design. Placing
// the output buffer ahead of the semi crossbar, so that a packet already in
// it can still be looped back, is this design's choice.
module loopback
  import rkt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // link side
  input  flit_t lnk_data_in,
  input  logic  data_request_in,
  input  logic  unavailable_in,
  input  logic  id_in,
  output flit_t lnk_data_out,
  output logic  data_request_out,
  output logic  occ_or_out,
  // port FSM
  input  logic  rec_enable,
  input  logic  tran_enable,
  input  logic  fsm_occ,
  output logic  in_full,
  output logic  obuf_valid,
  // port side
  input  flit_t int_data_out,
  input  logic  int_req_out,
  output logic  int_pop,
  output flit_t int_data_in,
  output logic  int_wr,
  input  logic  int_full,
  // status
  output logic  loop_active,
  output logic  loop_event
);

  flit_t data_buf_in, data_buf_out;
  logic  ibuf_v, obuf_v;
  logic  ibuf_free, link_accept, lb_xfer, obuf_leave, obuf_load;
  flit_t mux_out;

  // logic control
  assign loop_active = unavailable_in || id_in;

  assign int_wr      = ibuf_v && !int_full;
  assign ibuf_free   = !ibuf_v || !int_full;
  assign in_full     = !ibuf_free;
  assign obuf_valid  = obuf_v;

  // semi crossbar: link or loopback bus
  assign data_request_out = tran_enable && obuf_v && !loop_active;
  assign lb_xfer          = loop_active && obuf_v && ibuf_free;
  assign obuf_leave       = data_request_out || lb_xfer;
  assign obuf_load        = int_req_out && (!obuf_v || obuf_leave);
  assign int_pop          = obuf_load;
  assign lnk_data_out     = data_buf_out;

  // input mux: link or loopback bus
  assign link_accept = rec_enable && data_request_in && !loop_active;
  assign mux_out     = lb_xfer ? data_buf_out : lnk_data_in;

  assign occ_or_out  = fsm_occ || loop_active;
  assign int_data_in = data_buf_in;
  assign loop_event  = lb_xfer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ibuf_v       <= 1'b0;
      obuf_v       <= 1'b0;
      data_buf_in  <= '0;
      data_buf_out <= '0;
    end else begin
      if (link_accept || lb_xfer) begin
        data_buf_in <= mux_out;
        ibuf_v      <= 1'b1;
      end else if (int_wr) begin
        ibuf_v      <= 1'b0;
      end
      if (obuf_load) begin
        data_buf_out <= int_data_out;
        obuf_v       <= 1'b1;
      end else if (obuf_leave) begin
        obuf_v       <= 1'b0;
      end
    end
  end

  // A request never meets an occupied neighbour input, and never happens in loopback.
  a_no_req_in_loop: assert property (@(posedge clk) disable iff (!rst_n)
                                     loop_active |-> !data_request_out);
  a_accept_has_room: assert property (@(posedge clk) disable iff (!rst_n)
                                      link_accept |-> ibuf_free);

endmodule
