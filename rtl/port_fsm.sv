// port_fsm: controller of one switch port, with the states transmit,
// receive and loopback.
//
// The port's link is half duplex at any one time: the external control code
// rw selects transmit (2'b10) or receive (2'b01); any other code keeps the
// current state. An unavailable neighbour (unavailable_in) or a neighbour
// detected as permanently faulty (id_in) forces the loopback state, which
// takes priority over rw and is left, once both inputs drop, for the state
// rw asks for (receive if rw names none). The state is registered: a change
// of rw, unavailable_in or id_in shows in ps one clock later.
//
// Outputs, all combinational from the state and the status inputs:
//   rec_enable  - receive state, a packet is offered (input_req) and the
//                 input buffer has room (!in_full): the write acknowledge.
//   tran_enable - transmit state, a packet waits in the output buffer
//                 (output_req) and the neighbour is not occupied (!occ_in):
//                 the read grant.
//   occ_out     - the port cannot accept a packet from its neighbour: it is
//                 not in the receive state, or its input buffer is full.
// The three states and the signal names follow the FSM described for the
// design; the rw codes are read from its simulation (10 while transmitting,
// 01 while receiving). Reset to receive is this design's choice.
module port_fsm
  import rkt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  rw,
  input  logic        input_req,
  input  logic        output_req,
  input  logic        occ_in,
  input  logic        in_full,
  input  logic        unavailable_in,
  input  logic        id_in,
  output logic        occ_out,
  output logic        tran_enable,
  output logic        rec_enable,
  output port_state_e ps
);

  port_state_e ns;

  always_comb begin
    ns = ps;
    if (unavailable_in || id_in)  ns = ST_LOOPBACK;
    else if (rw == RW_TRANSMIT)   ns = ST_TRANSMIT;
    else if (rw == RW_RECEIVE)    ns = ST_RECEIVE;
    else if (ps == ST_LOOPBACK)   ns = ST_RECEIVE;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ps <= ST_RECEIVE;
    else        ps <= ns;
  end

  assign rec_enable  = (ps == ST_RECEIVE)  && input_req  && !in_full;
  assign tran_enable = (ps == ST_TRANSMIT) && output_req && !occ_in;
  assign occ_out     = (ps != ST_RECEIVE)  || in_full;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(rec_enable && tran_enable));

endmodule
