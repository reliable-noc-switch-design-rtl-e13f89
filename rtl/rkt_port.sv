// rkt_port: one port (North, East, South or West module) of the RKT switch.
//
// Input side: link -> loopback module (data_buf_in) -> input FIFO -> routing
// error detection (URPI marking) -> route register -> routing logic, which
// requests one of the other ports' output buffers (rt_dir, one-hot, with the
// marked packet on rt_flit); rt_gnt says the chosen output buffer took it.
// Output side: the three FIFOs of this port's output buffer receive packets
// from the other ports' routing logic (ob_data/ob_req/ob_gnt, slot k being
// the k-th other port in the order N, E, S, W), and their head goes through
// the loopback module to the link, or back into this port's input when the
// neighbour is unavailable or faulty. The port FSM, commanded by rw, decides
// whether the link transmits or receives and enters loopback on a fault.
//
// stop[i] is high when port i of the switch cannot send (its neighbour is
// unavailable or faulty); this port's routing uses it to avoid those ports.
// Latency of a packet crossing the switch without waiting: link -> data_buf_in
// 1, -> input FIFO 1, -> route register 1, -> output FIFO 1, -> data_buf_out
// 1, then on the link: 5 clocks from the input link to the output link.
// The chain of blocks follows the switch architecture of the design; the
// depths and the handshakes are this design's choices.
module rkt_port
  import rkt_pkg::*;
#(
  parameter int unsigned PORT_ID  = 0,
  parameter int unsigned IN_DEPTH = 4,
  parameter int unsigned OB_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // link
  input  flit_t       lnk_data_in,
  input  logic        data_request_in,
  output logic        occ_or_out,
  output flit_t       lnk_data_out,
  output logic        data_request_out,
  input  logic        occ_in,
  input  logic        unavailable_in,
  input  logic        id_in,
  // control
  input  logic [1:0]  rw,
  input  logic [3:0]  stop,
  // to the output buffers of the other ports
  output flit_t       rt_flit,
  output logic [3:0]  rt_dir,
  input  logic        rt_gnt,
  // from the routing logic of the other ports
  input  flit_t       ob_data [3],
  input  logic [2:0]  ob_req,
  output logic [2:0]  ob_gnt,
  // status
  output port_state_e ps,
  output logic        loop_event,
  output logic [1:0]  urpi
);

  // ---- port FSM and loopback module ----
  logic  occ_fsm, tran_enable, rec_enable, in_full, obuf_valid;
  flit_t ob_head, in_wdata;
  logic  ob_valid, ob_pop, in_wr, in_fifo_full;

  port_fsm u_fsm (
    .clk            (clk),
    .rst_n          (rst_n),
    .rw             (rw),
    .input_req      (data_request_in),
    .output_req     (obuf_valid),
    .occ_in         (occ_in),
    .in_full        (in_full),
    .unavailable_in (unavailable_in),
    .id_in          (id_in),
    .occ_out        (occ_fsm),
    .tran_enable    (tran_enable),
    .rec_enable     (rec_enable),
    .ps             (ps)
  );

  loopback u_loopback (
    .clk              (clk),
    .rst_n            (rst_n),
    .lnk_data_in      (lnk_data_in),
    .data_request_in  (data_request_in),
    .unavailable_in   (unavailable_in),
    .id_in            (id_in),
    .lnk_data_out     (lnk_data_out),
    .data_request_out (data_request_out),
    .occ_or_out       (occ_or_out),
    .rec_enable       (rec_enable),
    .tran_enable      (tran_enable),
    .fsm_occ          (occ_fsm),
    .in_full          (in_full),
    .obuf_valid       (obuf_valid),
    .int_data_out     (ob_head),
    .int_req_out      (ob_valid),
    .int_pop          (ob_pop),
    .int_data_in      (in_wdata),
    .int_wr           (in_wr),
    .int_full         (in_fifo_full),
    .loop_active      (),
    .loop_event       (loop_event)
  );

  // ---- input buffer ----
  logic [FLIT_W-1:0] in_q;
  logic              in_empty, in_rd;

  rkt_fifo #(.WIDTH(FLIT_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .w     (in_wr),
    .d     (in_wdata),
    .r     (in_rd),
    .q     (in_q),
    .full  (in_fifo_full),
    .empty (in_empty)
  );

  // ---- routing error detection ----
  flit_t      marked;
  logic [3:0] dr_sel;

  route_err_detect #(.PORT_ID(PORT_ID)) u_red (
    .data_in  (flit_t'(in_q)),
    .stop     (stop),
    .data_out (marked),
    .urpi     (urpi),
    .dr_sel   (dr_sel)
  );

  // ---- route register and routing logic ----
  flit_t      st_flit;
  logic       st_v, st_leave;
  routing_logic u_rl (
    .data_in   (st_flit),
    .xy_enable (st_v),
    .avail     (dr_sel),
    .north_out (),
    .east_out  (),
    .south_out (),
    .west_out  (),
    .dir_req   (rt_dir)
  );

  assign rt_flit  = st_flit;
  assign st_leave = (rt_dir != 4'b0000) && rt_gnt;
  assign in_rd    = !in_empty && (!st_v || st_leave);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_v    <= 1'b0;
      st_flit <= '0;
    end else if (in_rd) begin
      st_v    <= 1'b1;
      st_flit <= marked;
    end else if (st_leave) begin
      st_v    <= 1'b0;
    end
  end

  // ---- output buffer ----
  output_buffer #(.NSRC(3), .DEPTH(OB_DEPTH)) u_ob (
    .clk       (clk),
    .rst_n     (rst_n),
    .src_data  (ob_data),
    .src_req   (ob_req),
    .src_gnt   (ob_gnt),
    .out_data  (ob_head),
    .out_valid (ob_valid),
    .out_pop   (ob_pop)
  );

  a_dir_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rt_dir));
  a_never_self: assert property (@(posedge clk) disable iff (!rst_n) !rt_dir[PORT_ID]);

endmodule
