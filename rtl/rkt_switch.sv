// rkt_switch: four-port reliable NoC switch (RKT switch) for a 2D mesh.
//
// Ports North=0, East=1, South=2, West=3, each with its link (16-bit packet
// in and out, data request and occupied handshake), an unavailable and a
// faulty-neighbour (id) input, and a 2-bit rw control code for its FSM. A
// packet entering at one port is stored whole in that port's input buffer,
// marked with URPI bits, routed by adaptive XY to one of the three other
// ports' output buffers, and sent on that port's link. When a neighbour is
// unavailable or faulty, that port's loopback module returns the packets of
// its output buffer to its own input, from where they are routed to another
// port, and the centralized error journal counts each such loopback for that
// port (journal_count). journal_clear empties the journal.
//
// The routing of every input avoids the ports whose neighbour is unavailable
// or faulty (stop = unavailable_in | id_in). The central control logic that
// the design draws next to the journal has no described function; its
// control signals are the per-port rw codes and journal_clear, brought out.
// Minimum latency from an input link to an output link: 5 clocks.
// Beside the switch sits the packet codec of the design: a rate-1/2
// convolutional encoder (cc_enc_*, combinational) and a Viterbi decoder
// (cc_dec_*, 38 clocks per packet) that corrects any two bit errors in a
// 36-bit code word.
module rkt_switch
  import rkt_pkg::*;
#(
  parameter int unsigned IN_DEPTH = 4,
  parameter int unsigned OB_DEPTH = 4,
  parameter int unsigned JNL_W    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  flit_t            data_in          [NPORTS],
  input  logic [NPORTS-1:0] data_request_in,
  output logic [NPORTS-1:0] occ_or_out,
  output flit_t            data_out         [NPORTS],
  output logic [NPORTS-1:0] data_request_out,
  input  logic [NPORTS-1:0] occ_in,
  input  logic [NPORTS-1:0] unavailable_in,
  input  logic [NPORTS-1:0] id_in,
  input  logic [1:0]       rw               [NPORTS],
  input  logic             journal_clear,
  output logic [JNL_W-1:0] journal_count    [NPORTS],
  output port_state_e      port_state       [NPORTS],
  output logic [NPORTS-1:0] loop_event,
  output logic [1:0]       urpi             [NPORTS],
  // packet error-correcting codec
  input  flit_t            cc_enc_data,
  output logic [2*(FLIT_W+2)-1:0] cc_enc_code,
  input  logic             cc_dec_start,
  input  logic [2*(FLIT_W+2)-1:0] cc_dec_code,
  output logic             cc_dec_busy,
  output logic             cc_dec_done,
  output flit_t            cc_dec_data,
  output logic [6:0]       cc_dec_errors
);

  logic [3:0]  stop;
  flit_t       rt_flit [NPORTS];
  logic [3:0]  rt_dir  [NPORTS];
  logic [NPORTS-1:0] rt_gnt;
  flit_t       ob_data [NPORTS][3];
  logic [2:0]  ob_req  [NPORTS];
  logic [2:0]  ob_gnt  [NPORTS];

  assign stop = unavailable_in | id_in;

  // Crosspoint: slot k of output port p holds source port k (k < p) or k+1.
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int k = 0; k < 3; k++) begin
        int unsigned s;
        s = (k < p) ? k : k + 1;
        ob_data[p][k] = rt_flit[s];
        ob_req[p][k]  = rt_dir[s][p];
      end
    end
    for (int s = 0; s < NPORTS; s++) begin
      rt_gnt[s] = 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        if (p != s && rt_dir[s][p]) rt_gnt[s] = ob_gnt[p][(s < p) ? s : s - 1];
      end
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    rkt_port #(.PORT_ID(p), .IN_DEPTH(IN_DEPTH), .OB_DEPTH(OB_DEPTH)) u_port (
      .clk              (clk),
      .rst_n            (rst_n),
      .lnk_data_in      (data_in[p]),
      .data_request_in  (data_request_in[p]),
      .occ_or_out       (occ_or_out[p]),
      .lnk_data_out     (data_out[p]),
      .data_request_out (data_request_out[p]),
      .occ_in           (occ_in[p]),
      .unavailable_in   (unavailable_in[p]),
      .id_in            (id_in[p]),
      .rw               (rw[p]),
      .stop             (stop),
      .rt_flit          (rt_flit[p]),
      .rt_dir           (rt_dir[p]),
      .rt_gnt           (rt_gnt[p]),
      .ob_data          (ob_data[p]),
      .ob_req           (ob_req[p]),
      .ob_gnt           (ob_gnt[p]),
      .ps               (port_state[p]),
      .loop_event       (loop_event[p]),
      .urpi             (urpi[p])
    );
  end

  error_journal #(.NPORTS(NPORTS), .CNT_W(JNL_W)) u_journal (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (journal_clear),
    .inc   (loop_event),
    .count (journal_count)
  );

  // Convolutional encoder and Viterbi decoder for 16-bit packets. The design
  // adds this coding to the switch for error correction without fixing where
  // it sits, so both halves are brought out on their own ports.
  conv_encoder #(.DATA_W(FLIT_W)) u_cc_enc (
    .data (cc_enc_data),
    .code (cc_enc_code)
  );

  logic [FLIT_W-1:0] cc_dec_bits;

  viterbi_decoder #(.DATA_W(FLIT_W)) u_cc_dec (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (cc_dec_start),
    .code   (cc_dec_code),
    .busy   (cc_dec_busy),
    .done   (cc_dec_done),
    .data   (cc_dec_bits),
    .errors (cc_dec_errors)
  );

  assign cc_dec_data = flit_t'(cc_dec_bits);

endmodule
