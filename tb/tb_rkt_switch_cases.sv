// tb_rkt_switch_cases: the switch, at its default sizes, replaying the cases
// shown in the design's simulations.
//  - Switch / North and West modules: a packet 1111111111111101 entering at
//    West leaves at North, and 0000000000000001 entering at North leaves at
//    West ("the input given at west port is received at the north port and
//    vice versa"). URPI is rewritten on the way (00: several ports usable),
//    so bits 13:0 are compared.
//  - Routing logic: x_prev = 4 with everything else 0 goes North (here from
//    the South input); y_dest = 4 with everything else 0 goes East.
//  - Loopback: the packet 1111000010101101 waiting at an unavailable East
//    neighbour is looped back, leaves through another port, and the East
//    journal entry becomes 1.
//  - FSM: a port passes through transmit, receive and loopback as rw and
//    unavailable_in change.
module tb_rkt_switch_cases;
  import rkt_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t data_in [4], data_out [4];
  logic [3:0] data_request_in = '0, occ_or_out, data_request_out, occ_in = '0;
  logic [3:0] unavailable_in = '0, id_in = '0, loop_event;
  logic [1:0] rw [4];
  logic journal_clear = 0;
  logic [7:0] journal_count [4];
  port_state_e port_state [4];
  logic [1:0] urpi [4];
  flit_t cc_enc_data = '0, cc_dec_data;
  logic [35:0] cc_enc_code, cc_dec_code = '0;
  logic cc_dec_start = 0, cc_dec_busy, cc_dec_done;
  logic [6:0] cc_dec_errors;
  int checks = 0, failures = 0;

  rkt_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // offer one packet at port p and wait until it leaves; return the exit port
  task automatic send(input int p, input logic [15:0] pkt, output int exit_port, output flit_t got);
    int n;
    @(negedge clk);
    while (occ_or_out[p]) @(negedge clk);
    data_in[p] = flit_t'(pkt);
    data_request_in[p] = 1'b1;
    @(negedge clk);
    data_request_in[p] = 1'b0;
    exit_port = -1;
    n = 0;
    while (exit_port < 0 && n < 100) begin
      for (int q = 0; q < 4; q++) if (data_request_out[q]) begin
        exit_port = q;
        got = data_out[q];
      end
      if (exit_port < 0) @(negedge clk);
      n++;
    end
  endtask

  int ep;
  flit_t got;

  initial begin
    for (int p = 0; p < 4; p++) begin
      data_in[p] = '0;
      rw[p] = RW_TRANSMIT;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // West -> North
    rw[DIR_W] = RW_RECEIVE;
    send(DIR_W, 16'b1111111111111101, ep, got);
    check(ep == DIR_N && got[13:0] == 14'b11111111111101, "West input 1111111111111101 leaves at North");
    rw[DIR_W] = RW_TRANSMIT;
    // North -> West
    rw[DIR_N] = RW_RECEIVE;
    send(DIR_N, 16'b0000000000000001, ep, got);
    check(ep == DIR_W && got[13:0] == 14'b00000000000001, "North input 0000000000000001 leaves at West");
    rw[DIR_N] = RW_TRANSMIT;
    // routing logic cases, from the South input
    rw[DIR_S] = RW_RECEIVE;
    send(DIR_S, {2'b00, 3'd0, 3'd4, 3'd0, 3'd0, 2'b01}, ep, got);
    check(ep == DIR_N, "x_prev = 4 goes North");
    send(DIR_S, {2'b00, 3'd0, 3'd0, 3'd4, 3'd0, 2'b01}, ep, got);
    check(ep == DIR_E, "y_dest = 4 goes East");
    rw[DIR_S] = RW_TRANSMIT;

    // loopback of 1111000010101101 (URPI 11, Y prev 6, X prev 0, Y dest 5,
    // X dest 3, data 01: XY port West) held at West, whose neighbour goes away
    occ_in[DIR_W] = 1'b1;
    rw[DIR_E] = RW_RECEIVE;
    @(negedge clk);
    data_in[DIR_E] = flit_t'(16'b1111000010101101);
    data_request_in[DIR_E] = 1'b1;
    @(negedge clk);
    data_request_in[DIR_E] = 1'b0;
    repeat (8) @(negedge clk);
    check(data_request_out == 4'b0000, "packet held for the occupied West neighbour");
    unavailable_in[DIR_W] = 1'b1;
    ep = -1;
    for (int n = 0; n < 30 && ep < 0; n++) begin
      @(negedge clk);
      for (int q = 0; q < 4; q++) if (data_request_out[q]) begin
        ep = q;
        got = data_out[q];
      end
    end
    check(ep >= 0 && ep != DIR_W && got[13:0] == 14'b11000010101101, "looped packet leaves through another port");
    check(journal_count[DIR_W] == 8'd1 && journal_count[DIR_E] == 8'd0 &&
          journal_count[DIR_N] == 8'd0 && journal_count[DIR_S] == 8'd0, "journal: one error at West");
    check(port_state[DIR_W] == ST_LOOPBACK && occ_or_out[DIR_W], "West port in loopback, occupied");
    unavailable_in[DIR_W] = 1'b0;
    occ_in[DIR_W] = 1'b0;
    rw[DIR_W] = RW_RECEIVE;
    repeat (2) @(negedge clk);
    check(port_state[DIR_W] == ST_RECEIVE, "West port back to receive");
    rw[DIR_W] = RW_TRANSMIT;
    repeat (2) @(negedge clk);
    check(port_state[DIR_W] == ST_TRANSMIT, "West port to transmit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
