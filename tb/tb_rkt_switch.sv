// tb_rkt_switch: end-to-end test of the four-port RKT switch at its default
// sizes. The testbench plays the four neighbours and the control signals.
//
// Directed part: one packet from West to East with everything idle must
// appear on the East link 5 clocks after it was offered on the West link;
// one packet at a switch whose East neighbour is unavailable must be looped
// back and leave through another port, and the journal must count it.
// Random part: phases with random rw codes per port, random unavailable and
// faulty neighbours, random neighbour back-pressure and random packets
// offered whenever a port's occ_or_out allows. Every packet must leave the
// switch exactly once, never towards an unavailable or faulty neighbour, and
// the journal must match the loopbacks counted at each port. A final drain
// with all neighbours usable empties the switch.
// Each mechanism must happen at least once: loopback for an unavailable and
// for a faulty neighbour, correction of one and two bit errors by the
// packet codec (encoder, corrupted code word, Viterbi decoder), a packet leaving with URPI = 11, an adaptive
// detour (leaving away from its XY port), input back-pressure (occupied
// while receiving), every FSM state at every port and a journal clear.
module tb_rkt_switch;
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
  int m_corrected = 0;
  int checks = 0, failures = 0;
  int injected = 0, delivered = 0;
  int pending [logic [13:0]];
  int jnl [4] = '{0, 0, 0, 0};
  // mechanism counters
  int m_loop_unavail = 0, m_loop_faulty = 0, m_urpi = 0, m_detour = 0, m_backpressure = 0, m_clear = 0;
  int m_state [4][3];

  rkt_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int xy_port(flit_t f);
    if (f.y_dest > f.y_prev) return 1;
    if (f.y_dest < f.y_prev) return 3;
    if (f.x_dest > f.x_prev) return 2;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) begin
      m_state[p][port_state[p]]++;
      if (port_state[p] == ST_RECEIVE && occ_or_out[p] && !unavailable_in[p] && !id_in[p])
        m_backpressure++;
      if (loop_event[p]) begin
        jnl[p] = (jnl[p] == 255) ? 255 : jnl[p] + 1;
        if (unavailable_in[p]) m_loop_unavail++;
        else if (id_in[p])     m_loop_faulty++;
      end
      if (data_request_out[p]) begin
        check(!occ_in[p], "sent only to a free neighbour");
        check(!unavailable_in[p] && !id_in[p], "never sent to an unusable neighbour");
        check(pending.exists(data_out[p][13:0]), "output packet was injected");
        if (pending.exists(data_out[p][13:0])) begin
          pending[data_out[p][13:0]]--;
          if (pending[data_out[p][13:0]] == 0) pending.delete(data_out[p][13:0]);
        end
        delivered++;
        if (data_out[p].urpi == 2'b11) m_urpi++;
        if (xy_port(data_out[p]) != p) m_detour++;
      end
      if (data_request_in[p] && !occ_or_out[p]) begin
        if (pending.exists(data_in[p][13:0])) pending[data_in[p][13:0]]++;
        else pending[data_in[p][13:0]] = 1;
        injected++;
      end
    end
    if (journal_clear) begin
      m_clear++;
      for (int p = 0; p < 4; p++) jnl[p] = 0;
    end
  end

  // journal readout matches the counted loopbacks
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) check(int'(journal_count[p]) == jnl[p], "journal count");
  end

  function automatic flit_t mkpkt(int yp, int xp, int yd, int xd);
    flit_t f;
    f.urpi = 2'b00; f.y_prev = 3'(yp); f.x_prev = 3'(xp);
    f.y_dest = 3'(yd); f.x_dest = 3'(xd); f.data = 2'($urandom);
    return f;
  endfunction

  task automatic cycle(bit traffic);
    @(negedge clk);
    for (int p = 0; p < 4; p++) occ_in[p] = $urandom % 4 == 0;
    #1;
    for (int p = 0; p < 4; p++) begin
      data_request_in[p] = traffic && !occ_or_out[p] && ($urandom % 3 == 0);
      data_in[p] = data_request_in[p] ? flit_t'({2'b00, 14'($urandom)}) : '0;
    end
  endtask

  int t0, lat;

  initial begin
    for (int p = 0; p < 4; p++) begin
      data_in[p] = '0;
      rw[p] = RW_RECEIVE;
      for (int s = 0; s < 3; s++) m_state[p][s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- directed: West -> East latency ----
    rw[DIR_E] = RW_TRANSMIT;
    repeat (2) @(negedge clk);
    data_in[DIR_W] = mkpkt(1, 2, 5, 2);
    data_request_in[DIR_W] = 1;
    t0 = 0;
    @(negedge clk);
    data_request_in[DIR_W] = 0;
    lat = 1;
    while (!data_request_out[DIR_E] && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 5 && data_out[DIR_E][13:0] == data_in[DIR_W][13:0], "West to East in 5 clocks");
    $display("West->East latency %0d clocks", lat);
    @(negedge clk);

    // ---- directed: loopback at an unavailable East neighbour ----
    unavailable_in[DIR_E] = 1;
    rw[DIR_N] = RW_TRANSMIT; rw[DIR_S] = RW_TRANSMIT; rw[DIR_W] = RW_RECEIVE;
    @(negedge clk);
    data_in[DIR_W] = mkpkt(1, 2, 5, 6);      // XY port East, detour South
    data_request_in[DIR_W] = 1;
    @(negedge clk);
    data_request_in[DIR_W] = 0;
    repeat (20) @(negedge clk);
    check(journal_count[DIR_E] == 0, "no loopback needed: routing avoided East");
    // a packet already in the East output buffer when East goes away
    unavailable_in[DIR_E] = 0;
    occ_in[DIR_E] = 1;
    @(negedge clk);
    data_in[DIR_W] = mkpkt(1, 2, 5, 2);      // East only
    data_request_in[DIR_W] = 1;
    @(negedge clk);
    data_request_in[DIR_W] = 0;
    repeat (6) @(negedge clk);
    unavailable_in[DIR_E] = 1;
    repeat (20) @(negedge clk);
    check(journal_count[DIR_E] == 1, "loopback counted in the journal");
    occ_in[DIR_E] = 0;
    unavailable_in[DIR_E] = 0;
    rw[DIR_W] = RW_TRANSMIT;
    repeat (10) @(negedge clk);
    check(pending.size() == 0, "directed packets delivered");

    // ---- random phases ----
    for (int ph = 0; ph < 80; ph++) begin
      for (int p = 0; p < 4; p++) begin
        rw[p] = ($urandom % 2) ? RW_TRANSMIT : RW_RECEIVE;
        unavailable_in[p] = ($urandom % 5 == 0);
        id_in[p] = ($urandom % 8 == 0);
      end
      if (ph % 10 == 9) begin
        @(negedge clk);
        journal_clear = 1;
        @(negedge clk);
        journal_clear = 0;
      end
      for (int i = 0; i < 120; i++) begin
        // control signals: change a port's direction now and then
        if ($urandom % 16 == 0) begin
          int p;
          p = $urandom % 4;
          rw[p] = (rw[p] == RW_TRANSMIT) ? RW_RECEIVE : RW_TRANSMIT;
        end
        cycle(1);
      end
      repeat (30) cycle(0);
    end

    // ---- drain ----
    unavailable_in = '0; id_in = '0;
    for (int i = 0; i < 40; i++) begin
      for (int p = 0; p < 4; p++) rw[p] = ((i + p) % 2) ? RW_TRANSMIT : RW_RECEIVE;
      repeat (15) cycle(0);
    end
    check(pending.size() == 0, "every packet left the switch");

    // ---- codec: encode, corrupt one or two bits, decode ----
    for (int n = 0; n < 40; n++) begin
      int ne, lat2;
      @(negedge clk);
      cc_enc_data = flit_t'(16'($urandom));
      #1;
      ne = 1 + n % 2;
      cc_dec_code = cc_enc_code;
      for (int e = 0; e < ne; e++) cc_dec_code[(n * 7 + e * 17) % 36] ^= 1'b1;
      cc_dec_start = 1;
      @(negedge clk);
      cc_dec_start = 0;
      lat2 = 1;
      while (!cc_dec_done && lat2 < 100) begin
        @(negedge clk);
        lat2++;
      end
      check(lat2 == 38, "codec decode latency");
      check(cc_dec_data == cc_enc_data && int'(cc_dec_errors) == ne, "codec corrects errors");
      if (cc_dec_data == cc_enc_data && cc_dec_errors != 0) m_corrected++;
    end
    check(m_corrected > 0, "mechanism: error correction by the codec");
    check(injected == delivered, "packets in = packets out");
    $display("injected=%0d delivered=%0d", injected, delivered);
    $display("mechanisms: loopback(unavailable)=%0d loopback(faulty)=%0d urpi11=%0d detour=%0d backpressure=%0d clear=%0d corrected=%0d",
             m_loop_unavail, m_loop_faulty, m_urpi, m_detour, m_backpressure, m_clear, m_corrected);
    check(m_loop_unavail > 0, "mechanism: loopback on unavailable neighbour");
    check(m_loop_faulty > 0, "mechanism: loopback on faulty neighbour");
    check(m_urpi > 0, "mechanism: unique routing path (URPI 11)");
    check(m_detour > 0, "mechanism: adaptive detour");
    check(m_backpressure > 0, "mechanism: input back-pressure");
    check(m_clear > 0, "mechanism: journal clear");
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < 3; s++) check(m_state[p][s] > 0, "mechanism: every FSM state at every port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
