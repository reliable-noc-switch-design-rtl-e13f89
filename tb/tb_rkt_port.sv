// tb_rkt_port: self-checking test of one switch port (the West module,
// PORT_ID 3), with the testbench playing the neighbour on the link and the
// three other ports of the switch.
// Traffic runs in phases; in each phase rw, the stop pattern of the other
// ports and the state of the neighbour (usable, unavailable or faulty) are
// fixed, then the port drains. Packets carry a 12-bit sequence number in the
// coordinate fields and a tag in the payload bits (00 from the link, 01 from
// the output buffer). Checks:
//  - link packets leave through the routing request in order, with URPI set
//    exactly when one port is usable, towards the adaptive XY choice, never
//    back to this port; first one 3 clocks after it was taken;
//  - output-buffer packets leave exactly once: on the link when the
//    neighbour is usable, otherwise looped back into the routing request;
//  - loop_event counts the loopbacks; the FSM passes through all states.
module tb_rkt_port;
  import rkt_pkg::*;
  localparam int P = 3;
  logic clk = 0, rst_n = 0;
  flit_t lnk_data_in = '0, lnk_data_out, rt_flit;
  logic data_request_in = 0, occ_or_out, data_request_out, occ_in = 0;
  logic unavailable_in = 0, id_in = 0;
  logic [1:0] rw = RW_RECEIVE, urpi;
  logic [3:0] stop, other_stop = '0, rt_dir;
  logic rt_gnt = 0;
  flit_t ob_data [3];
  logic [2:0] ob_req = '0, ob_gnt;
  port_state_e ps;
  logic loop_event;
  int checks = 0, failures = 0;
  int n_link_in = 0, n_link_out = 0, n_loop = 0, n_loop_ev = 0, n_unique = 0;
  int st_seen [3] = '{0, 0, 0};
  flit_t link_q [$];
  bit out_set [logic [13:0]];
  int seq_l = 0, seq_o = 0;

  assign stop = other_stop | (4'(unavailable_in || id_in) << P);

  rkt_port #(.PORT_ID(P), .IN_DEPTH(4), .OB_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic logic [3:0] ref_dir(flit_t f, logic [3:0] a);
    logic [3:0] pref, alt;
    int cnt;
    cnt = 0;
    for (int i = 0; i < 4; i++) cnt += int'(a[i]);
    if (f.urpi == 2'b11 && cnt == 1) return a;
    if (f.y_dest > f.y_prev)       pref = 4'b0010;
    else if (f.y_dest < f.y_prev)  pref = 4'b1000;
    else if (f.x_dest > f.x_prev)  pref = 4'b0100;
    else                           pref = 4'b0001;
    if ((pref & a) != 0) return pref;
    alt = 4'b0000;
    if (f.y_dest != f.y_prev && f.x_dest > f.x_prev) alt = 4'b0100;
    if (f.y_dest != f.y_prev && f.x_dest < f.x_prev) alt = 4'b0001;
    if ((alt & a) != 0) return alt;
    for (int i = 3; i >= 0; i--) if (a[i]) return 4'(1) << i;
    return 4'b0000;
  endfunction

  function automatic flit_t mk(int s, logic [1:0] tag);
    return flit_t'({2'b00, 12'(s), tag});
  endfunction

  // scoreboard at each rising edge (values before the edge)
  always @(posedge clk) if (rst_n) begin
    logic [3:0] av;
    int cnt;
    av = ~stop & ~(4'(1) << P);
    cnt = 0;
    for (int i = 0; i < 4; i++) cnt += int'(av[i]);
    st_seen[ps]++;
    if (loop_event) n_loop_ev++;
    if (rt_dir != 0) begin
      check(!rt_dir[P], "never routed back to own port");
      check(rt_dir == ref_dir(rt_flit, av), "adaptive XY direction");
      check(rt_flit.urpi == ((cnt == 1) ? 2'b11 : 2'b00), "URPI bits");
      if (rt_flit.urpi == 2'b11) n_unique++;
    end
    if (rt_dir != 0 && rt_gnt) begin
      if (rt_flit.data == 2'b00) begin
        check(link_q.size() != 0 && rt_flit[13:0] == link_q[0][13:0], "link packets in order");
        if (link_q.size() != 0) void'(link_q.pop_front());
      end else begin
        check(out_set.exists(rt_flit[13:0]), "looped packet was in the output buffer");
        out_set.delete(rt_flit[13:0]);
        n_loop++;
      end
    end
    if (data_request_out) begin
      check(!occ_in, "sent only to a free neighbour");
      check(out_set.exists(lnk_data_out[13:0]), "link output was in the output buffer");
      out_set.delete(lnk_data_out[13:0]);
      n_link_out++;
    end
    for (int k = 0; k < 3; k++) if (ob_gnt[k]) out_set[ob_data[k][13:0]] = 1'b1;
    if (data_request_in && !occ_or_out) begin
      link_q.push_back(lnk_data_in);
      n_link_in++;
    end
  end

  task automatic cycle(bit traffic);
    @(negedge clk);
    rt_gnt = $urandom % 4 != 0;
    occ_in = $urandom % 4 == 0;
    for (int k = 0; k < 3; k++) begin
      if (traffic && ($urandom % 6 == 0)) begin
        ob_req[k]  = 1'b1;
        ob_data[k] = mk(seq_o + k * 1000, 2'b01);
      end else begin
        ob_req[k] = 1'b0;
      end
    end
    #1;
    data_request_in = traffic && !occ_or_out && ($urandom % 3 == 0);
    lnk_data_in = data_request_in ? mk(seq_l, 2'b00) : '0;
    if (data_request_in) seq_l = (seq_l + 1) % 4096;
    @(posedge clk);
    for (int k = 0; k < 3; k++) if (ob_req[k] && ob_gnt[k]) seq_o = (seq_o + 1) % 1000;
  endtask

  initial begin
    for (int k = 0; k < 3; k++) ob_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed latency: one link packet, everything free
    @(negedge clk);
    lnk_data_in = mk(4000, 2'b00); data_request_in = 1; rt_gnt = 0;
    @(negedge clk);
    data_request_in = 0;
    @(negedge clk);
    check(rt_dir == 0, "not yet at routing");
    @(negedge clk);
    check(rt_dir != 0 && rt_flit[13:0] == mk(4000, 2'b00), "link to routing request in 3 clocks");
    rt_gnt = 1;
    @(negedge clk);
    // random phases
    for (int ph = 0; ph < 60; ph++) begin
      int mode;
      mode = $urandom % 4;
      rw = (ph % 2 == 0) ? RW_RECEIVE : RW_TRANSMIT;
      unavailable_in = (mode == 2);
      id_in = (mode == 3);
      do other_stop = 4'($urandom) & ~(4'(1) << P);
      while ((~other_stop & ~(4'(1) << P)) == 4'b0000);
      if (ph % 5 == 0) other_stop = '0;
      repeat (150) cycle(1);
      repeat (60) cycle(0);
    end
    // final drain: neighbour usable, alternate directions
    unavailable_in = 0; id_in = 0; other_stop = '0;
    for (int i = 0; i < 20; i++) begin
      rw = (i % 2 == 0) ? RW_TRANSMIT : RW_RECEIVE;
      repeat (20) cycle(0);
    end
    check(link_q.size() == 0, "all link packets routed");
    check(out_set.size() == 0, "all output-buffer packets delivered");
    check(n_loop == n_loop_ev, "loop_event count");
    check(n_loop > 0 && n_link_out > 0 && n_link_in > 0 && n_unique > 0, "all paths used");
    check(st_seen[0] > 0 && st_seen[1] > 0 && st_seen[2] > 0, "all FSM states");
    $display("link_in=%0d link_out=%0d loops=%0d unique=%0d", n_link_in, n_link_out, n_loop, n_unique);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
