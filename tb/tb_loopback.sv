// tb_loopback: self-checking test of the loopback module.
// The testbench plays the neighbour (sending only while occ_or_out is low),
// the port FSM (random occupied / transmit enable), the input FIFO (random
// full) and the output buffer (a stream of tagged packets). Link packets
// carry bit 15 = 0, output-buffer packets bit 15 = 1. A scoreboard checks
// that every link packet reaches the input FIFO in order, that every
// output-buffer packet leaves exactly once, on the link when the neighbour
// is usable or looped back into the input when it is unavailable or faulty,
// that loop_event counts the loopbacks and that occ_or_out is the OR of the
// FSM's occupied signal and the loopback condition. A directed start checks
// the one-clock timing of both paths.
module tb_loopback;
  import rkt_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t lnk_data_in = '0, lnk_data_out, int_data_out, int_data_in;
  logic data_request_in = 0, unavailable_in = 0, id_in = 0, data_request_out, occ_or_out;
  logic rec_enable, tran_enable, fsm_occ, occ_rand = 0, in_full, obuf_valid;
  logic int_req_out, int_pop, int_wr, int_full = 0, loop_active, loop_event;
  logic ten = 0;
  int checks = 0, failures = 0, loops = 0, loop_events = 0, link_outs = 0, link_ins = 0;
  flit_t link_q [$], pop_q [$], src_q [$];

  loopback dut (.*);

  always #5 clk = ~clk;

  // like the port FSM: occupied when told so or when the input path is full
  assign fsm_occ      = occ_rand || in_full;
  assign rec_enable   = !fsm_occ && data_request_in;
  assign tran_enable  = ten && obuf_valid;
  assign int_req_out  = src_q.size() != 0;
  assign int_data_out = int_req_out ? src_q[0] : '0;

  initial begin
    repeat (50000) @(posedge clk);
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

  // scoreboard, sampled just before each rising edge
  always @(negedge clk) if (rst_n) begin
    check(occ_or_out == (fsm_occ || unavailable_in || id_in), "occ_or_out");
    check(!(data_request_out && (unavailable_in || id_in)), "no send while loopback");
    if (loop_event) loop_events++;
  end

  always @(posedge clk) if (rst_n) begin
    bit popped;
    popped = int_pop;
    if (int_pop) pop_q.push_back(src_q[0]);
    if (data_request_out) begin
      link_outs++;
      check(pop_q.size() != 0 && lnk_data_out == pop_q[0], "link out order");
      if (pop_q.size() != 0) void'(pop_q.pop_front());
    end
    if (int_wr) begin
      if (int_data_in[15] == 1'b0) begin
        check(link_q.size() != 0 && int_data_in == link_q[0], "link in order");
        if (link_q.size() != 0) void'(link_q.pop_front());
        link_ins++;
      end else begin
        loops++;
        check(pop_q.size() != 0 && int_data_in == pop_q[0], "loopback order");
        if (pop_q.size() != 0) void'(pop_q.pop_front());
      end
    end
    if (data_request_in && !occ_or_out) link_q.push_back(lnk_data_in);
    // the source queue moves after the edge, so that the design samples the
    // head it was offered
    #1;
    if (popped) void'(src_q.pop_front());
  end

  int seq = 0;
  function automatic flit_t mkpkt(bit t);
    seq++;
    return flit_t'({t, 15'(seq)});
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: link packet reaches the input FIFO one clock after it is taken
    @(negedge clk);
    lnk_data_in = mkpkt(0); data_request_in = 1;
    @(negedge clk);
    data_request_in = 0;
    check(int_wr && int_data_in == lnk_data_in, "receive latency 1");
    // directed: output packet on the link one clock after it is popped
    src_q.push_back(mkpkt(1));
    @(negedge clk);
    check(!data_request_out && obuf_valid, "obuf loaded");
    ten = 1;
    #1;
    check(data_request_out && lnk_data_out[15], "transmit on enable");
    @(negedge clk);
    check(pop_q.size() == 0, "transmitted");
    ten = 0;
    // directed: loopback with unavailable neighbour
    repeat (3) @(negedge clk);
    unavailable_in = 1;
    src_q.push_back(mkpkt(1));
    repeat (6) @(negedge clk);
    check(loops == 1 && loop_events == 1, "one loopback done");
    unavailable_in = 0;
    // random phase
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if ($urandom % 3 == 0 && src_q.size() < 4) src_q.push_back(mkpkt(1));
      occ_rand = $urandom % 4 == 0;
      int_full = $urandom % 5 == 0;
      ten      = $urandom % 2 == 0;
      if (n % 500 == 0) begin
        unavailable_in = ($urandom % 3 == 0);
        id_in          = ($urandom % 4 == 0);
      end
      // neighbour: may only send while occ_or_out is low (a function of the
      // values just set)
      #1;
      data_request_in = !occ_or_out && ($urandom % 2 == 0);
      lnk_data_in     = data_request_in ? mkpkt(0) : '0;
    end
    // drain
    @(negedge clk);
    data_request_in = 0; unavailable_in = 0; id_in = 0; occ_rand = 0; int_full = 0; ten = 1;
    repeat (50) @(negedge clk);
    check(src_q.size() == 0 && pop_q.size() == 0 && link_q.size() == 0, "all delivered");
    check(loops == loop_events, "loop_event count");
    check(loops > 10 && link_outs > 10 && link_ins > 10, "all paths used");
    $display("loops=%0d link_outs=%0d link_ins=%0d", loops, link_outs, link_ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
