// tb_output_buffer: self-checking test of output_buffer.
// Three random sources write into their FIFOs (grant only while not full) and
// a random reader pops the head. Every packet must come out exactly once, in
// order per source; a source with data must be served within three pops of
// others (round robin); grants must follow the FIFO room.
module tb_output_buffer;
  import rkt_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t src_data [3];
  logic [2:0] src_req = '0, src_gnt;
  flit_t out_data;
  logic out_valid, out_pop = 0;
  int checks = 0, failures = 0, gnts = 0, pops = 0, full_seen = 0;
  flit_t model [3][$];
  int wait_pops [3] = '{0, 0, 0};
  int seq [3] = '{0, 0, 0};

  output_buffer #(.NSRC(3), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    for (int k = 0; k < 3; k++) src_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        src_req[k]  = $urandom % 2;
        src_data[k] = flit_t'({2'(k), 14'(seq[k])});
      end
      out_pop = ((n / 300) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      #1;
      for (int k = 0; k < 3; k++) begin
        check(src_gnt[k] == (src_req[k] && model[k].size() < 4), "grant vs room");
        if (src_req[k] && model[k].size() == 4) full_seen++;
      end
      check(out_valid == (model[0].size() + model[1].size() + model[2].size() != 0), "valid");
      @(posedge clk);
      if (out_pop && out_valid) begin
        int s;
        s = int'(out_data[15:14]);
        pops++;
        check(s < 3 && model[s].size() != 0 && out_data == model[s][0], "order per source");
        if (s < 3 && model[s].size() != 0) void'(model[s].pop_front());
        for (int k = 0; k < 3; k++) begin
          if (k == s) wait_pops[k] = 0;
          else if (model[k].size() != 0) wait_pops[k]++;
          check(wait_pops[k] < 3, "round robin fairness");
        end
      end
      for (int k = 0; k < 3; k++) begin
        if (src_gnt[k]) begin
          model[k].push_back(src_data[k]);
          seq[k]++;
          gnts++;
        end
      end
    end
    check(pops > 1000 && full_seen > 0, "traffic and back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
