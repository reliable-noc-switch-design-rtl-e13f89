// tb_port_fsm: self-checking test of port_fsm.
// Drives rw, the request and status inputs at random and compares state and
// outputs against a reference model of the three-state controller, with the
// one-clock state delay.
module tb_port_fsm;
  import rkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] rw = RW_RECEIVE;
  logic input_req = 0, output_req = 0, occ_in = 0, in_full = 0, unavailable_in = 0, id_in = 0;
  logic occ_out, tran_enable, rec_enable;
  port_state_e ps, exp_ps;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  port_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t ps=%0d exp=%0d", what, $time, ps, exp_ps);
    end
  endtask

  initial begin
    exp_ps = ST_RECEIVE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check(ps == exp_ps, "state");
      check(rec_enable == (exp_ps == ST_RECEIVE && input_req && !in_full), "rec_enable");
      check(tran_enable == (exp_ps == ST_TRANSMIT && output_req && !occ_in), "tran_enable");
      check(occ_out == (exp_ps != ST_RECEIVE || in_full), "occ_out");
      seen[exp_ps]++;
      if ($urandom % 8 == 0) rw = 2'($urandom);
      input_req      = $urandom % 2;
      output_req     = $urandom % 2;
      occ_in         = $urandom % 4 == 0;
      in_full        = $urandom % 4 == 0;
      unavailable_in = $urandom % 16 == 0;
      id_in          = $urandom % 32 == 0;
      // reference next state
      if (unavailable_in || id_in) exp_ps = ST_LOOPBACK;
      else if (rw == 2'b10)        exp_ps = ST_TRANSMIT;
      else if (rw == 2'b01)        exp_ps = ST_RECEIVE;
      else if (exp_ps == ST_LOOPBACK) exp_ps = ST_RECEIVE;
    end
    check(seen[0] > 0 && seen[1] > 0 && seen[2] > 0, "all states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
