// tb_error_journal: self-checking test of error_journal.
// Random increment pulses per port against counters in the testbench,
// including saturation at 255 and the clear input.
module tb_error_journal;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [3:0] inc = '0;
  logic [7:0] count [4];
  int exp_cnt [4] = '{0, 0, 0, 0};
  int checks = 0, failures = 0, saturated = 0;

  error_journal #(.NPORTS(4), .CNT_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(count[i]) != exp_cnt[i]) begin
          failures++;
          $display("FAIL port %0d count %0d expected %0d", i, count[i], exp_cnt[i]);
        end
        if (exp_cnt[i] == 255) saturated++;
      end
      // port 0 is hammered so that it saturates
      inc = {1'($urandom % 8 == 0), 1'($urandom % 4 == 0), 1'($urandom % 2), 1'b1};
      clear = (n == 3000);
      for (int i = 0; i < 4; i++) begin
        if (clear) exp_cnt[i] = 0;
        else if (inc[i] && exp_cnt[i] < 255) exp_cnt[i]++;
      end
    end
    checks++;
    if (saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
