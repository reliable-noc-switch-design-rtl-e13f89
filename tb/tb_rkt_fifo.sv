// tb_rkt_fifo: self-checking test of rkt_fifo.
// Random reads and writes (never a write when full nor a read when empty)
// are compared against a queue model: head word, full and empty every cycle.
module tb_rkt_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0, w = 0, r = 0;
  logic [W-1:0] d = '0, q;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int fills = 0;

  rkt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() != 0) check(q == model[0], "head");
      if (model.size() == D) fills++;
      // bias: fill phases and drain phases
      w = !full && (((n / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0));
      r = !empty && (((n / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0));
      d = W'($urandom);
      @(posedge clk);
      #1;
      if (r) void'(model.pop_front());
      if (w) model.push_back(d);
    end
    check(fills > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
