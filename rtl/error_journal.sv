// error_journal: centralized journal of data packet errors.
//
// One counter per port of the switch. Each loopback of a packet at a port
// (a one-cycle pulse on inc[i]) adds 1 to that port's entry, marking the
// routing direction as faulty; the count saturates at its maximum instead of
// wrapping. clear resets all entries. count[i] is readable at all times.
// Adding 1 per loopback event follows the design; the counter width,
// saturation and clear input are this design's choices.
module error_journal #(
  parameter int unsigned NPORTS = 4,
  parameter int unsigned CNT_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [NPORTS-1:0] inc,
  output logic [CNT_W-1:0]  count [NPORTS]
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      if (!rst_n || clear)               count[i] <= '0;
      else if (inc[i] && !(&count[i]))   count[i] <= count[i] + 1'b1;
    end
  end

endmodule
