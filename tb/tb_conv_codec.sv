// tb_conv_codec: self-checking test of conv_encoder and viterbi_decoder.
// The encoder is compared with a bit-serial reference of the 7/5 code; then
// random packets are encoded, 0, 1 or 2 code bits are flipped at random
// places, and the decoder must return the packet, report the number of
// flipped bits and finish 38 clocks after start. Three errors are also
// injected to see that the decoder then reports a non-zero metric.
module tb_conv_codec;
  localparam int DW = 16, NS = DW + 2;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [DW-1:0] data, dout;
  logic [2*NS-1:0] code, rx;
  logic [6:0] errors;
  int checks = 0, failures = 0;

  conv_encoder #(.DATA_W(DW)) u_enc (.data(data), .code(code));
  viterbi_decoder #(.DATA_W(DW)) u_dec (.clk(clk), .rst_n(rst_n), .start(start), .code(rx),
                                        .busy(busy), .done(done), .data(dout), .errors(errors));

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
      $display("FAIL %s at %0t data=%h got=%h err=%0d", what, $time, data, dout, errors);
    end
  endtask

  function automatic logic [2*NS-1:0] ref_code(logic [DW-1:0] d);
    logic [2:0] sr;   // {u, s1, s2}
    logic [2*NS-1:0] c;
    sr = 3'b000;
    c = '0;
    for (int i = 0; i < NS; i++) begin
      sr = {(i < DW) ? d[DW-1-i] : 1'b0, sr[2:1]};
      c = {c[2*NS-3:0], ^(sr & 3'b111), ^(sr & 3'b101)};
    end
    return c;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int nerr, p0, p1, lat;
      @(negedge clk);
      data = (n == 0) ? '0 : (n == 1) ? '1 : DW'($urandom);
      #1;
      check(code == ref_code(data), "encoder against reference");
      nerr = (n < 500) ? n % 3 : 3;
      rx = code;
      p0 = $urandom % (2 * NS);
      do p1 = $urandom % (2 * NS); while (p1 == p0);
      if (nerr >= 1) rx[p0] = ~rx[p0];
      if (nerr >= 2) rx[p1] = ~rx[p1];
      if (nerr >= 3) begin
        int p2;
        do p2 = $urandom % (2 * NS); while (p2 == p0 || p2 == p1);
        rx[p2] = ~rx[p2];
      end
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 2 * NS + 2, "decode latency");
      if (nerr <= 2) begin
        check(dout == data, "decoded data");
        check(int'(errors) == nerr, "corrected error count");
      end else begin
        check(errors != 0, "errors reported for three flips");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
