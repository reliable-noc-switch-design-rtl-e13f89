// tb_route_err_detect: exhaustive test of route_err_detect for every port
// position and every stop pattern: usable-port mask, URPI (11 only when
// exactly one port is usable) and the packet with URPI in bits 16-15.
module tb_route_err_detect;
  import rkt_pkg::*;
  flit_t      din;
  logic [3:0] stop;
  flit_t      dout [4];
  logic [1:0] urpi [4];
  logic [3:0] dr_sel [4];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < 4; p++) begin : g
    route_err_detect #(.PORT_ID(p)) dut (.data_in(din), .stop(stop), .data_out(dout[p]),
                                         .urpi(urpi[p]), .dr_sel(dr_sel[p]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int t = 0; t < 8; t++) begin
        stop = 4'(s);
        din  = flit_t'(16'($urandom));
        #1;
        for (int p = 0; p < 4; p++) begin
          logic [3:0] m;
          int n;
          logic [1:0] eu;
          m = ~stop;
          m[p] = 1'b0;
          n = 0;
          for (int i = 0; i < 4; i++) n += int'(m[i]);
          eu = (n == 1) ? 2'b11 : 2'b00;
          checks++;
          if (dr_sel[p] !== m || urpi[p] !== eu || dout[p][15:14] !== eu ||
              dout[p][13:0] !== din[13:0]) begin
            failures++;
            $display("FAIL port %0d stop %b: mask %b/%b urpi %b/%b", p, stop, dr_sel[p], m, urpi[p], eu);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
