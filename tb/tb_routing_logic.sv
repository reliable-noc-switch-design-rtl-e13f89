// tb_routing_logic: self-checking test of routing_logic.
// Directed cases from the XY rule (Y greater -> East, smaller -> West, equal
// Y and X greater -> South, otherwise North), then random packets and port
// masks against an independent reference of the adaptive choice.
module tb_routing_logic;
  import rkt_pkg::*;
  flit_t din;
  logic xy_enable;
  logic [3:0] avail, dir_req;
  logic north_out, east_out, south_out, west_out;
  int checks = 0, failures = 0;
  int adaptive = 0, unique_used = 0;

  routing_logic dut (.data_in(din), .*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int u, int yp, int xp, int yd, int xd);
    flit_t f;
    f.urpi = 2'(u); f.y_prev = 3'(yp); f.x_prev = 3'(xp);
    f.y_dest = 3'(yd); f.x_dest = 3'(xd); f.data = 2'b10;
    return f;
  endfunction

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

  task automatic expect_dir(logic [3:0] e, string what);
    #1;
    checks++;
    if (dir_req !== e || {west_out, south_out, east_out, north_out} !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, dir_req, e);
    end
  endtask

  initial begin
    xy_enable = 1; avail = 4'b1111;
    din = mk(0, 2, 3, 5, 3); expect_dir(4'b0010, "Y greater -> East");
    din = mk(0, 5, 3, 2, 3); expect_dir(4'b1000, "Y smaller -> West");
    din = mk(0, 4, 1, 4, 6); expect_dir(4'b0100, "Y equal, X greater -> South");
    din = mk(0, 4, 6, 4, 1); expect_dir(4'b0001, "Y equal, X smaller -> North");
    din = mk(0, 0, 4, 0, 0); expect_dir(4'b0001, "figure case x_prev=4 -> North");
    avail = 4'b1101;
    din = mk(0, 2, 1, 5, 4); expect_dir(4'b0100, "East blocked -> South (adaptive)");
    avail = 4'b0100;
    din = mk(3, 2, 1, 5, 4); expect_dir(4'b0100, "URPI unique -> only port");
    xy_enable = 0;
    din = mk(0, 2, 3, 5, 3); expect_dir(4'b0000, "disabled");
    xy_enable = 1;
    avail = 4'b0000;
    din = mk(0, 2, 3, 5, 3); expect_dir(4'b0000, "no port usable");
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] e;
      din = flit_t'(16'($urandom));
      avail = 4'($urandom);
      xy_enable = ($urandom % 8) != 0;
      e = xy_enable ? ref_dir(din, avail) : 4'b0000;
      expect_dir(e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
