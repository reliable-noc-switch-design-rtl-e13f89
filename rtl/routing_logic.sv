// routing_logic: adaptive XY choice of the output port for one input port.
//
// With xy_enable high and a packet at data_in, exactly one of north_out,
// east_out, south_out, west_out is raised: the request to that output port.
// avail gives the usable ports (from the routing error detection; bit i for
// port i, North=0, East=1, South=2, West=3).
//
//  1. URPI = 11 (one usable port only) and avail is one-hot: that port.
//  2. Otherwise the XY rule of the design, comparing the destination with the
//     previous coordinates held in the packet: Y dest > Y prev -> East,
//     Y dest < Y prev -> West; with equal Y, X dest > X prev -> South, any
//     other case -> North.
//  3. If the XY port is not usable (the adaptive part): when Y differed, the
//     port that reduces the X distance (South if X dest > X prev, North if
//     smaller) if usable; else the first usable port in the order W, S, E, N.
//     This order sends a packet from the North input whose XY port is North
//     itself out through West, as the design's switch simulation shows.
//  4. No usable port: no request; the packet waits.
// Steps 1 and 2 follow the design; step 3 is this design's own reading of
// "adaptive XY", which the design names but does not spell out.
// Purely combinational.
module routing_logic
  import rkt_pkg::*;
(
  input  flit_t       data_in,
  input  logic        xy_enable,
  input  logic [3:0]  avail,
  output logic        north_out,
  output logic        east_out,
  output logic        south_out,
  output logic        west_out,
  output logic [3:0]  dir_req
);

  logic [3:0] xy_pref, alt, first_avail, choice;

  always_comb begin
    xy_pref = '0;
    alt     = '0;
    if (data_in.y_dest > data_in.y_prev) begin
      xy_pref[DIR_E] = 1'b1;
    end else if (data_in.y_dest < data_in.y_prev) begin
      xy_pref[DIR_W] = 1'b1;
    end else if (data_in.x_dest > data_in.x_prev) begin
      xy_pref[DIR_S] = 1'b1;
    end else begin
      xy_pref[DIR_N] = 1'b1;
    end
    if (data_in.y_dest != data_in.y_prev) begin
      if (data_in.x_dest > data_in.x_prev)      alt[DIR_S] = 1'b1;
      else if (data_in.x_dest < data_in.x_prev) alt[DIR_N] = 1'b1;
    end

    // first usable port in the order W, S, E, N
    first_avail = '0;
    for (int i = 0; i < 4; i++) begin
      if (avail[i]) first_avail = 4'(1) << i;
    end

    if (data_in.urpi == URPI_UNIQUE && one_port(avail)) choice = avail;
    else if ((xy_pref & avail) != '0)                  choice = xy_pref;
    else if ((alt & avail) != '0)                      choice = alt;
    else                                               choice = first_avail;

    dir_req = xy_enable ? choice : 4'b0000;
  end

  assign north_out = dir_req[DIR_N];
  assign east_out  = dir_req[DIR_E];
  assign south_out = dir_req[DIR_S];
  assign west_out  = dir_req[DIR_W];

endmodule
