// route_err_detect: routing error detection of one input port.
//
// It checks which output ports the packet at this input may use and writes
// the URPI (Unique Routing Path Indication) bits, positions 16-15 of the
// packet. A port may be used when its link is not stopped (stop[i] = 0) and
// it is not this input's own port, since a packet is never sent back the way
// it came except through a loopback module. URPI is 11 when exactly one port
// is usable and 00 otherwise, as the design prescribes. dr_sel is the mask
// of usable ports (bit i for port i, North=0, East=1, South=2, West=3); it
// goes to the routing logic together with the marked packet.
//
// Purely combinational. The encoding 11 for "set" is read from the
// simulation of this block, where URPI shows the values 00 and 11 only.
module route_err_detect
  import rkt_pkg::*;
#(
  parameter int unsigned PORT_ID = 0
) (
  input  flit_t       data_in,
  input  logic [3:0]  stop,
  output flit_t       data_out,
  output logic [1:0]  urpi,
  output logic [3:0]  dr_sel
);

  logic [3:0] own;
  assign own    = 4'(1) << PORT_ID;
  assign dr_sel = ~stop & ~own;

  always_comb begin
    urpi = one_port(dr_sel) ? URPI_UNIQUE : URPI_NONE;
    data_out      = data_in;
    data_out.urpi = urpi;
  end

endmodule
