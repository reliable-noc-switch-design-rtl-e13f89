// conv_encoder: rate-1/2 convolutional encoder for one 16-bit packet.
//
// The packet's bits go, most significant first, through a two-stage shift
// register (constraint length 3) that starts at zero; two tail zeros follow
// so that the register ends at zero again (a terminated code). For each bit u
// with register contents s1 (previous bit) and s2 (the one before), two code
// bits are sent: g0 = u ^ s1 ^ s2 (generator 7 octal) and g1 = u ^ s2
// (generator 5 octal). The code word holds the pairs in order, the first
// pair in the top two bits: code[2*NSTEP-1-2i] = g0 and
// code[2*NSTEP-2-2i] = g1 for step i, NSTEP = DATA_W + 2.
// Encoding with a shift register and modulo-two adders follows the design;
// the rate, constraint length, generators, termination and working on a whole
// packet at once are this design's choices. Purely combinational.
module conv_encoder #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0]       data,
  output logic [2*(DATA_W+2)-1:0] code
);

  localparam int unsigned NSTEP = DATA_W + 2;

  always_comb begin
    logic s1, s2, u;
    s1   = 1'b0;
    s2   = 1'b0;
    code = '0;
    for (int i = 0; i < NSTEP; i++) begin
      u = (i < DATA_W) ? data[DATA_W-1-i] : 1'b0;
      code[2*NSTEP-1-2*i] = u ^ s1 ^ s2;
      code[2*NSTEP-2-2*i] = u ^ s2;
      s2 = s1;
      s1 = u;
    end
  end

endmodule
