// viterbi_decoder: hard-decision Viterbi decoder for the code of
// conv_encoder (rate 1/2, constraint length 3, generators 7 and 5 octal,
// terminated with two zero tail bits).
//
// A pulse on start loads a code word. The decoder then walks the trellis one
// step per clock (NSTEP = DATA_W + 2 steps): for each of the four states it
// adds the Hamming distance between the received pair and the pair each of
// its two predecessors would have sent, keeps the smaller sum (add, compare,
// select) and stores which predecessor won. Because the code is terminated
// the best path ends in state 0; the traceback then follows the stored
// decisions back from state 0, one step per clock, and recovers the data
// bits. done is high for one clock with data valid, and errors gives the
// path metric of the result: the number of code bits that had to be
// corrected. Any two bit errors in a code word are corrected (the code's
// free distance is 5).
// Timing: done rises 2*NSTEP + 2 clocks after the clock that takes start
// (38 for 16-bit packets): 1 load, NSTEP trellis steps, NSTEP traceback
// steps, 1 output.
// start is ignored while busy. Decoding with the trellis, keeping the most
// likely path to each state, follows the design; everything about the code
// itself and the block-wise schedule is this design's choice.
module viterbi_decoder #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [2*(DATA_W+2)-1:0] code,
  output logic                    busy,
  output logic                    done,
  output logic [DATA_W-1:0]       data,
  output logic [6:0]              errors
);

  localparam int unsigned NSTEP = DATA_W + 2;
  localparam int unsigned SW    = $clog2(NSTEP + 1);
  localparam logic [6:0]  PM_INIT = 7'd40;   // larger than any real metric gap

  typedef enum logic [1:0] {S_IDLE, S_ACS, S_TRACE, S_DONE} vstate_e;

  vstate_e                 st;
  logic [2*NSTEP-1:0]      cw;
  logic [SW-1:0]           step;
  logic [6:0]              pm [4];
  logic [3:0]              dec [NSTEP];
  logic [1:0]              tstate;
  logic [DATA_W-1:0]       bits;

  // received pair of the current step
  logic [1:0] rx;
  assign rx = cw[2*NSTEP-1-2*int'(step) -: 2];

  // add-compare-select for the four next states ns = {u, a}; predecessors
  // are {a, b} for b = 0, 1 with input u.
  logic [6:0] pm_new [4];
  logic [3:0] dec_new;

  function automatic logic [1:0] hd(input logic [1:0] a, input logic [1:0] b);
    logic [1:0] x;
    x = a ^ b;
    return {1'b0, x[1]} + {1'b0, x[0]};
  endfunction

  always_comb begin
    for (int ns = 0; ns < 4; ns++) begin
      logic u, a;
      logic [6:0] m0, m1;
      u  = ns[1];
      a  = ns[0];
      m0 = pm[{a, 1'b0}] + 7'(hd(rx, {u ^ a,        u}));
      m1 = pm[{a, 1'b1}] + 7'(hd(rx, {u ^ a ^ 1'b1, u ^ 1'b1}));
      if (m1 < m0) begin
        pm_new[ns]  = m1;
        dec_new[ns] = 1'b1;
      end else begin
        pm_new[ns]  = m0;
        dec_new[ns] = 1'b0;
      end
    end
  end

  assign busy = (st == S_ACS) || (st == S_TRACE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      cw     <= '0;
      step   <= '0;
      tstate <= '0;
      bits   <= '0;
      data   <= '0;
      errors <= '0;
      done   <= 1'b0;
      for (int s = 0; s < 4; s++) pm[s] <= '0;
      for (int t = 0; t < NSTEP; t++) dec[t] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (start) begin
            cw    <= code;
            step  <= '0;
            pm[0] <= '0;
            pm[1] <= PM_INIT;
            pm[2] <= PM_INIT;
            pm[3] <= PM_INIT;
            st    <= S_ACS;
          end
        end
        S_ACS: begin
          for (int s = 0; s < 4; s++) pm[s] <= pm_new[s];
          dec[step] <= dec_new;
          if (step == SW'(NSTEP - 1)) begin
            st     <= S_TRACE;
            tstate <= 2'd0;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_TRACE: begin
          // state {u, a} at the end of this step: input bit u, predecessor {a, dec}
          if (int'(step) < DATA_W) bits[DATA_W-1-int'(step)] <= tstate[1];
          tstate <= {tstate[0], dec[step][tstate]};
          if (step == '0) st <= S_DONE;
          else            step <= step - 1'b1;
        end
        S_DONE: begin
          data   <= bits;
          errors <= pm[0];
          done   <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
