// cs_sampler - coherent-sampling sampler for one pair of ring outputs.
//
// Four D flip-flops and one XOR gate:
//   1. s0  : S_Bi samples S_Ai. With the two signals at close but unequal
//            frequencies, s0 is a slow beat signal whose high and low run
//            lengths (counted in S_Bi cycles) vary with the jitter of both.
//   2. c0  : clocked by S_Bi, loads c0 XOR s0. It toggles once for every
//            S_Bi cycle in which s0 was high, so it holds the parity of the
//            number of S_Bi cycles that s0 spent high.
//   3,4.   : two flip-flops on the external sampling clock smpl_clk take
//            c0 into the sampling clock domain; the second gives the raw
//            random bit b.
// The structure follows the sampler of the design; that flip-flop 2 is
// clocked by S_Bi and that flip-flops 3 and 4 both run on smpl_clk (a
// two-stage synchroniser) is how this design reads it. The asynchronous
// active-low reset of all four flip-flops is this design's own addition.
//
// Timing: s0 and c0 change on rising edges of s_b. The value of c0 at one
// rising edge of smpl_clk appears on b after the next rising edge. One raw
// bit per smpl_clk cycle.
`timescale 1ps/1ps
module cs_sampler (
  input  logic rst_n,     // asynchronous reset, active low
  input  logic s_a,       // sampled signal S_Ai (a stage of STR-A)
  input  logic s_b,       // sampling signal S_Bi (same stage of STR-B)
  input  logic smpl_clk,  // external sampling clock, sets the throughput
  output logic s0,        // S_Ai as seen by S_Bi
  output logic c0,        // parity of S_Bi cycles with s0 high
  output logic b          // raw random bit Bi
);

  logic sync_q;

  always_ff @(posedge s_b or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= 1'b0;
      c0 <= 1'b0;
    end else begin
      s0 <= s_a;
      c0 <= c0 ^ s0;
    end
  end

  always_ff @(posedge smpl_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= 1'b0;
      b      <= 1'b0;
    end else begin
      sync_q <= c0;
      b      <= sync_q;
    end
  end

endmodule
