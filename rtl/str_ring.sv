// str_ring - behavioural model of an L-stage self-timed ring (STR), a
// micropipeline closed on itself. Simulation model, not synthesizable.
//
// Stage i takes its forward input from stage i-1 and its reverse input from
// stage i+1 (indices modulo L). Stage i holds a token when its output
// differs from that of stage i+1, a bubble otherwise. A token moves forward
// into stage i+1 when stage i+1 holds a bubble. The ring oscillates when it
// has at least three stages, at least one bubble and an even number of
// tokens; the token count is preserved as it runs.
//
// Reset: while rst_n is low every stage output is forced to its INIT bit;
// by default the first NT stages alternate 0,1 and the rest are 0, which
// loads NT tokens and L-NT bubbles. After rst_n rises the ring runs freely.
//
// Timing: once the tokens are evenly spread, an eight-stage ring with four
// tokens moves all tokens one stage per step and each output has a period
// of four steps. A step is one stage delay including the Charlie term
// (see str_stage); the defaults, 728 ps plus a 100 ps Charlie constant,
// give about 300 MHz. All L outputs have the same frequency and are spread
// in phase (with four tokens, stages i and i+4 share a phase). Each stage
// adds its own random jitter.
`timescale 1ps/1ps
module str_ring
  import trng_pkg::*;
#(
  parameter int unsigned L         = STR_STAGES_DEFAULT,
  parameter int unsigned NT        = STR_TOKENS_DEFAULT,
  parameter int unsigned DELAY_PS  = 728,
  parameter int unsigned JITTER_PS = 15,
  parameter int unsigned CHARLIE_PS = 100
) (
  input  logic         rst_n,
  output logic [L-1:0] c      // stage outputs C(0)..C(L-1)
);

  for (genvar i = 0; i < L; i++) begin : g_stage
    str_stage #(
      .DELAY_PS (DELAY_PS),
      .JITTER_PS(JITTER_PS),
      .CHARLIE_PS(CHARLIE_PS),
      .INIT     (str_init_bit(i, NT))
    ) u_stage (
      .rst_n(rst_n),
      .f    (c[(i + L - 1) % L]),
      .r    (c[(i + 1) % L]),
      .c    (c[i])
    );
  end

  // Oscillation needs at least 3 stages, one bubble and an even token count.
  initial begin
    assert (L >= 3 && NT < L && NT % 2 == 0 && NT > 0)
      else $error("str_ring: L=%0d NT=%0d cannot oscillate", L, NT);
  end

endmodule
