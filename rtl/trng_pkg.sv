// trng_pkg - constants and helper functions shared by the coherent-sampling
// TRNG built from two self-timed rings (STRs).
//
// The main configuration is two eight-stage rings, eight samplers and a
// second-order parity filter. The ring start-up pattern follows the
// token/bubble example of an eight-stage ring with four tokens: stage
// outputs C0..C7 = 0,1,0,1,0,0,0,0. The number of tokens of the main
// configuration and the stage delays of the ring model are this design's
// own choices (see str_ring and trng_top).
`timescale 1ps/1ps
package trng_pkg;

  // Number of stages per ring, and therefore of samplers and raw bits.
  localparam int unsigned STR_STAGES_DEFAULT = 8;
  // Parity filter order used with the 1 MHz sampling clock.
  localparam int unsigned PF_ORDER_DEFAULT = 2;
  // Tokens loaded into each ring at reset (half of the stages).
  localparam int unsigned STR_TOKENS_DEFAULT = 4;

  // Start-up value of stage i of an L-stage ring holding NT tokens.
  // Stage i holds a token when C(i) != C(i+1). Outputs 0,1,0,1,... on the
  // first NT stages and 0 on the rest give NT tokens followed by L-NT
  // bubbles (for L=8, NT=4: 01010000).
  function automatic logic str_init_bit(int unsigned i, int unsigned nt);
    return (i < nt) && (i % 2 == 1);
  endfunction

  // Number of tokens in a ring state: stages whose output differs from
  // that of the next stage (the last stage is compared with stage 0).
  function automatic int unsigned str_token_count(logic [63:0] c, int unsigned l);
    int unsigned n = 0;
    for (int unsigned i = 0; i < l; i++)
      if (c[i] != c[(i + 1) % l]) n++;
    return n;
  endfunction

endpackage
