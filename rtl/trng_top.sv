// trng_top - true random number generator based on coherent sampling
// between two self-timed rings.
//
// Two L-stage self-timed rings, STR-A and STR-B, run freely at nearly the
// same frequency. For every stage i, a sampler lets output i of STR-B
// sample output i of STR-A. Because the two frequencies are close, the
// sampled value s0 is a slow beat whose run lengths depend on the
// accumulated jitter of both rings; each sampler keeps the parity of the
// number of STR-B cycles in which s0 was high and hands it to the external
// sampling clock. This yields L raw bits per sampling clock cycle. An
// ORDER-th parity filter then XORs ORDER consecutive bits of each lane,
// giving an L-bit word every ORDER cycles (8 bits every 2 cycles, 4 Mb/s,
// at the default 1 MHz sampling clock).
//
// The rings are behavioural models (delays and jitter); on silicon they are
// one LUT per stage. Stage delays default to 662 ps for STR-A and 728 ps
// for STR-B (each plus a 100 ps Charlie term): about 326 MHz against
// 300 MHz, which makes s0 cycle about every 11.6 STR-B periods (about
// 38 ns). Which ring is the faster one, the exact delays and the jitter
// amplitude are this design's own choices. The sampler nets s0 and c0 are
// not used inside the top; they are kept as named nets for observation.
//
// Reset: rst_n low loads the token/bubble pattern into both rings and
// clears the samplers and the filter. smpl_clk may run at any rate below
// the ring frequency; the design was characterised from 0.5 to 50 MHz.
// rst_n should be released away from smpl_clk edges.
`timescale 1ps/1ps
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned L          = STR_STAGES_DEFAULT,
  parameter int unsigned NT         = STR_TOKENS_DEFAULT,
  parameter int unsigned PF_ORDER   = PF_ORDER_DEFAULT,
  parameter int unsigned DELAY_A_PS = 662,
  parameter int unsigned DELAY_B_PS = 728,
  parameter int unsigned JITTER_PS  = 15,
  parameter int unsigned CHARLIE_PS = 100
) (
  input  logic         rst_n,      // reset phase: load rings, clear flops
  input  logic         smpl_clk,   // external sampling clock
  output logic [L-1:0] raw_bits,   // B1..BL, one new set per smpl_clk cycle
  output logic [L-1:0] rnd_word,   // parity-filtered word
  output logic         rnd_valid   // rnd_word holds a new word
);

  logic [L-1:0] s_a, s_b;   // ring outputs S_A1..S_AL and S_B1..S_BL
  logic [L-1:0] s0, c0;     // sampler internals, for observation

  str_ring #(.L(L), .NT(NT), .DELAY_PS(DELAY_A_PS), .JITTER_PS(JITTER_PS), .CHARLIE_PS(CHARLIE_PS))
    u_str_a (.rst_n(rst_n), .c(s_a));

  str_ring #(.L(L), .NT(NT), .DELAY_PS(DELAY_B_PS), .JITTER_PS(JITTER_PS), .CHARLIE_PS(CHARLIE_PS))
    u_str_b (.rst_n(rst_n), .c(s_b));

  for (genvar i = 0; i < L; i++) begin : g_sampler
    cs_sampler u_sampler (
      .rst_n   (rst_n),
      .s_a     (s_a[i]),
      .s_b     (s_b[i]),
      .smpl_clk(smpl_clk),
      .s0      (s0[i]),
      .c0      (c0[i]),
      .b       (raw_bits[i])
    );
  end

  parity_filter #(.L(L), .ORDER(PF_ORDER)) u_filter (
    .clk  (smpl_clk),
    .rst_n(rst_n),
    .din  (raw_bits),
    .dout (rnd_word),
    .valid(rnd_valid)
  );

endmodule
