// str_stage - behavioural model of one self-timed ring stage (Muller gate
// plus inverter on the reverse input). This is a simulation model, not
// synthesizable logic: on an FPGA the stage is one LUT whose output feeds
// back to one of its inputs, placed as a hard macro so that every stage has
// the same delay.
//
// Function: when the forward input F differs from the reverse input R the
// output C takes the value of F; when F equals R the output keeps its
// previous value. In a ring, F comes from the previous stage and R from the
// next one.
//
// Timing: a change of C happens DELAY_PS after the stage becomes enabled
// (F != R and C != F), plus a Charlie term and a random jitter term.
//  - Charlie effect: the closer in time the last F and R events are, the
//    slower the stage. With s the time between them, the extra delay is
//    sqrt(CHARLIE_PS^2 + (s/2)^2) - s/2 (in whole ps, rounded down, and
//    dropped once s/2 exceeds 4*CHARLIE_PS): CHARLIE_PS for simultaneous
//    events, falling towards 0 when they are far apart. This hyperbola is
//    the usual shape of the effect; its use and the value are this model's
//    choice. The drafting effect is not modelled.
//  - Jitter: the sum of four uniform values in [-JITTER_PS, +JITTER_PS], a
//    rough Gaussian with a standard deviation of about 1.15*JITTER_PS.
// The delay values are this model's own; they set the ring frequency.
//
// Reset: while rst_n is low the output is forced to INIT. This is how the
// ring's token/bubble pattern is loaded in the reset phase.
`timescale 1ps/1ps
module str_stage #(
  parameter int unsigned DELAY_PS  = 728,
  parameter int unsigned JITTER_PS = 15,
  parameter int unsigned CHARLIE_PS = 100,
  parameter bit          INIT      = 1'b0
) (
  input  logic rst_n,
  input  logic f,   // forward input, from the previous stage
  input  logic r,   // reverse input, from the next stage
  output logic c    // stage output
);

  logic c_q;
  assign c = c_q;

  // Time of the last change of each input.
  logic   f_seen, r_seen;
  longint t_f, t_r;

  // Integer square root (floor).
  function automatic longint isqrt(longint x);
    longint y = 0;
    while ((y + 1) * (y + 1) <= x) y++;
    return y;
  endfunction

  // Delay of one firing: DELAY_PS, Charlie term (rounded down), jitter.
  function automatic int unsigned fire_delay(longint sep);
    longint half = (sep < 0 ? -sep : sep) / 2;
    longint ch = longint'(CHARLIE_PS);
    int signed d = int'(DELAY_PS);
    // Beyond 4*CHARLIE_PS the term is below CHARLIE_PS/8 and is dropped.
    if (half < 4 * ch) d += int'(isqrt(ch * ch + half * half) - half);
    for (int k = 0; k < 4; k++)
      d += int'($urandom_range(2 * JITTER_PS, 0)) - int'(JITTER_PS);
    return (d < 1) ? 1 : unsigned'(d);
  endfunction

  always begin
    if (f != f_seen) begin f_seen = f; t_f = $time; end
    if (r != r_seen) begin r_seen = r; t_r = $time; end
    if (!rst_n) begin
      c_q = INIT;
      t_f = $time;
      t_r = $time;
      @(rst_n);
    end else if ((f != r) && (c_q != f)) begin
      // Enabled: fire after the stage delay, unless reset came meanwhile.
      #(fire_delay(t_f - t_r));
      if (rst_n && (f != r)) c_q = f;
    end else begin
      @(f or r or rst_n);
    end
  end

endmodule
