// tb_str_ring - self-checking testbench of the self-timed ring model.
//
// Three eight-stage rings are run: two with 4 tokens (the default, one of
// them without jitter) and one with 6 tokens. The testbench checks that
// reset loads the expected outputs, that every output change is a legal
// stage firing (the stage had F != R and takes the value of F), that the
// token count never changes, that all stages toggle at the same rate, and
// that the default ring runs at 300 MHz within 3 %. The jitter-free ring
// must settle into the evenly spread state sequence
// 01100110 -> 00110011 -> 10011001 -> 11001100 -> 01100110 (outputs
// C0..C7, written left to right), in which all four tokens move together
// one stage forward per step, as the firing rule requires.
`timescale 1ps/100fs
module tb_str_ring;
  import trng_pkg::*;

  localparam int unsigned L = 8;
  localparam int unsigned D = 728;  // default stage delay

  int checks = 0, failures = 0;
  logic rst_n;
  logic [L-1:0] c4, c6, cq;

  str_ring                                           u_ring4 (.rst_n(rst_n), .c(c4));
  str_ring #(.L(L), .NT(6), .DELAY_PS(D), .JITTER_PS(15)) u_ring6 (.rst_n(rst_n), .c(c6));
  str_ring #(.L(L), .NT(4), .DELAY_PS(D), .JITTER_PS(0))  u_ringq (.rst_n(rst_n), .c(cq));

  // Steady-state sequence of the jitter-free ring, written C0..C7 left to
  // right as strings, converted to vectors with bit i = C(i).
  function automatic logic [L-1:0] from_str(string s);
    logic [L-1:0] v;
    for (int i = 0; i < L; i++) v[i] = (s[i] == "1");
    return v;
  endfunction
  logic [L-1:0] steady[4];
  initial begin
    steady[0] = from_str("01100110");
    steady[1] = from_str("00110011");
    steady[2] = from_str("10011001");
    steady[3] = from_str("11001100");
  end

  // Poll the jitter-free ring at half-ps offsets (its stages fire on whole
  // ps) and follow its state sequence once it has settled.
  bit follow = 0;
  int unsigned seq_steps = 0, seq_bad = 0;
  logic [L-1:0] q_last;
  initial begin
    #0.5;
    forever begin
      #20;
      if (follow && cq != q_last) begin
        int pos = -1;
        for (int k = 0; k < 4; k++) if (q_last == steady[k]) pos = k;
        if (pos < 0 || cq != steady[(pos + 1) % 4]) seq_bad++;
        seq_steps++;
      end
      q_last = cq;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Firing rule of one ring state change, checked against the last state.
  function automatic bit legal_step(logic [L-1:0] prev, logic [L-1:0] now);
    for (int i = 0; i < L; i++) begin
      if (prev[i] != now[i]) begin
        logic fwd = prev[(i + L - 1) % L];
        logic rev = prev[(i + 1) % L];
        if (!(fwd != rev && now[i] == fwd)) return 1'b0;
      end
    end
    return 1'b1;
  endfunction

  logic [L-1:0] last4, last6;
  bit running = 0;
  int unsigned rises4[L], rises6[L];
  int unsigned bad_steps = 0, bad_tokens = 0, steps = 0;

  always @(c4) if (running) begin
    steps++;
    if (!legal_step(last4, c4)) bad_steps++;
    if (str_token_count(64'(c4), L) != 4) bad_tokens++;
    for (int i = 0; i < L; i++) if (!last4[i] && c4[i]) rises4[i]++;
    last4 = c4;
  end

  always @(c6) if (running) begin
    steps++;
    if (!legal_step(last6, c6)) bad_steps++;
    if (str_token_count(64'(c6), L) != 6) bad_tokens++;
    for (int i = 0; i < L; i++) if (!last6[i] && c6[i]) rises6[i]++;
    last6 = c6;
  end

  // Watchdog.
  initial begin
    #50us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint WINDOW_PS = 2_000_000;  // 2 us

  initial begin
    rst_n = 1'b1;  // start high so that the reset below is an edge
    #1;
    rst_n = 1'b0;
    #5000;
    check(c4 == from_str("01010000"), "reset pattern, 4 tokens (01010000)");
    check(c6 == 8'b0010_1010, "reset pattern, 6 tokens");
    #5000;
    check(c4 == 8'b0000_1010, "ring holds while in reset");
    last4 = c4;
    last6 = c6;
    running = 1;
    rst_n = 1'b1;
    // First firing: stage 4 is the only enabled stage of the 4-token ring
    // (delay D plus at most the Charlie constant and the jitter).
    #(D + 100 + 61);
    check(cq == from_str("01011000"), "first step 01010000 -> 01011000");
    // Let the start-up transient die out, then measure.
    #100000;
    follow = 1;
    for (int i = 0; i < L; i++) begin rises4[i] = 0; rises6[i] = 0; end
    #(WINDOW_PS);
    begin
      real f4;
      f4 = real'(rises4[0]) / (real'(WINDOW_PS) * 1.0e-12);
      $display("4-token ring: %0d rising edges in 2 us, %0.1f MHz", rises4[0], f4 / 1.0e6);
      $display("6-token ring: %0d rising edges in 2 us", rises6[0]);
      check(f4 > 291.0e6 && f4 < 309.0e6, "default ring near 300 MHz");
      for (int i = 1; i < L; i++) begin
        check(rises4[i] + 1 >= rises4[0] && rises4[i] <= rises4[0] + 1, "4-token ring: stages share one frequency");
        check(rises6[i] + 1 >= rises6[0] && rises6[i] <= rises6[0] + 1, "6-token ring: stages share one frequency");
      end
      check(rises6[0] > 100, "6-token ring oscillates");
    end
    check(steps > 1000, "rings kept firing");
    $display("jitter-free ring: %0d steps followed, %0d off the sequence", seq_steps, seq_bad);
    check(seq_steps > 1000 && seq_bad == 0, "evenly spread state sequence 01100110 -> 00110011 -> ...");
    check(bad_steps == 0, "every change is a legal stage firing");
    check(bad_tokens == 0, "token count preserved");
    // Reset again reloads the pattern.
    running = 0;
    rst_n = 1'b0;
    #1000;
    check(c4 == 8'b0000_1010 && c6 == 8'b0010_1010, "second reset reloads the pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
