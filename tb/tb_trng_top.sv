// tb_trng_top - end-to-end testbench of the whole TRNG at its default
// configuration: two eight-stage rings, eight samplers, second-order parity
// filter, 1 MHz sampling clock.
//
// Checks, all against values the testbench works out itself:
//  - reset loads the token/bubble pattern 01010000 into both rings;
//  - both rings keep four tokens and run near 326 MHz (STR-A) and 300 MHz
//    (STR-B); the beat s0 of every sampler lasts about 11.6 STR-B cycles;
//  - every sampler's c0 toggles exactly at the STR-B edges that follow a
//    high s0, and raw_bits carries c0 of the previous sampling edge;
//  - each time rnd_valid is high, rnd_word is the XOR of the two raw
//    words that preceded the current one (the filter registers its input), and that happens every second sampling cycle (8 bits per 2
//    cycles, 4 Mb/s at 1 MHz);
//  - every lane produces both bit values;
//  - restart: after each of three resets the first 20 raw words are
//    recorded; no two of these sequences may be equal.
// Each mechanism (ring oscillation, beat, c0 toggle, filter word, reset
// reload, restart difference) is counted and must occur.
`timescale 1ps/100fs
module tb_trng_top;
  import trng_pkg::*;

  localparam int unsigned L = STR_STAGES_DEFAULT;
  localparam longint SMPL_HALF_PS = 500_000;  // 1 MHz sampling clock
  localparam int unsigned RESTARTS = 3;
  localparam int unsigned RESTART_BITS = 20;
  localparam int unsigned MAIN_SAMPLES = 120;

  int checks = 0, failures = 0;
  logic rst_n, smpl_clk;
  logic [L-1:0] raw_bits, rnd_word;
  logic rnd_valid;

  trng_top u_top (.rst_n, .smpl_clk, .raw_bits, .rnd_word, .rnd_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    smpl_clk = 1'b0;
    forever #(SMPL_HALF_PS) smpl_clk = ~smpl_clk;
  end

  // ---------------- ring and sampler observation ------------------------
  // Polled every 37 ps at half-picosecond offsets, so that a poll never
  // falls on the same instant as a ring edge (the rings move on whole ps).
  bit observe = 0;
  int unsigned edges_a = 0, edges_b = 0, bad_tokens = 0, s0_rises = 0;
  int unsigned c0_toggles = 0, c0_bad = 0;
  logic [L-1:0] pa, pb, ps0, pc0;
  initial begin
    #0.5;
    forever begin
      #37;
      if (observe) begin
        logic [L-1:0] a, bb, s0n, c0n;
        a = u_top.s_a;
        bb = u_top.s_b;
        s0n = u_top.s0;
        c0n = u_top.c0;
        if (!pa[0] && a[0]) edges_a++;
        if (!pb[0] && bb[0]) edges_b++;
        if (str_token_count(64'(a), L) != STR_TOKENS_DEFAULT) bad_tokens++;
        if (str_token_count(64'(bb), L) != STR_TOKENS_DEFAULT) bad_tokens++;
        for (int i = 0; i < L; i++) begin
          if (!ps0[i] && s0n[i]) s0_rises++;
          if (pc0[i] != c0n[i]) c0_toggles++;
          // c0 may only change with a rising edge of S_Bi, and then only
          // if s0 was high before that edge.
          if (pc0[i] != c0n[i] && !(!pb[i] && bb[i] && ps0[i])) c0_bad++;
          if (!pb[i] && bb[i] && (c0n[i] != (pc0[i] ^ ps0[i]))) c0_bad++;
        end
        pa = a; pb = bb; ps0 = s0n; pc0 = c0n;
      end
    end
  end

  // ---------------- sampling-clock side --------------------------------
  logic [L-1:0] c0_at_edge, raw_prev, raw_prev2;
  int unsigned words = 0, cycles = 0, since_valid = 0;
  logic [L-1:0] ones_seen, zeros_seen;
  bit track = 0;
  always @(posedge smpl_clk) if (track) begin
    logic [L-1:0] c0_now;
    c0_now = u_top.c0;
    #10;
    cycles++;
    check(raw_bits == c0_at_edge, "raw bits are c0 of the previous sampling edge");
    ones_seen |= raw_bits;
    zeros_seen |= ~raw_bits;
    if (rnd_valid) begin
      words++;
      check(since_valid == 1 || words == 1, "one word every second cycle");
      check(rnd_word == (raw_prev ^ raw_prev2), "filtered word is XOR of the two previous raw words");
      since_valid = 0;
    end else begin
      since_valid++;
    end
    raw_prev2 = raw_prev;
    raw_prev = raw_bits;
    c0_at_edge = c0_now;
  end

  // ---------------- stimulus ------------------------------------------
  logic [L-1:0] restart_trace[RESTARTS][RESTART_BITS];
  int unsigned reloads = 0;

  task automatic do_reset();
    track = 0;
    observe = 0;
    // Assert reset in the middle of a low phase of smpl_clk.
    @(negedge smpl_clk);
    rst_n = 1'b0;
    #20000;
    check(u_top.s_a == 8'b0000_1010 && u_top.s_b == 8'b0000_1010,
          "reset loads 01010000 into both rings");
    check(raw_bits == '0 && !rnd_valid, "reset clears samplers and filter");
    if (u_top.s_a == 8'b0000_1010) reloads++;
    pa = u_top.s_a; pb = u_top.s_b; ps0 = '0; pc0 = '0;
    c0_at_edge = '0;
    raw_prev = '0;
    raw_prev2 = '0;
    since_valid = 0;
    words = 0;
    rst_n = 1'b1;
    observe = 1;
    track = 1;
  endtask

  initial begin
    rst_n = 1'b1;  // start high so that the reset below is an edge
    #1;
    rst_n = 1'b0;
    ones_seen = '0;
    zeros_seen = '0;
    // Restart experiment.
    for (int r = 0; r < RESTARTS; r++) begin
      do_reset();
      for (int k = 0; k < RESTART_BITS; k++) begin
        @(posedge smpl_clk);
        #20;
        restart_trace[r][k] = raw_bits;
      end
    end
    begin
      int unsigned differ = 0;
      for (int r = 0; r < RESTARTS; r++)
        for (int q = r + 1; q < RESTARTS; q++) begin
          bit same = 1;
          for (int k = 0; k < RESTART_BITS; k++)
            if (restart_trace[r][k] != restart_trace[q][k]) same = 0;
          check(!same, "restart: sequences after identical resets differ");
          if (!same) differ++;
        end
      $display("restart: %0d of %0d sequence pairs differ", differ, RESTARTS * (RESTARTS - 1) / 2);
    end
    // Main run with frequency and throughput measurements.
    do_reset();
    #100000;
    edges_a = 0; edges_b = 0; s0_rises = 0;
    cycles = 0;
    words = 0;
    begin
      longint t0;
      real fa, fb, beat;
      t0 = $time;
      repeat (MAIN_SAMPLES) @(posedge smpl_clk);
      #20;
      fa = real'(edges_a) / (real'($time - t0) * 1.0e-12) / 1.0e6;
      fb = real'(edges_b) / (real'($time - t0) * 1.0e-12) / 1.0e6;
      beat = real'(edges_b) * L / real'(s0_rises);
      $display("STR-A %0.1f MHz, STR-B %0.1f MHz, s0 period %0.2f STR-B cycles",
               fa, fb, beat);
      $display("%0d sampling cycles, %0d filtered words, %0d c0 toggles", cycles, words, c0_toggles);
      check(fa > 310.0 && fa < 340.0, "STR-A near 326 MHz");
      check(fb > 285.0 && fb < 315.0, "STR-B near 300 MHz");
      check(beat > 9.5 && beat < 14.0, "s0 beat about 11.6 STR-B cycles");
      check(words == MAIN_SAMPLES / 2, "4 Mb/s: 8 bits every 2 sampling cycles");
    end
    check(bad_tokens == 0, "both rings keep 4 tokens");
    check(c0_bad == 0, "c0 toggles only after a high s0, at S_B edges");
    check(ones_seen == '1 && zeros_seen == '1, "every lane gives both bit values");
    // Mechanism counters.
    check(edges_a > 0 && edges_b > 0, "mechanism: ring oscillation");
    check(s0_rises > 0, "mechanism: coherent-sampling beat");
    check(c0_toggles > 0, "mechanism: parity toggle");
    check(words > 0, "mechanism: parity filter word");
    check(reloads == RESTARTS + 1, "mechanism: reset-phase reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
