// tb_trng_sweep - the TRNG at each sampling frequency it was characterised
// at: 0.5, 1, 5, 10, 25 and 50 MHz. The 50 MHz instance uses a third-order
// parity filter, the others second order, the lowest orders with which the
// output passed the statistical tests at those rates.
//
// Six independent generators run side by side, each with its own sampling
// clock, for 40 us. For each one the testbench checks that a filtered word
// comes every ORDER sampling cycles (throughput f_sampling * 8 / ORDER),
// that it is the XOR of the ORDER raw words before the current one, and,
// where at least 40 raw words are available, that every lane shows both
// bit values.
`timescale 1ps/1ps
module tb_trng_sweep;
  import trng_pkg::*;

  localparam int unsigned L = STR_STAGES_DEFAULT;
  localparam int unsigned N = 6;
  localparam longint HALF_PS[N] = '{1_000_000, 500_000, 100_000, 50_000, 20_000, 10_000};
  localparam int unsigned ORDER[N] = '{2, 2, 2, 2, 2, 3};
  localparam longint RUN_PS = 40_000_000;

  int checks = 0, failures = 0;
  logic rst_n;

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

  int unsigned cycles[N], words[N], bad_words[N], bad_gap[N];
  logic [L-1:0] ones[N], zeros[N];
  bit run = 0;

  for (genvar g = 0; g < N; g++) begin : g_gen
    logic smpl_clk;
    logic [L-1:0] raw_bits, rnd_word;
    logic rnd_valid;
    logic [L-1:0] hist[$];
    int unsigned gap;

    trng_top #(.PF_ORDER(ORDER[g])) u_trng (.rst_n, .smpl_clk, .raw_bits, .rnd_word, .rnd_valid);

    // Raw words seen so far; the word before the first sampling edge is the
    // reset value 0.
    initial begin
      gap = 0;
      hist.push_back('0);
    end

    initial begin
      smpl_clk = 1'b0;
      #(HALF_PS[g] / 2);
      forever #(HALF_PS[g]) smpl_clk = ~smpl_clk;
    end

    always @(posedge smpl_clk) if (run) begin
      #5;
      cycles[g]++;
      ones[g] |= raw_bits;
      zeros[g] |= ~raw_bits;
      if (rnd_valid) begin
        logic [L-1:0] x;
        x = '0;
        // The filter took the raw words present before this edge.
        for (int k = 0; k < ORDER[g]; k++) x ^= hist[hist.size() - 1 - k];
        words[g]++;
        if (rnd_word != x) bad_words[g]++;
        if (gap != ORDER[g] - 1) bad_gap[g]++;
        gap = 0;
      end else begin
        gap++;
      end
      hist.push_back(raw_bits);
    end
  end

  initial begin
    rst_n = 1'b1;  // start high so that the reset below is an edge
    #1;
    rst_n = 1'b0;
    for (int g = 0; g < N; g++) begin
      cycles[g] = 0; words[g] = 0; bad_words[g] = 0; bad_gap[g] = 0;
      ones[g] = '0; zeros[g] = '0;
    end
    #3000;
    rst_n = 1'b1;
    run = 1;
    #(RUN_PS);
    run = 0;
    for (int g = 0; g < N; g++) begin
      real mbps;
      mbps = real'(words[g]) * L / (real'(RUN_PS) * 1.0e-12) / 1.0e6;
      $display("f_sampling %0.1f MHz, order %0d: %0d cycles, %0d words, %0.2f Mb/s",
               1.0e6 / real'(2 * HALF_PS[g]), ORDER[g], cycles[g], words[g], mbps);
      check(words[g] == cycles[g] / ORDER[g], "one word every ORDER sampling cycles");
      check(words[g] > 0, "filter produced words");
      check(bad_words[g] == 0, "filtered word is XOR of ORDER raw words");
      check(bad_gap[g] == 0, "words evenly spaced");
      if (cycles[g] >= 40)
        check(ones[g] == '1 && zeros[g] == '1, "every lane gives both values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
