// tb_cs_sampler - self-checking testbench of the coherent-sampling sampler.
//
// The testbench makes its own two jittery clocks: s_a near 326 MHz and s_b
// near 300 MHz, the ring frequencies of the default design. s_a edges fall
// on even picoseconds and s_b edges on odd ones, so no edge pair is
// ambiguous. Independently of the sampler, it counts the s_b rising edges
// at which the previously sampled value of s_a was high; the parity of that
// count present at one smpl_clk rising edge must show up at b right after
// the next one (two flip-flops on smpl_clk). It also checks s0 against s_a, that s0 forms a beat of about
// 11-12 s_b cycles, that b takes both values, and the reset values.
`timescale 1ps/1ps
module tb_cs_sampler;

  int checks = 0, failures = 0;
  logic rst_n, s_a, s_b, smpl_clk;
  logic s0, c0, b;

  cs_sampler u_dut (.rst_n(rst_n), .s_a(s_a), .s_b(s_b), .smpl_clk(smpl_clk),
                    .s0(s0), .c0(c0), .b(b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Jittery clocks: half periods 1534 +/- 2*[0..10] ps (even) and
  // 1666 +/- 2*[0..10] ps (even, started on an odd time).
  initial begin
    s_a = 1'b0;
    forever #(1534 + 2 * $urandom_range(10, 0) - 10) s_a = ~s_a;
  end
  initial begin
    s_b = 1'b0;
    #1;
    forever #(1666 + 2 * $urandom_range(10, 0) - 10) s_b = ~s_b;
  end
  // Sampling clock: 50 MHz here to keep the run short.
  initial begin
    smpl_clk = 1'b0;
    forever #10000 smpl_clk = ~smpl_clk;
  end

  // Reference: count of s_b cycles in which the sampled s_a was high.
  bit prev_sample = 0;
  int unsigned high_cycles = 0, sb_edges = 0, s0_rises = 0;
  bit ref_on = 0;
  always @(posedge s_b) if (ref_on) begin
    if (prev_sample) high_cycles++;
    if (!prev_sample && s_a) s0_rises++;
    prev_sample = s_a;
    sb_edges++;
    #2;
    check(s0 == prev_sample, "s0 is s_a sampled by s_b");
    check(c0 == high_cycles[0], "c0 is the parity of high s0 cycles");
  end

  // Parity present at the previous sampling edge.
  bit par_prev = 0;
  int unsigned ones = 0, zeros = 0, nsamples = 0;
  always @(posedge smpl_clk) if (ref_on) begin
    bit now_par;
    now_par = high_cycles[0];
    #3;
    check(b == par_prev, "b is the parity two sampling edges later");
    if (b) ones++; else zeros++;
    nsamples++;
    // The parity present at this edge must appear on b after the next one.
    par_prev = now_par;
  end

  initial begin
    rst_n = 1'b1;  // start high so that the reset below is an edge
    #1;
    rst_n = 1'b0;
    #25000;
    check(s0 == 0 && c0 == 0 && b == 0, "reset clears the flip-flops");
    // Release reset just after a falling s_b edge and away from smpl_clk.
    @(negedge s_b);
    #5;
    rst_n = 1'b1;
    ref_on = 1;
    #150us;
    $display("s_b edges %0d, s0 rises %0d, b ones %0d zeros %0d", sb_edges, s0_rises, ones, zeros);
    check(s0_rises > 0 && sb_edges / s0_rises >= 10 && sb_edges / s0_rises <= 13,
          "s0 beat of about 11.6 s_b cycles");
    check(ones > nsamples / 5 && zeros > nsamples / 5, "b takes both values");
    rst_n = 1'b0;
    ref_on = 0;
    #10;
    check(s0 == 0 && c0 == 0 && b == 0, "reset clears the flip-flops again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
