// tb_str_stage - self-checking testbench of one self-timed ring stage.
//
// Walks the stage through all four (F, R) combinations from both output
// values and checks the truth table: C follows F when F != R and holds when
// F == R. With zero jitter the change must appear exactly DELAY_PS after
// the inputs; a second instance with jitter must change within
// DELAY_PS +/- 4*JITTER_PS. A third instance checks the Charlie term: the
// delay grows as the F and R events come closer. Reset must force INIT.
`timescale 1ps/1ps
module tb_str_stage;

  localparam int unsigned D = 500;
  localparam int unsigned J = 20;

  int checks = 0, failures = 0;
  logic rst_n, f, r, c, cj;

  localparam int unsigned CH = 100;
  logic fc, rc, cc;

  str_stage #(.DELAY_PS(D), .JITTER_PS(0), .CHARLIE_PS(0), .INIT(1'b1)) u_dut   (.rst_n(rst_n), .f(f), .r(r), .c(c));
  str_stage #(.DELAY_PS(D), .JITTER_PS(J), .CHARLIE_PS(0), .INIT(1'b0)) u_dut_j (.rst_n(rst_n), .f(f), .r(r), .c(cj));
  str_stage #(.DELAY_PS(D), .JITTER_PS(0), .CHARLIE_PS(CH), .INIT(1'b0)) u_dut_c (.rst_n(rst_n), .f(fc), .r(rc), .c(cc));

  // Time from an input change until cc follows, in ps.
  task automatic charlie_delay(input logic nf, input logic nr, input int unsigned sep,
                               output longint dly);
    longint t0;
    // Start from F = ~nf, R = nf (output ~nf), so that both inputs change.
    fc = ~nf;
    rc = nf;
    #(3 * D);
    rc = nr;            // R event first, F event sep ps later
    #(sep);
    fc = nf;
    t0 = $time;
    dly = -1;
    for (int k = 0; k < 2 * D; k++) begin
      #1;
      if (cc == nf) begin dly = $time - t0; break; end
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected next output of the stage (truth table).
  function automatic logic expect_c(logic fi, logic ri, logic prev);
    return (fi != ri) ? fi : prev;
  endfunction

  longint t_change, t_apply;
  // Time of the last output change of the jittered stage, sampled every ps.
  logic cj_seen;
  initial begin
    cj_seen = 1'b0;
    forever begin
      #1;
      if (cj != cj_seen) t_change = $time;
      cj_seen = cj;
    end
  end

  initial begin
    f = 1'b0; r = 1'b0; fc = 1'b0; rc = 1'b0; rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    #1000;
    check(c == 1'b1, "reset forces INIT=1");
    check(cj == 1'b0, "reset forces INIT=0");
    // Changes of F/R while in reset must not move the output.
    f = 1'b0; r = 1'b1;
    #(2 * D);
    check(c == 1'b1, "output held in reset");
    f = 1'b0; r = 1'b0;
    #100;
    rst_n = 1'b1;
    #(2 * D);
    check(c == 1'b1, "F == R holds 1");
    // Go through random input sequences and compare with the truth table.
    for (int n = 0; n < 200; n++) begin
      logic nf, nr, want, want_j, old, old_j;
      nf = 1'($urandom_range(1, 0));
      nr = 1'($urandom_range(1, 0));
      old = c;
      old_j = cj;
      want = expect_c(nf, nr, old);
      want_j = expect_c(nf, nr, old_j);
      f = nf;
      r = nr;
      t_change = -1;
      t_apply = $time;
      #(D - 1);
      check(c == old, "no change before DELAY_PS");
      #2;
      check(c == want, "truth table after DELAY_PS");
      #(4 * J + 2);
      check(cj == want_j, "truth table, jittered stage");
      if (want_j != old_j)
        check(t_change - t_apply >= D - 4 * J && t_change - t_apply <= D + 4 * J,
              $sformatf("jittered delay within DELAY_PS +/- 4*JITTER_PS (%0d %0d)", t_change, t_apply));
    end
    // Pulse shorter than the delay on F: once enabled the stage still
    // fires when F != R at the end of the delay.
    f = 1'b1; r = 1'b0;
    #(3 * D);
    check(c == 1'b1, "F=1 R=0 gives 1");
    f = 1'b0; r = 1'b1;
    #(3 * D);
    check(c == 1'b0, "F=0 R=1 gives 0");
    f = 1'b1; r = 1'b1;
    #(3 * D);
    check(c == 1'b0, "F=1 R=1 holds 0");
    // Charlie effect: simultaneous F and R events give D + CH; events s ps
    // apart give D + floor(sqrt(CH^2 + (s/2)^2)) - s/2, and exactly D once
    // s/2 exceeds 4*CH.
    begin
      longint d0, d1, d2;
      charlie_delay(1'b1, 1'b0, 0, d0);      // cc 0 -> 1
      #(2 * D);
      charlie_delay(1'b0, 1'b1, 1000, d1);   // cc 1 -> 0, events 1000 ps apart
      #(2 * D);
      charlie_delay(1'b1, 1'b0, 200, d2);    // cc 0 -> 1, events 200 ps apart
      $display("Charlie: %0d ps at s=0, %0d ps at s=200, %0d ps at s=1000", d0, d2, d1);
      check(d0 == D + CH, "Charlie: simultaneous events add CHARLIE_PS");
      check(d1 == D, "Charlie: events 1000 ps apart add nothing");
      check(d2 == D + 41, "Charlie: events 200 ps apart add 41 ps");
    end
    rst_n = 1'b0;
    #10;
    check(c == 1'b1, "reset again forces INIT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
