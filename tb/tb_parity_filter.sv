// tb_parity_filter - self-checking testbench of the parity filter.
//
// Runs the default second-order, 8-lane filter and a third-order one on the
// same random raw bits. A reference keeps every input word since reset;
// whenever valid is high the output must be the XOR of the last ORDER input
// words, and valid must rise exactly once every ORDER clock cycles (8 bits
// every 2 cycles for ORDER = 2). A first-order filter must pass the raw bits
// through with one cycle of delay.
`timescale 1ps/1ps
module tb_parity_filter;

  localparam int unsigned L = 8;

  int checks = 0, failures = 0;
  logic clk, rst_n;
  logic [L-1:0] din;
  logic [L-1:0] dout2, dout3, dout1;
  logic valid2, valid3, valid1;

  parity_filter                   u_pf2 (.clk, .rst_n, .din, .dout(dout2), .valid(valid2));
  parity_filter #(.L(L), .ORDER(3)) u_pf3 (.clk, .rst_n, .din, .dout(dout3), .valid(valid3));
  parity_filter #(.L(L), .ORDER(1)) u_pf1 (.clk, .rst_n, .din, .dout(dout1), .valid(valid1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [L-1:0] hist[$];
  int unsigned cycle = 0, words2 = 0, words3 = 0;

  initial begin
    rst_n = 1'b1;  // start high so that the reset below is an edge
    #1;
    rst_n = 1'b0;
    din = '0;
    repeat (3) @(posedge clk);
    #1;
    check(!valid2 && !valid3 && !valid1, "no valid word in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      din = L'($urandom());
      @(posedge clk);
      hist.push_back(din);
      cycle++;
      #1;
      // After n+1 inputs: ORDER=2 groups end on even counts, ORDER=3 on multiples of 3.
      check(valid2 == (cycle % 2 == 0), "order 2: valid every 2 cycles");
      check(valid3 == (cycle % 3 == 0), "order 3: valid every 3 cycles");
      check(valid1, "order 1: valid every cycle");
      check(dout1 == hist[cycle-1], "order 1: raw bits pass through");
      if (valid2) begin
        words2++;
        check(dout2 == (hist[cycle-1] ^ hist[cycle-2]), "order 2: XOR of 2 bits per lane");
      end
      if (valid3) begin
        words3++;
        check(dout3 == (hist[cycle-1] ^ hist[cycle-2] ^ hist[cycle-3]), "order 3: XOR of 3 bits per lane");
      end
    end
    check(words2 == 300, "order 2: 8 bits every 2 cycles");
    check(words3 == 200, "order 3: 8 bits every 3 cycles");
    rst_n = 1'b0;
    #1;
    check(!valid2 && !valid3, "reset clears valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
