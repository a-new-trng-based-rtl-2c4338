// parity_filter - n-th order parity filter, the TRNG's postprocessing.
//
// Each of the L lanes is filtered on its own: ORDER consecutive raw bits of
// a lane are XORed together into one output bit. This reduces bias at the
// cost of dividing the throughput by ORDER. Each lane keeps its last ORDER
// bits in a shift register (ORDER*L flip-flops in all) and a modulo-ORDER
// counter marks the end of each group. ORDER = 2 is the order the design
// uses with a 1 MHz sampling clock (3 is needed at 50 MHz); ORDER = 1 passes
// the raw bits through one register.
//
// Interface and timing: din is taken on every rising clk edge. After every
// ORDER-th bit, valid is high for one cycle and dout holds the XOR of the
// group's ORDER bits of each lane; with ORDER = 2 an L-bit word comes every
// two cycles. dout is only meaningful while valid is high. The counter and
// the asynchronous active-low reset are this design's own choices.
`timescale 1ps/1ps
module parity_filter
  import trng_pkg::*;
#(
  parameter int unsigned L     = STR_STAGES_DEFAULT,
  parameter int unsigned ORDER = PF_ORDER_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] din,    // raw bits, one per lane
  output logic [L-1:0] dout,   // filtered bits
  output logic         valid   // dout holds a complete group
);

  localparam int unsigned CW = (ORDER > 1) ? $clog2(ORDER) : 1;

  logic [ORDER-1:0][L-1:0] hist_q;  // hist_q[0] is the newest bit
  logic [CW-1:0]           cnt_q;   // bits already taken in this group
  logic                    valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q  <= '0;
      cnt_q   <= '0;
      valid_q <= 1'b0;
    end else begin
      hist_q[0] <= din;
      for (int unsigned k = 1; k < ORDER; k++)
        hist_q[k] <= hist_q[k-1];
      if (cnt_q == CW'(ORDER - 1)) begin
        cnt_q   <= '0;
        valid_q <= 1'b1;
      end else begin
        cnt_q   <= cnt_q + 1'b1;
        valid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    dout = '0;
    for (int unsigned k = 0; k < ORDER; k++)
      dout ^= hist_q[k];
  end

  assign valid = valid_q;

  initial assert (ORDER >= 1) else $error("parity_filter: ORDER must be at least 1");

endmodule
