// gc_clock_stop: clock stopping logic of one ADC (gates G3_k, G2 and the CE
// flip-flop).
//
// Each bus line b_k is ANDed (G3_k) with its memory bit mem[k]; the multi-input
// NOR G2 of all G3 outputs is the clock enable CE.  CE is therefore low, and
// the counter's clock pulse is blocked, in every cycle in which some bus line
// whose memory bit is set is high.  CE is registered on the ADC clock before
// it reaches the G1 gate, as the published schematic shows a flip-flop
// between G2 and G1.
// Own choice: G2 has one extra input, the inverted `active` signal of the
// pulse generator, so that CE is also low outside the correction/conversion
// window; the published chip stops its clock externally instead.
// The published circuit builds G2/G3 in dynamic logic; here they are plain
// static gates.  Timing: ce_q follows bus/mem/active by one clock.  Reset
// (synchronous) clears ce_q.
module gc_clock_stop #(
  parameter int unsigned M = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] bus,
  input  logic [M-1:0] mem,
  input  logic         active,
  output logic         ce_q
);

  logic [M-1:0] g3;
  logic         ce;

  assign g3 = bus & mem;
  assign ce = ~(|g3 | ~active);

  always_ff @(posedge clk) begin
    if (rst)
      ce_q <= 1'b0;
    else
      ce_q <= ce;
  end

endmodule
