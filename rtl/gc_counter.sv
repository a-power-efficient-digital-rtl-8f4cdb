// gc_counter: conversion counter of one slope ADC.
//
// The counter advances by one state on every clock edge at which `en` is
// high; `en` is the output of the G1 gate, so a blocked clock pulse is simply
// a cycle without an advance.  The final state is the A/D result.
//  - CODE = CNT_LFSR: W-bit maximal-length XNOR LFSR (2**W - 1 states), the
//    counter type of the fabricated imager.  Its polynomial is this design's
//    choice (see gc_pkg::lfsr_taps).  The all-ones state is the lock-up state
//    of an XNOR LFSR and must not be used as preset.
//  - CODE = CNT_BINARY: W-bit binary up-counter, wrapping modulo 2**W.
// `rst` (synchronous, active high) loads `preset`, the common starting value
// shared by all ADCs of the bank; a preset below zero gives a negative offset.
// The preset input and the synchronous reset are this design's choices.
// Timing: q changes one clock after en is seen high.
module gc_counter
  import gc_pkg::*;
#(
  parameter int unsigned W    = 9,
  parameter cnt_code_e   CODE = CNT_LFSR
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] preset,
  input  logic         en,
  output logic [W-1:0] q
);

  localparam logic [31:0] TAPS = lfsr_taps(W);

  if (CODE == CNT_LFSR && TAPS == 32'h0) begin : g_bad_width
    $error("gc_counter: no LFSR polynomial for this width");
  end

  logic [W-1:0] q_next;

  always_comb begin
    if (CODE == CNT_LFSR)
      q_next = {q[W-2:0], ~^(q & TAPS[W-1:0])};
    else
      q_next = q + W'(1);
  end

  always_ff @(posedge clk) begin
    if (rst)
      q <= preset;
    else if (en)
      q <= q_next;
  end

endmodule
