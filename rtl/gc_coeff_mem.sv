// gc_coeff_mem: per-ADC correction memory MEM_0..MEM_{M-1}.
//
// As in the published circuit the memory is a shift register clocked by its
// own programming clock.  Bit mem[k] enables bus line b_k to stop the
// counter's clock.  The lines split into gain lines (low indices) and offset
// lines (high indices); the split is set in the pulse generator, the memory
// itself does not know it.
// Serial interface (this design's choice): on each rising edge of prog_clk
// the word shifts one place towards bit 0, `sin` enters at bit M-1 and bit 0
// leaves on `sout`, so the memories of all ADCs form one daisy chain.  A word
// is therefore shifted in LSB first.  The memory is not reset: it keeps its
// coefficients across conversions (the conversion reset only clears the
// counters).
module gc_coeff_mem #(
  parameter int unsigned M = 9
) (
  input  logic         prog_clk,
  input  logic         sin,
  output logic         sout,
  output logic [M-1:0] mem
);

  always_ff @(posedge prog_clk) begin
    mem[M-1] <= sin;
    for (int k = 0; k < int'(M) - 1; k++)
      mem[k] <= mem[k+1];
  end

  assign sout = mem[0];

endmodule
