// gc_adc_channel: digital part of one single-slope ADC with gain and offset
// correction (one "ADCx" box of the bank).
//
// Contents, as in the published schematic: a flip-flop sampling the
// comparator output, the clock stopping logic (G3_k, G2, CE flip-flop, see
// gc_clock_stop), the G1 gate that lets a clock pulse reach the counter only
// when both the comparator flip-flop and CE are high, the conversion counter
// (gc_counter) and the correction memory (gc_coeff_mem).  The comparator and
// the ramp are analog and outside: `cmp` is the comparator output, high while
// the ramp is still below the pixel signal.
// G1 is realised as a synchronous count enable rather than a gated clock
// (own choice, functionally the same count).  Both the comparator sample and
// CE are registered once, so they stay aligned with each other and lag the
// bus by one clock.
// Precise gain correction: the counter has C = N + E flip-flops, the E extra
// ones on the LSB side; with a binary counter the output dout is the top N
// bits.  With an LFSR counter E must be 0 and dout is the LFSR state.
// Interface: clk/rst common to the bank, preset common counter start value,
// bus/active from the pulse generator, prog_clk/prog_in/prog_out the memory
// daisy chain.
module gc_adc_channel
  import gc_pkg::*;
#(
  parameter int unsigned M    = 9,
  parameter int unsigned N    = 9,
  parameter int unsigned E    = 0,
  parameter cnt_code_e   CODE = CNT_LFSR,
  localparam int unsigned C   = N + E
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [C-1:0] preset,
  input  logic [M-1:0] bus,
  input  logic         active,
  input  logic         cmp,
  input  logic         prog_clk,
  input  logic         prog_in,
  output logic         prog_out,
  output logic [M-1:0] mem,
  output logic [C-1:0] count,
  output logic [N-1:0] dout
);

  if (CODE == CNT_LFSR && E != 0) begin : g_bad_code
    $error("gc_adc_channel: extra LSB flip-flops need a binary counter");
  end

  logic cmp_q;
  logic ce_q;
  logic g1_en;

  always_ff @(posedge clk) begin
    if (rst) cmp_q <= 1'b0;
    else     cmp_q <= cmp;
  end

  gc_coeff_mem #(.M(M)) u_mem (
    .prog_clk (prog_clk),
    .sin      (prog_in),
    .sout     (prog_out),
    .mem      (mem)
  );

  gc_clock_stop #(.M(M)) u_stop (
    .clk    (clk),
    .rst    (rst),
    .bus    (bus),
    .mem    (mem),
    .active (active),
    .ce_q   (ce_q)
  );

  assign g1_en = cmp_q & ce_q;

  gc_counter #(.W(C), .CODE(CODE)) u_cnt (
    .clk    (clk),
    .rst    (rst),
    .preset (preset),
    .en     (g1_en),
    .q      (count)
  );

  assign dout = count[C-1:E];

endmodule
