// gc_adc_bank: top level, a bank of NADC synchronous single-slope ADCs with
// one shared bus pulse generator for gain and offset correction.
//
// All ADCs share clock, reset, the counter preset and the M-line bus.  Each
// ADC has its own M-bit correction memory; the memories are chained into one
// shift register (prog_in enters ADC 0's memory, ADC i's output feeds ADC
// i+1, prog_out leaves ADC NADC-1), clocked by prog_clk.  Shifting a stream
// of NADC*M bits therefore leaves the last M bits shifted in, LSB first, in
// ADC 0.  A conversion starts when rst is released: one idle cycle, the
// offset sequence (2**(M-n_gc) - 1 cycles), then the gain phase with the
// ramp (2**(N+E) - 1 cycles, gain_run high; the external ramp DAC starts with
// it), then done.  cmp[i] is the comparator output of ADC i (high while the
// ramp is below the pixel signal); comparators, ramp DAC and photo-sensors
// are analog and outside this module.  dout[i] is valid once done is high.
// Defaults follow the fabricated 128-pixel imager: 128 ADCs, 9-bit LFSR
// counters, 9 bus lines / memory bits.  E > 0 (with CODE = CNT_BINARY) gives
// the precise gain correction variant: counters and the digital clock are
// 2**E times finer than the ramp.
module gc_adc_bank
  import gc_pkg::*;
#(
  parameter int unsigned NADC = 128,
  parameter int unsigned M    = 9,
  parameter int unsigned N    = 9,
  parameter int unsigned E    = 0,
  parameter cnt_code_e   CODE = CNT_LFSR,
  localparam int unsigned C   = N + E,
  localparam int unsigned SW  = $clog2(M + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SW-1:0]       n_gc,
  input  logic [C-1:0]        preset,
  input  logic [NADC-1:0]     cmp,
  input  logic                prog_clk,
  input  logic                prog_in,
  output logic                prog_out,
  output logic [M-1:0]        bus,
  output phase_e              phase,
  output logic [C-1:0]        t,
  output logic                gain_run,
  output logic                done,
  output logic [N-1:0]        dout [NADC]
);

  logic            active;
  logic [NADC:0]   chain;
  logic [M-1:0]    mem_unused   [NADC];
  logic [C-1:0]    count_unused [NADC];

  gc_pulse_generator #(.M(M), .C(C)) u_gen (
    .clk      (clk),
    .rst      (rst),
    .n_gc     (n_gc),
    .bus      (bus),
    .phase    (phase),
    .t        (t),
    .active   (active),
    .gain_run (gain_run),
    .done     (done)
  );

  assign chain[0] = prog_in;

  for (genvar i = 0; i < NADC; i++) begin : g_adc
    gc_adc_channel #(.M(M), .N(N), .E(E), .CODE(CODE)) u_adc (
      .clk      (clk),
      .rst      (rst),
      .preset   (preset),
      .bus      (bus),
      .active   (active),
      .cmp      (cmp[i]),
      .prog_clk (prog_clk),
      .prog_in  (chain[i]),
      .prog_out (chain[i+1]),
      .mem      (mem_unused[i]),
      .count    (count_unused[i]),
      .dout     (dout[i])
    );
  end

  assign prog_out = chain[NADC];

endmodule
