// gc_pulse_generator: the bus pulse generator shared by all ADCs of a bank.
//
// After reset it spends one idle cycle (PH_START) in which it latches the
// split of the M bus lines: the lowest n_gc lines serve gain correction, the
// remaining K = M - n_gc lines serve offset correction.  Then:
//  - PH_OFFSET, 2**K - 1 cycles (skipped when K = 0).  With t = 1 .. 2**K-1,
//    offset line n_gc+j is high when the lowest set bit of t is K-1-j, so it
//    is high in exactly 2**j of these cycles and never together with another
//    line.  An ADC therefore counts (2**K - 1) - mem[M-1:n_gc] pulses here:
//    the offset is stored as its complement.
//  - PH_GAIN, 2**C - 1 cycles, C = N + E the counter width.  This phase starts
//    with the ramp (gain_run goes high).  With t = 1 .. 2**C-1, gain line k
//    (k < n_gc) is high when the lowest set bit of t is C-1-k, i.e. in 2**k
//    cycles spread evenly over the conversion (binary rate multiplier
//    pattern).  At full scale an ADC counts (2**C - 1) - mem[n_gc-1:0]
//    pulses, a gain of ((2**C-1) - mem)/(2**C-1) with step 2**-C.
//  - PH_DONE: all lines low, active low, until the next reset.
// The phases, the 0..2**K-1 offset range, the configurable split and the
// 2**C-1 denominator follow the published technique; the exact pulse
// placement (lowest-set-bit decode), the idle start cycle and the done phase
// are this design's choices.  Bus, phase and t are decoded from registers
// (no combinational path from inputs).  n_gc above M is treated as M.
module gc_pulse_generator
  import gc_pkg::*;
#(
  parameter int unsigned M = 9,          // bus width (memory bits per ADC)
  parameter int unsigned C = 9,          // conversion counter width N + E
  localparam int unsigned SW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] n_gc,      // number of gain-correction lines
  output logic [M-1:0]  bus,
  output phase_e        phase,
  output logic [C-1:0]  t,         // cycle index inside the current phase
  output logic          active,    // counters may count (offset or gain phase)
  output logic          gain_run,  // ramp running, gain correction phase
  output logic          done
);

  if (C < M) begin : g_bad_width
    $error("gc_pulse_generator: counter width C must be >= bus width M");
  end

  logic [SW-1:0] ngc_q;       // latched number of gain lines
  logic [SW-1:0] k_off;       // number of offset lines
  logic [C-1:0]  off_last;    // 2**K - 1
  logic [C-1:0]  lsb_idx;     // index of the lowest set bit of t

  assign k_off    = SW'(M) - ngc_q;
  assign off_last = C'((C'(1) << k_off) - C'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_START;
      t     <= '0;
      ngc_q <= '0;
    end else begin
      unique case (phase)
        PH_START: begin
          ngc_q <= (n_gc > SW'(M)) ? SW'(M) : n_gc;
          phase <= ((n_gc > SW'(M)) || (n_gc == SW'(M))) ? PH_GAIN : PH_OFFSET;
          t     <= C'(1);
        end
        PH_OFFSET: begin
          if (t == off_last) begin
            phase <= PH_GAIN;
            t     <= C'(1);
          end else begin
            t <= t + C'(1);
          end
        end
        PH_GAIN: begin
          if (t == '1) begin
            phase <= PH_DONE;
            t     <= '0;
          end else begin
            t <= t + C'(1);
          end
        end
        default: ;  // PH_DONE: wait for reset
      endcase
    end
  end

  // lowest set bit of t (t is never zero inside the offset and gain phases)
  always_comb begin
    lsb_idx = '0;
    for (int i = C - 1; i >= 0; i--)
      if (t[i]) lsb_idx = C'(i);
  end

  always_comb begin
    bus = '0;
    for (int k = 0; k < M; k++) begin
      if (phase == PH_GAIN && k < int'(ngc_q))
        bus[k] = (lsb_idx == C'(C - 1 - k));
      else if (phase == PH_OFFSET && k >= int'(ngc_q))
        bus[k] = (lsb_idx == C'(int'(k_off) - 1 - (k - int'(ngc_q))));
    end
  end

  assign active   = (phase == PH_OFFSET) || (phase == PH_GAIN);
  assign gain_run = (phase == PH_GAIN);
  assign done     = (phase == PH_DONE);

  // Bus rule: at most one line is high in any cycle, so every blocked clock
  // pulse is charged to exactly one memory bit.
  a_bus_onehot0 : assert property (@(posedge clk) disable iff (rst) $onehot0(bus))
    else $error("gc_pulse_generator: more than one bus line high");

endmodule
