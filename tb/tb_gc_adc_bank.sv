// tb_gc_adc_bank: end-to-end test of the full-size bank (128 ADCs, 9-bit LFSR
// counters, 9 bus lines, all parameters at their defaults).
// Each conversion: the correction words of all 128 ADCs are shifted in, the
// split n_gc is set, reset is released, and the comparators are modelled
// here: comparator i stays high until the ramp (the gain-phase cycle count)
// reaches the pixel level X[i].  The LFSR results are decoded with a table
// built from an independent LFSR model, and compared with the closed-form
// prediction of gc_ref_pkg.  Conversions run:
//  - the worked example: offset +3 and gain 459/511 with 6 gain lines;
//  - random words and pixel levels with 6 gain lines;
//  - an all-ones word with 1..9 gain lines, whose full-scale result must be
//    the smallest coefficient of each bus width (511 - (2**m - 1))/511,
//    and match the 3-decimal ranges of the bus energy table;
//  - a calibrated imager: gains 0.92..1.0, offsets -6..0 realised with a
//    common counter preset of -7 and 3 offset lines;
//  - 0 gain lines (all 9 lines used for offset).
// It also checks the conversion length (1 + 2**K - 1 + 511 cycles) and that
// every mechanism occurred: offset pulses blocked, gain pulses blocked,
// comparator stop, full-scale run, negative preset, zero gain, split change.
module tb_gc_adc_bank;
  import gc_pkg::*;
  import gc_ref_pkg::*;

  localparam int NADC = 128;
  localparam int M    = 9;
  localparam int N    = 9;
  localparam int C    = 9;
  localparam int FS   = (1 << C) - 1;   // 511

  logic            clk = 1'b0, pclk = 1'b0;
  logic            rst;
  logic [3:0]      n_gc;
  logic [C-1:0]    preset;
  logic [NADC-1:0] cmp;
  logic            prog_in, prog_out;
  logic [M-1:0]    bus;
  phase_e          phase;
  logic [C-1:0]    t;
  logic            gain_run, done;
  logic [N-1:0]    dout [NADC];

  gc_adc_bank dut (
    .clk, .rst, .n_gc, .preset, .cmp, .prog_clk(pclk), .prog_in, .prog_out,
    .bus, .phase, .t, .gain_run, .done, .dout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // LFSR decode table, preset state 0 has index 0
  int          idx_of [512];
  logic [15:0] state_at [511];

  longint       xlev [NADC];
  logic [M-1:0] word [NADC];

  // comparator model
  always_comb
    for (int i = 0; i < NADC; i++)
      cmp[i] = !(phase == PH_GAIN && longint'(t) > xlev[i]);

  // mechanism counters
  int n_off_blocked = 0, n_gain_blocked = 0, n_cmp_stop = 0, n_full = 0;
  int n_neg_preset = 0, n_zero_gain = 0, n_splits = 0;
  int last_split = -1;

  task automatic program_all();
    for (int i = NADC - 1; i >= 0; i--)
      for (int b = 0; b < M; b++) begin
        prog_in = word[i][b];
        #1 pclk = 1'b1;
        #1 pclk = 1'b0;
      end
  endtask

  // run one conversion; pre is the preset as a signed count
  task automatic convert(input int ngc, input int pre, input string tag);
    int     cyc, koff;
    longint e, got;
    program_all();
    n_gc   = 4'(ngc);
    preset = state_at[(pre % FS + FS) % FS][C-1:0];
    rst    = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
      if (cyc > 2000) break;
    end
    koff = M - ngc;
    check(cyc == 1 + ((1 << koff) - 1) + FS + 1,
          $sformatf("%s conversion length %0d", tag, cyc));
    repeat (2) @(posedge clk);
    #1;
    if (ngc != last_split) n_splits++;
    last_split = ngc;
    if (pre < 0) n_neg_preset++;
    for (int i = 0; i < NADC; i++) begin
      e   = exp_count(longint'(word[i]), M, ngc, C, xlev[i]) + pre;
      e   = ((e % FS) + FS) % FS;
      got = idx_of[dout[i]];
      check(got == e, $sformatf("%s adc %0d got %0d expected %0d (word %b X %0d)",
                                tag, i, got, e, word[i], xlev[i]));
      if (koff > 0 && ((word[i] >> ngc) != 0)) n_off_blocked++;
      if ((word[i] & M'((1 << ngc) - 1)) != 0) n_gain_blocked++;
      if (xlev[i] < FS) n_cmp_stop++; else n_full++;
      if (ngc == M && word[i] == '1 && xlev[i] >= FS) begin
        check(got == 0, "zero gain");
        n_zero_gain++;
      end
    end
  endtask

  // bus energy table: smallest coefficient (x1000, 3 decimals) per gain-line count
  int table_min [10] = '{1000, 998, 994, 986, 971, 939, 877, 751, 501, 0};

  initial begin
    logic [15:0] s;
    int          og, oo;
    rst = 1'b1; n_gc = 4'd6; preset = '0; prog_in = 1'b0;
    foreach (idx_of[i]) idx_of[i] = -1;
    s = 16'd0;
    for (int i = 0; i < FS; i++) begin
      state_at[i] = s;
      idx_of[s[8:0]] = i;
      s = lfsr_next(s, 9);
    end
    check(s == 16'd0, "reference LFSR period");

    // worked example and random levels, 6 gain lines
    for (int i = 0; i < NADC; i++) begin
      word[i] = M'($urandom);
      xlev[i] = $urandom_range(600);
    end
    word[0] = {3'(7 - 3), 6'(FS - 459)};   // offset +3, gain 459/511
    xlev[0] = FS;
    xlev[1] = 0;
    convert(6, 0, "example");
    check(idx_of[dout[0]] == 3 + 459, "worked example result 462");

    // bus widths 1..9 with an all-ones word at full scale
    for (int m = 1; m <= M; m++) begin
      for (int i = 0; i < NADC; i++) begin
        word[i] = (i % 4 == 0) ? '1 : M'($urandom);
        xlev[i] = (i % 2 == 0) ? FS : $urandom_range(FS + 20);
      end
      convert(m, 0, $sformatf("lines%0d", m));
      // all offset lines blocked too, so the offset contributes 0
      check(idx_of[dout[0]] == FS - ((1 << m) - 1),
            $sformatf("minimum coefficient for %0d lines", m));
      check(((idx_of[dout[0]] * 1000 + FS / 2) / FS) == table_min[m],
            $sformatf("table range for %0d lines: %0d/511", m, idx_of[dout[0]]));
    end

    // calibrated imager: gain 0.92..1, offset -6..0, preset -7
    for (int i = 0; i < NADC; i++) begin
      og = $urandom_range(FS, 470);
      oo = -$urandom_range(6);
      word[i] = {3'(-oo), 6'(FS - og)};
      xlev[i] = FS;
    end
    convert(6, -7, "calibrated");
    for (int i = 0; i < NADC; i++) begin
      check(idx_of[dout[i]] == (FS - int'(word[i][5:0])) - int'(word[i][8:6]),
            $sformatf("calibrated adc %0d", i));
    end

    // all lines for offset
    for (int i = 0; i < NADC; i++) begin
      word[i] = M'($urandom);
      xlev[i] = $urandom_range(FS);
    end
    convert(0, 0, "offset-only");

    check(n_off_blocked > 0,  "mechanism: offset pulses blocked");
    check(n_gain_blocked > 0, "mechanism: gain pulses blocked");
    check(n_cmp_stop > 0,     "mechanism: comparator stop");
    check(n_full > 0,         "mechanism: full-scale conversion");
    check(n_neg_preset > 0,   "mechanism: negative preset");
    check(n_zero_gain > 0,    "mechanism: zero gain");
    check(n_splits >= 3,      "mechanism: bus split changed");
    $display("mechanisms: offset_blocked=%0d gain_blocked=%0d cmp_stop=%0d full_scale=%0d neg_preset=%0d zero_gain=%0d splits=%0d",
             n_off_blocked, n_gain_blocked, n_cmp_stop, n_full, n_neg_preset, n_zero_gain, n_splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
