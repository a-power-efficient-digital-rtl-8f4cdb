// tb_gc_linearity: linearity of the gain-corrected conversion, measured on
// the RTL.  For counter widths C = 9 .. 14 a bank of 128 ADCs with all
// C bus lines used for gain (binary counters, the code does not change the
// count) is run with every possible correction word, 128 words per
// conversion.  The comparators never stop, so the counter value after gain
// cycle X is the transfer function f(X) of that coefficient.  From it:
//  - INL(X) = f(X) - X * coeff / (2**C - 1); the maximum over all X and
//    coefficients must be 1.444 LSB (9 bits, first reached at coefficient
//    426/511), 1.667 (10 bits), 1.778 (11 bits, first reached at 1706/2047),
//    2.000 (12 bits), 2.111 (13 bits) and 2.333 (14 bits): it grows by about 1 LSB per 6 bits
//    while the INL relative to full scale falls as the counter widens;
//  - DNL of each output code, (code width) * coeff / (2**C - 1) - 1, must lie
//    in [-0.5, 1.0] and no code below the coefficient may be missing.
// The expected maxima come from an exhaustive evaluation of the
// lowest-set-bit pulse placement.
module tb_gc_linearity;
  import gc_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #900000000;
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

  localparam int NADC = 128;
  real inl_exp [6] = '{1.4442, 1.6667, 1.7777, 2.0000, 2.1111, 2.3333};
  real rel [6];

  for (genvar g = 0; g < 6; g++) begin : g_w
    localparam int C  = 9 + g;
    localparam int FS = (1 << C) - 1;
    localparam int SW = $clog2(C + 1);
    logic            rst = 1'b1, pclk = 1'b0, pin = 1'b0, pout;
    logic [NADC-1:0] cmp = '1;
    logic [C-1:0]    bus, t;
    phase_e          phase;
    logic            gain_run, done;
    logic [C-1:0]    dout [NADC];

    gc_adc_bank #(.NADC(NADC), .M(C), .N(C), .E(0), .CODE(CNT_BINARY)) dut (
      .clk, .rst, .n_gc(SW'(C)), .preset('0), .cmp, .prog_clk(pclk), .prog_in(pin),
      .prog_out(pout), .bus, .phase, .t, .gain_run, .done, .dout);

    int hist [NADC][FS + 4];
    int g_d0 = 0;   // index of the sample taken after gain cycle 0

    task automatic sweep();
      int   base, n, coeff, w, d0;
      real  inl, mx, dmin, dmax, d;
      int   argmx, missing;
      int   width [FS + 1];
      mx = 0.0; argmx = -1; dmin = 9.0; dmax = -9.0; missing = 0;
      for (base = 0; base <= FS; base += NADC) begin
        // word for channel i is base + i; channel NADC-1 is shifted first
        for (int i = NADC - 1; i >= 0; i--)
          for (int b = 0; b < C; b++) begin
            pin = C'(base + i) >> b;
            #1 pclk = 1'b1;
            #1 pclk = 1'b0;
          end
        rst = 1'b1;
        repeat (2) @(posedge clk);
        @(negedge clk) rst = 1'b0;
        n = 0;
        while (n < FS + 4) begin
          @(posedge clk); #1;
          for (int i = 0; i < NADC; i++) hist[i][n] = int'(dout[i]);
          n++;
        end
        // alignment: with the word 0 the count reaches 1 after gain cycle 1
        d0 = -1;
        if (base == 0)
          for (int k = FS + 3; k >= 0; k--) if (hist[0][k] == 1) d0 = k;
        if (base == 0) check(d0 >= 0, $sformatf("C=%0d alignment", C));
        if (base == 0) g_d0 = d0 - 1;
        for (int i = 0; i < NADC && base + i <= FS; i++) begin
          coeff = FS - (base + i);
          for (int x = 0; x <= FS; x++) width[x] = 0;
          for (int x = 0; x <= FS; x++) begin
            inl = real'(hist[i][x + g_d0]) - real'(x) * real'(coeff) / real'(FS);
            if (inl < 0) inl = -inl;
            if (inl > mx + 1e-9) begin mx = inl; argmx = coeff; end
            if (x < FS) width[hist[i][x + g_d0]]++;
          end
          check(hist[i][FS + g_d0] == coeff, $sformatf("C=%0d full scale of coeff %0d", C, coeff));
          for (int c = 0; c < coeff; c++) begin
            if (width[c] == 0) missing++;
            else begin
              d = real'(width[c]) * real'(coeff) / real'(FS) - 1.0;
              if (d < dmin) dmin = d;
              if (d > dmax) dmax = d;
            end
          end
        end
      end
      $display("C=%0d max INL %.3f LSB at coeff %0d/%0d (%.4f %% of full scale), DNL %.3f .. %.3f, missing codes %0d",
               C, mx, argmx, FS, 100.0 * mx / FS, dmin, dmax, missing);
      check(mx > inl_exp[g] - 1e-3 && mx < inl_exp[g] + 1e-3, $sformatf("C=%0d max INL %f", C, mx));
      if (C == 9)  check(argmx == 426,  "maximum INL at 426/511");
      if (C == 11) check(argmx == 1706, "maximum INL at 1706/2047");
      check(dmin >= -0.5 - 1e-9 && dmax <= 1.0 + 1e-9, $sformatf("C=%0d DNL range", C));
      check(missing == 0, $sformatf("C=%0d no missing codes", C));
      rel[g] = mx / FS;
    endtask
  end

  initial begin
    g_w[0].sweep();
    g_w[1].sweep();
    g_w[2].sweep();
    g_w[3].sweep();
    g_w[4].sweep();
    g_w[5].sweep();
    for (int g = 1; g < 6; g++)
      check(rel[g] < rel[g-1], $sformatf("relative INL falls from %0d to %0d bits", 8 + g, 9 + g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
