// tb_gc_pulse_generator: checks the bus pulse generator for M = 9 with a
// 9-bit counter (C = 9) and with two extra LSB flip-flops (C = 11), for
// several splits of the bus between gain and offset lines.
// Per conversion it checks: the offset phase lasts 2**K - 1 cycles and the
// gain phase 2**C - 1 cycles; gain line k pulses 2**k times, evenly spaced by
// 2**(C-k) cycles; offset line n_gc+j pulses 2**j times, evenly spaced; no
// line is high outside its phase; at most one line is high per cycle; and
// the number of unblocked cycles seen for a random memory word equals the
// closed-form prediction of gc_ref_pkg.
module tb_gc_pulse_generator;
  import gc_pkg::*;
  import gc_ref_pkg::*;

  localparam int M = 9;
  logic       clk = 1'b0;
  logic       rst;
  logic [3:0] n_gc;
  int         checks = 0, failures = 0;
  bit         done_all [2];
  logic [M-1:0] mem_w;

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  for (genvar g = 0; g < 2; g++) begin : g_inst
    localparam int C = 9 + 2 * g;
    logic [M-1:0] bus;
    phase_e       phase;
    logic [C-1:0] t;
    logic         active, gain_run, done;

    gc_pulse_generator #(.M(M), .C(C)) dut (
      .clk, .rst, .n_gc, .bus, .phase, .t, .active, .gain_run, .done);

    int     len_off, len_gain, unblocked;
    int     cnt_off [M];
    int     cnt_gain[M];
    longint last [M];
    longint spacing [M];
    bit     even [M];
    longint cyc;

    always @(posedge clk) begin
      if (rst) begin
        len_off = 0; len_gain = 0; unblocked = 0; cyc = 0;
        for (int k = 0; k < M; k++) begin
          cnt_off[k] = 0; cnt_gain[k] = 0; last[k] = -1; spacing[k] = -1; even[k] = 1'b1;
        end
      end else begin
        cyc++;
        if ($countones(bus) > 1) check(1'b0, $sformatf("C=%0d two lines high", C));
        if (phase == PH_OFFSET) len_off++;
        if (phase == PH_GAIN)   len_gain++;
        if (active && (bus & mem_w) == '0) unblocked++;
        if (!active && bus != '0) check(1'b0, $sformatf("C=%0d bus high while idle", C));
        for (int k = 0; k < M; k++) begin
          if (bus[k]) begin
            if (phase == PH_OFFSET) cnt_off[k]++;
            if (phase == PH_GAIN)   cnt_gain[k]++;
            if (last[k] >= 0) begin
              if (spacing[k] < 0) spacing[k] = cyc - last[k];
              else if (spacing[k] != cyc - last[k]) even[k] = 1'b0;
            end
            last[k] = cyc;
          end
        end
      end
    end

    task automatic evaluate(input int ngc);
      int koff;
      koff = M - ngc;
      check(len_off == (1 << koff) - 1, $sformatf("C=%0d ngc=%0d offset length %0d", C, ngc, len_off));
      check(len_gain == (1 << C) - 1, $sformatf("C=%0d ngc=%0d gain length %0d", C, ngc, len_gain));
      for (int k = 0; k < M; k++) begin
        if (k < ngc) begin
          check(cnt_gain[k] == (1 << k) && cnt_off[k] == 0,
                $sformatf("C=%0d ngc=%0d gain line %0d pulses %0d/%0d", C, ngc, k, cnt_gain[k], cnt_off[k]));
          if (k > 0)
            check(even[k] && spacing[k] == (1 << (C - k)),
                  $sformatf("C=%0d gain line %0d spacing %0d", C, k, spacing[k]));
        end else begin
          check(cnt_off[k] == (1 << (k - ngc)) && cnt_gain[k] == 0,
                $sformatf("C=%0d ngc=%0d offset line %0d pulses %0d/%0d", C, ngc, k, cnt_off[k], cnt_gain[k]));
          if (k - ngc > 0)
            check(even[k] && spacing[k] == (1 << (koff - (k - ngc))),
                  $sformatf("C=%0d offset line %0d spacing %0d", C, k, spacing[k]));
        end
      end
      check(longint'(unblocked) == exp_count(longint'(mem_w), M, ngc, C, (longint'(1) << C) - 1),
            $sformatf("C=%0d ngc=%0d unblocked %0d", C, ngc, unblocked));
      check(done, $sformatf("C=%0d done", C));
    endtask
  end

  int splits [6] = '{6, 0, 9, 3, 1, 8};

  initial begin
    rst = 1'b1; n_gc = 4'd6; mem_w = '0;
    foreach (splits[s]) begin
      rst = 1'b1;
      n_gc = 4'(splits[s]);
      mem_w = M'($urandom);
      repeat (2) @(posedge clk);
      @(negedge clk) rst = 1'b0;
      // longest run: offset 511 + gain 2047 + start
      repeat (2700) @(posedge clk);
      @(negedge clk);
      g_inst[0].evaluate(splits[s]);
      g_inst[1].evaluate(splits[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
