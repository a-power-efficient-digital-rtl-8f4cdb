// tb_gc_precise: precise gain correction.  Two small banks (8 ADCs) with
// binary counters and E = 1 and E = 2 extra LSB flip-flops (counter widths
// 10 and 11, all 9 bus lines for gain).  The digital clock is 2**E times the
// ramp clock, so the comparator model advances the ramp every 2**E cycles.
// Checks: full-scale results equal the coefficient numerator
// (2**C - 1) - word, with the smallest coefficient 1 - 2**(9-C) (0.5 for
// E = 1, 1536/2047 = 0.75 for E = 2); the coefficient 1706/2047 from the
// INL measurement; random pixel levels against the closed-form model; and
// that dout drops the E hidden LSBs.
module tb_gc_precise;
  import gc_pkg::*;
  import gc_ref_pkg::*;

  localparam int NADC = 8;
  localparam int M    = 9;
  localparam int N    = 9;

  logic clk = 1'b0, pclk = 1'b0;
  logic rst;
  logic prog_in;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  longint       xlev [2][NADC];
  logic [M-1:0] word [NADC];
  logic [1:0]   prog_out;
  logic [1:0]   done_v;

  for (genvar g = 0; g < 2; g++) begin : g_bank
    localparam int E = g + 1;
    localparam int C = N + E;
    logic [NADC-1:0] cmp;
    logic [M-1:0]    bus;
    phase_e          phase;
    logic [C-1:0]    t;
    logic            gain_run;
    logic [N-1:0]    dout [NADC];
    logic [C-1:0]    cnt  [NADC];

    gc_adc_bank #(.NADC(NADC), .M(M), .N(N), .E(E), .CODE(CNT_BINARY)) dut (
      .clk, .rst, .n_gc(4'd9), .preset('0), .cmp, .prog_clk(pclk), .prog_in,
      .prog_out(prog_out[g]), .bus, .phase, .t, .gain_run, .done(done_v[g]), .dout);

    for (genvar i = 0; i < NADC; i++) begin : g_tap
      assign cnt[i] = dut.g_adc[i].u_adc.count;   // hidden LSBs included
    end

    // ramp advances once per 2**E digital clocks
    always_comb
      for (int i = 0; i < NADC; i++)
        cmp[i] = !(phase == PH_GAIN && ((longint'(t) - 1) >> E) >= xlev[g][i]);

    task automatic evaluate(input string tag);
      longint e;
      for (int i = 0; i < NADC; i++) begin
        e = exp_count(longint'(word[i]), M, M, C, xlev[g][i] << E);
        check(longint'(dout[i]) == (e >> E),
              $sformatf("E=%0d %s adc %0d dout %0d expected %0d", E, tag, i, dout[i], e >> E));
        check(longint'(cnt[i]) == e,
              $sformatf("E=%0d %s adc %0d count", E, tag, i));
      end
    endtask
  end

  task automatic run(input string tag);
    for (int i = NADC - 1; i >= 0; i--)
      for (int b = 0; b < M; b++) begin
        prog_in = word[i][b];
        #1 pclk = 1'b1;
        #1 pclk = 1'b0;
      end
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (done_v == 2'b11);
    repeat (2) @(posedge clk);
    #1;
    g_bank[0].evaluate(tag);
    g_bank[1].evaluate(tag);
  endtask

  initial begin
    rst = 1'b1; prog_in = 1'b0;
    // full scale: extreme and measured coefficients
    for (int i = 0; i < NADC; i++) begin
      word[i] = M'($urandom);
      xlev[0][i] = 1000; xlev[1][i] = 1000;
    end
    word[0] = '1;                 // smallest coefficient
    word[1] = '0;                 // coefficient 1
    word[2] = M'(2047 - 1706);    // 1706/2047 for E = 2
    run("full-scale");
    check(g_bank[1].cnt[0] == 11'd1536, "E=2 minimum 1536/2047");
    check(g_bank[0].cnt[0] == 10'd512,  "E=1 minimum 512/1023");
    check(g_bank[1].cnt[1] == 11'd2047, "E=2 coefficient 1");
    check(g_bank[1].cnt[2] == 11'd1706, "E=2 coefficient 1706/2047");
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < NADC; i++) begin
        word[i] = M'($urandom);
        xlev[0][i] = $urandom_range(520);
        xlev[1][i] = $urandom_range(520);
      end
      run($sformatf("random%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
