// tb_gc_adc_channel: checks one ADC channel in two configurations: the
// default 9-bit LFSR channel and a precise-gain channel (binary counter,
// N = 9, E = 2).  The memories are programmed through the serial chain and
// read back.  The bus, window and comparator are then driven at random
// (bus idle or one line high).  A clock pulse must reach the counter exactly
// when, one clock earlier, the comparator was high, the window was active
// and no high bus line had its memory bit set.  The binary counter is
// checked every cycle against that count (and dout against its top 9 bits),
// the LFSR counter against a reference LFSR stepped the same number of times.
module tb_gc_adc_channel;
  import gc_pkg::*;
  import gc_ref_pkg::*;

  localparam int M = 9;
  logic         clk = 1'b0, pclk = 1'b0;
  logic         rst;
  logic [M-1:0] bus;
  logic         active, cmp;
  logic         pin, pmid, pout;
  logic [M-1:0] mem_l, mem_b;
  logic [8:0]   cnt_l, dout_l, dout_b;
  logic [10:0]  cnt_b;
  logic [M-1:0] w_l, w_b;
  int           checks = 0, failures = 0;

  gc_adc_channel #(.M(M), .N(9), .E(0), .CODE(CNT_LFSR)) dut_l (
    .clk, .rst, .preset(9'd0), .bus, .active, .cmp, .prog_clk(pclk),
    .prog_in(pin), .prog_out(pmid), .mem(mem_l), .count(cnt_l), .dout(dout_l));
  gc_adc_channel #(.M(M), .N(9), .E(2), .CODE(CNT_BINARY)) dut_b (
    .clk, .rst, .preset(11'd5), .bus, .active, .cmp, .prog_clk(pclk),
    .prog_in(pmid), .prog_out(pout), .mem(mem_b), .count(cnt_b), .dout(dout_b));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  logic [15:0] ref_l;
  longint      exp_b;
  bit          pend_l, pend_b;
  logic [18:0] stream;

  initial begin
    rst = 1'b1; bus = '0; active = 1'b0; cmp = 1'b0; pin = 1'b0;
    // program: the word for the second channel goes in first
    w_l = M'($urandom); w_b = M'($urandom);
    stream = {w_l, w_b};
    for (int i = 0; i < 2 * M; i++) begin
      pin = stream[i];
      #2 pclk = 1'b1;
      #2 pclk = 1'b0;
    end
    check(mem_l == w_l && mem_b == w_b, "memory programming through the chain");
    check(pout == w_b[0], "chain output");
    @(posedge clk); #1;
    check(cnt_l == 9'd0 && cnt_b == 11'd5, "preset on reset");
    ref_l = 16'd0; exp_b = 5;
    rst = 1'b0;
    pend_l = 1'b0; pend_b = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      active = ($urandom_range(9) != 0);
      cmp    = ($urandom_range(5) != 0);
      bus    = ($urandom_range(1) != 0) ? M'(1) << $urandom_range(M - 1) : '0;
      @(posedge clk);
      // the pulse decided one clock ago arrives now
      if (pend_l) ref_l = lfsr_next(ref_l, 9);
      if (pend_b) exp_b = (exp_b + 1) % 2048;
      pend_l = cmp && active && ((bus & w_l) == '0);
      pend_b = cmp && active && ((bus & w_b) == '0);
      #1;
      check(cnt_l == ref_l[8:0] && dout_l == ref_l[8:0], $sformatf("lfsr channel n=%0d", n));
      check(cnt_b == 11'(exp_b) && dout_b == 9'(exp_b >> 2), $sformatf("binary channel n=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
