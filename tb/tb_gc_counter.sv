// tb_gc_counter: checks the conversion counter.
// LFSR instance (9 bits): from preset 0 it must visit 511 distinct states and
// return to the start after exactly 511 enabled clocks, never entering the
// all-ones lock-up state, and must hold when en is low.  Binary instance
// (11 bits): q must equal preset plus the number of enabled clocks modulo
// 2**11.  Both must load preset on reset.
module tb_gc_counter;
  import gc_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [8:0]  pre_l;
  logic [10:0] pre_b;
  logic        en_l, en_b;
  logic [8:0]  q_l;
  logic [10:0] q_b;
  int          checks = 0, failures = 0;

  gc_counter #(.W(9),  .CODE(CNT_LFSR))   dut_l (.clk, .rst, .preset(pre_l), .en(en_l), .q(q_l));
  gc_counter #(.W(11), .CODE(CNT_BINARY)) dut_b (.clk, .rst, .preset(pre_b), .en(en_b), .q(q_b));

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  bit     seen [512];
  int     steps;
  longint expb;

  initial begin
    rst = 1'b1; en_l = 1'b0; en_b = 1'b0; pre_l = 9'd0; pre_b = 11'd2040;
    repeat (2) @(posedge clk);
    #1 check(q_l == 9'd0 && q_b == 11'd2040, "preset load");
    rst = 1'b0;
    foreach (seen[i]) seen[i] = 1'b0;
    steps = 0;
    expb  = 2040;
    while (steps < 511) begin
      @(negedge clk);
      en_l = ($urandom_range(3) != 0);
      en_b = ($urandom_range(1) != 0);
      @(posedge clk);
      #1;
      if (en_b) expb = (expb + 1) % 2048;
      check(q_b == 11'(expb), "binary count");
      if (en_l) begin
        steps++;
        if (steps < 511) begin
          check(q_l != 9'd0 && !seen[q_l] && q_l != 9'h1FF, $sformatf("lfsr state %0h repeated", q_l));
          seen[q_l] = 1'b1;
        end else begin
          check(q_l == 9'd0, "lfsr period 511");
        end
      end
    end
    // hold with en low
    @(negedge clk); en_l = 1'b0; en_b = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(q_l == 9'd0 && q_b == 11'(expb), "hold when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
