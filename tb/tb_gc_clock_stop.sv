// tb_gc_clock_stop: checks the G3/G2 clock stopping logic (M = 9).
// With random memory words, bus patterns (single lines, idle, and arbitrary)
// and the active window, ce_q one clock later must be high exactly when the
// window is active and no high bus line has its memory bit set.
module tb_gc_clock_stop;
  localparam int M = 9;
  logic         clk = 1'b0;
  logic         rst;
  logic [M-1:0] bus, mem;
  logic         active;
  logic         ce_q;
  logic         exp_ce;
  int           checks = 0, failures = 0;

  gc_clock_stop #(.M(M)) dut (.clk, .rst, .bus, .mem, .active, .ce_q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; bus = '0; mem = '0; active = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (ce_q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      mem    = M'($urandom);
      active = ($urandom_range(7) != 0);
      case ($urandom_range(2))
        0: bus = '0;
        1: bus = M'(1) << $urandom_range(M - 1);
        default: bus = M'($urandom);
      endcase
      exp_ce = active;
      for (int k = 0; k < M; k++)
        if (bus[k] && mem[k]) exp_ce = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (ce_q !== exp_ce) begin
        failures++;
        $display("FAIL bus=%b mem=%b act=%b ce=%b", bus, mem, active, ce_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
