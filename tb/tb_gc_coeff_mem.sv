// tb_gc_coeff_mem: checks the correction memory shift register (M = 9).
// Random words are shifted in LSB first with the programming clock; after M
// shifts the memory must hold the word, and the serial output must deliver
// the previous word's bits LSB first while the new one goes in.
module tb_gc_coeff_mem;
  localparam int M = 9;
  logic         pclk = 1'b0;
  logic         sin;
  logic         sout;
  logic [M-1:0] mem;
  logic [M-1:0] w, prev;
  int           checks = 0, failures = 0;

  gc_coeff_mem #(.M(M)) dut (.prog_clk(pclk), .sin, .sout, .mem);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #5 pclk = 1'b1;
    #5 pclk = 1'b0;
  endtask

  initial begin
    sin = 1'b0;
    prev = 9'h0;
    repeat (M) pulse();
    for (int n = 0; n < 40; n++) begin
      w = M'($urandom);
      for (int b = 0; b < M; b++) begin
        sin = w[b];
        #1;
        checks++;
        if (sout !== prev[b]) begin
          failures++;
          $display("FAIL sout word %0d bit %0d", n, b);
        end
        pulse();
      end
      checks++;
      if (mem !== w) begin
        failures++;
        $display("FAIL mem %h expected %h", mem, w);
      end
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
