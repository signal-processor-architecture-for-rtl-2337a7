// tb_pipelined_multiplier: checks the two-stage signed multiplier against
// the product computed by the simulator, for corner values and random
// operands, with the stage strobes spaced as in the Functional Module
// (3 cycles apart, a new pair every 5 cycles) and the result held in between.
module tb_pipelined_multiplier;
  logic clk = 0, en1 = 0, en2 = 0;
  logic signed [15:0] a = 0, b = 0;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  pipelined_multiplier #(.DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic signed [15:0] c [5] = '{16'sh7FFF, -16'sh8000, 16'sh0000, -16'sh0001, 16'sh00FF};
    logic signed [31:0] exp;
    for (int t = 0; t < 1025; t++) begin
      @(negedge clk);
      if (t < 25) begin a = c[t % 5]; b = c[t / 5]; end
      else begin a = 16'($urandom); b = 16'($urandom); end
      exp = 32'(a) * 32'(b);
      en1 = 1; @(negedge clk); en1 = 0;
      a = 16'($urandom); b = 16'($urandom);   // inputs may change after stage 1
      @(negedge clk); @(negedge clk);
      en2 = 1; @(negedge clk); en2 = 0;
      checks++;
      if (p !== exp) begin failures++; $display("FAIL %0d: p=%h exp=%h", t, p, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
