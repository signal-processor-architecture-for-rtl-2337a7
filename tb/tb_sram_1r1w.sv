// tb_sram_1r1w: self-checking test of the synchronous 1W1R memory.
// Fills a small memory with random words, reads every word back, checks
// that a read of an address written in the same cycle returns the old word
// and that rdata holds while re is low.
module tb_sram_1r1w;
  localparam int unsigned DEPTH = 64, WIDTH = 16, AW = 6;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sram_1r1w #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); re = 1; raddr = AW'(i);
      @(negedge clk); re = 0; check(rdata, model[i], "readback");
    end
    // read during write to the same address returns the old word
    @(negedge clk); we = 1; re = 1; waddr = 5; raddr = 5; wdata = ~model[5];
    @(negedge clk); we = 0; re = 0; check(rdata, model[5], "read-before-write");
    model[5] = ~model[5];
    // rdata holds while re is low
    repeat (3) @(negedge clk);
    check(rdata, ~model[5], "hold");
    @(negedge clk); re = 1; raddr = 5;
    @(negedge clk); re = 0; check(rdata, model[5], "new word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
