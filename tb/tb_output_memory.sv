// tb_output_memory: checks the double-buffered output memory.  The host
// loads the bank it owns; after the select line swaps, the accumulator side
// reads those words, writes updated words back, and after a second swap the
// host reads the updated words.  Also checks that accumulator and host
// traffic in the same cycle go to different banks.
module tb_output_memory;
  localparam int unsigned AW = 5, W = 64, N = 1 << AW;
  logic clk = 0, sel = 0;
  logic p_re = 0, p_we = 0, h_we = 0, h_re = 0;
  logic [AW-1:0] p_raddr = 0, p_waddr = 0, h_addr = 0;
  logic [W-1:0] p_rdata, p_wdata = 0, h_wdata = 0, h_rdata;
  logic [W-1:0] mb [2][N];
  int checks = 0, failures = 0;

  output_memory #(.AW(AW), .W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // host owns bank 1 (sel = 0)
    for (int i = 0; i < N; i++) begin
      @(negedge clk); h_we = 1; h_addr = AW'(i); h_wdata = {$urandom, $urandom}; mb[1][i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    sel = 1;   // accumulator now owns bank 1, host bank 0
    for (int i = 0; i < N; i++) begin
      // accumulator read-modify-write while the host writes its own bank
      p_re = 1; p_raddr = AW'(i);
      h_we = 1; h_addr = AW'(i); h_wdata = {$urandom, $urandom}; mb[0][i] = h_wdata;
      @(negedge clk); p_re = 0; h_we = 0;
      check(p_rdata, mb[1][i], "accumulator read");
      p_we = 1; p_waddr = AW'(i); p_wdata = p_rdata + 64'd7; mb[1][i] = p_wdata;
      @(negedge clk); p_we = 0;
    end
    sel = 0;   // host owns bank 1 again
    for (int i = 0; i < N; i++) begin
      h_re = 1; h_addr = AW'(i); p_re = 1; p_raddr = AW'(i); @(negedge clk); h_re = 0; p_re = 0;
      check(h_rdata, mb[1][i], "host read of finished bank");
      check(p_rdata, mb[0][i], "accumulator read of other bank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
