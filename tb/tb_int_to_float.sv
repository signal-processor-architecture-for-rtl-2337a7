// tb_int_to_float: checks the integer to IEEE-single converter against
// known encodings and against a shift-based reference that normalises the
// magnitude into [2^23, 2^24) and truncates.
module tb_int_to_float;
  logic [63:0] i;
  logic [31:0] f;
  int checks = 0, failures = 0;

  int_to_float #(.IW(64)) dut (.*);

  function automatic logic [31:0] ref_f(logic [63:0] x);
    logic s; logic [63:0] m; int e;
    s = x[63]; m = s ? -x : x;
    if (m == 0) return 32'h0;
    e = 23;
    while (m >= 64'h100_0000) begin m = m >> 1; e++; end
    while (m <  64'h80_0000)  begin m = m << 1; e--; end
    return {s, 8'(127 + e), m[22:0]};
  endfunction

  task automatic chk(logic [63:0] x, logic [31:0] exp);
    i = x; #1; checks++;
    if (f !== exp) begin failures++; $display("FAIL %h -> %h exp %h", x, f, exp); end
  endtask

  initial begin
    chk(64'd0, 32'h0000_0000);
    chk(64'd1, 32'h3F80_0000);
    chk(-64'sd1, 32'hBF80_0000);
    chk(64'd3, 32'h4040_0000);
    chk(64'd1000, 32'h447A_0000);
    chk(64'h8000_0000_0000_0000, 32'hDF00_0000);  // -2^63
    chk(64'h7FFF_FFFF_FFFF_FFFF, 32'h5EFF_FFFF);  // truncated
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] x;
      x = {$urandom, $urandom} >> ($urandom % 64);
      if (t % 2) x = -x;
      chk(x, ref_f(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
