// tb_address_generator: loads a three-range Base/Displacement program and
// steps it with the Functional Module's strobe timing (issue, read 2 cycles
// later, counter update 1 later, adders 2 later, every 5 cycles).  Checks
// the left/right addresses and tags against a hand-worked sequence that
// covers displacement restart, hold_disp, 11-bit wrap-around and the end of
// the program, then runs the program a second time after start.
module tb_address_generator;
  import rsc_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic s_issue = 0, s_read = 0, s_adv = 0, s_add = 0;
  logic [10:0] left_addr, right_addr;
  tag_t tag;
  logic done;
  logic h_we = 0, h_re = 0; logic [1:0] h_sel = 0;
  logic [10:0] h_addr = 0; logic [15:0] h_wdata = 0, h_rdata;
  int checks = 0, failures = 0;

  address_generator #(.AW(11), .OPW(16)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset

  task automatic wr(int sel, int a, logic [15:0] d);
    @(negedge clk); h_we = 1; h_sel = 2'(sel); h_addr = 11'(a); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  task automatic pulse(ref logic s); s = 1; @(negedge clk); s = 0; endtask

  task automatic term(output logic [10:0] l, output logic [10:0] r, output tag_t t);
    pulse(s_issue); @(negedge clk);
    pulse(s_read);
    pulse(s_adv); @(negedge clk);
    pulse(s_add);
    l = left_addr; r = right_addr; t = tag;
  endtask

  // expected: left, right, sub flag
  int exp_l [8] = '{100, 101, 102, 500, 501, 502, 2047, 1};
  int exp_r [8] = '{105, 106, 107, 505, 506, 507, 4, 6};

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [10:0] l, r; tag_t t;
    repeat (2) @(negedge clk); rst_n = 1;
    // base: 100; 500 with hold_disp (bit 12); 2040 with last_range (bit 11)
    wr(0, 0, 16'd100); wr(0, 1, 16'h1000 | 16'd500); wr(0, 2, 16'h0800 | 16'd2040);
    // disp1: 0, 1, 2|end, 7, 9|end ; sub (bit 13) on entry 1, out_next on 2
    wr(1, 0, 16'd0); wr(1, 1, 16'h2000 | 16'd1); wr(1, 2, 16'h0800 | 16'h1000 | 16'd2);
    wr(1, 3, 16'd7); wr(1, 4, 16'h0800 | 16'd9);
    // disp2 = disp1 + 5 (wraps for the last range)
    wr(2, 0, 16'd5); wr(2, 1, 16'd6); wr(2, 2, 16'd7); wr(2, 3, 16'd12); wr(2, 4, 16'd14);
    // host read-back
    @(negedge clk); h_re = 1; h_sel = 1; h_addr = 2; @(negedge clk); h_re = 0;
    checks++; if (h_rdata !== 16'h1802) begin failures++; $display("FAIL readback %h", h_rdata); end
    for (int pass = 0; pass < 2; pass++) begin
      pulse(start);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (done) begin failures++; $display("FAIL done early at term %0d", k); end
        term(l, r, t);
        checks++;
        if (l !== 11'(exp_l[k]) || r !== 11'(exp_r[k])) begin
          failures++; $display("FAIL pass %0d term %0d: %0d/%0d exp %0d/%0d", pass, k, l, r, exp_l[k], exp_r[k]);
        end
        checks++;
        if (t.d1.sub !== (k == 1 || k == 4) || t.d1.end_terms !== (k == 2 || k == 5 || k == 7)
            || t.d1.out_next !== (k == 2 || k == 5) || t.b.last_range !== (k >= 6)) begin
          failures++; $display("FAIL tag term %0d: %p", k, t);
        end
      end
      checks++;
      if (!done) begin failures++; $display("FAIL done not set"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
