// tb_functional_module: end-to-end test of one Functional Module through its
// host port.  Each scenario loads input buffers and an address program,
// runs one or more passes and reads the output memory back:
//   A  lag products (multiplier, 64-bit word): out[r*3+l] = L[b]*R[b+l],
//      a second pass without clear doubles every word
//   B  pulse decoding (multiplier by-passed): out[r] = L[b]+L[b+1]-L[b+2],
//      consecutive terms update one word, so result forwarding is needed
//   C  two 32-bit lanes: left and right samples accumulated separately
//   D  four 16-bit lanes (unbuffered), with a forced lane overflow
//   E  scenario A repeated with the master clock enable toggling at random
//      (single stepping)
// A monitor checks that terms issue every 5 enabled cycles and that each
// term's output write comes 23 (multiplier) or 18 (by-pass) enabled cycles
// after its issue.  Expected values are computed here from the samples.
module tb_functional_module;
  import rsc_pkg::*;
  logic clk = 0, rst_n = 1, ce = 1, start = 0, clear = 0, in_sel = 0, out_sel = 0;
  logic busy; logic [3:0] ovf;
  logic adc_we = 0, adc_restart = 0; logic [15:0] adc_l = 0, adc_r = 0;
  logic h_we = 0, h_re = 0; fm_target_e h_target = T_CFG;
  logic [10:0] h_addr = 0; logic [63:0] h_wdata = 0, h_rdata;
  int checks = 0, failures = 0;
  int n_issue = 0, n_write = 0, n_fwd = 0, n_lat_bad = 0, n_ii_bad = 0;

  functional_module dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset

  // ---------------- timing monitor ----------------
  longint ccount = 0, last_issue = -1;
  longint issue_q [$];
  int exp_lat = LAT_MULT;
  always @(posedge clk) begin
    if (ce) begin
      ccount++;
      if (dut.issue) begin
        if (last_issue >= 0 && ccount - last_issue != II && dut.sr[II-1]) n_ii_bad++;
        last_issue = ccount; issue_q.push_back(ccount); n_issue++;
      end
      if (dut.s_wr) begin
        longint t; t = issue_q.pop_front(); n_write++;
        if (ccount - t != longint'(exp_lat)) begin
          n_lat_bad++; $display("latency %0d exp %0d", ccount - t, exp_lat);
        end
      end
      if (dut.s_acc && dut.fwd_hit) n_fwd++;
    end
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic hw(fm_target_e t, int a, logic [63:0] d);
    @(negedge clk); h_we = 1; h_target = t; h_addr = 11'(a); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hr(fm_target_e t, int a, output logic [63:0] d);
    @(negedge clk); h_re = 1; h_target = t; h_addr = 11'(a);
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask
  task automatic run(logic clr);
    @(negedge clk); start = 1; clear = clr;
    @(negedge clk); start = 0; clear = 0;
    while (busy) @(negedge clk);
  endtask

  logic signed [15:0] L0 [2048], R0 [2048], L1 [2048], R1 [2048];
  logic [63:0] expv [64];

  task automatic fill(int n, int maxabs);
    for (int i = 0; i < n; i++) begin
      L0[i] = 16'($signed($urandom % (2*maxabs)) - maxabs);
      R0[i] = 16'($signed($urandom % (2*maxabs)) - maxabs);
      L1[i] = 16'($signed($urandom % (2*maxabs)) - maxabs);
      R1[i] = 16'($signed($urandom % (2*maxabs)) - maxabs);
      hw(T_IN_L0, i, 64'(L0[i])); hw(T_IN_R0, i, 64'(R0[i]));
      hw(T_IN_L1, i, 64'(L1[i])); hw(T_IN_R1, i, 64'(R1[i]));
    end
  endtask

  // operand word helpers: flags are bits 15:11
  function automatic logic [15:0] bw(int a, bit last, bit hold);
    return {3'b0, hold, last, 11'(a)};
  endfunction
  function automatic logic [15:0] dw(int a, bit endt, bit onext, bit sb, bit repl);
    return {1'b0, repl, sb, onext, endt, 11'(a)};
  endfunction

  task automatic prog_acf();
    for (int r = 0; r < 4; r++) begin
      hw(T_BASE, r, 64'(bw(10*r + 3, r == 3, 0)));
    end
    for (int l = 0; l < 3; l++) begin
      hw(T_DISP1, l, 64'(dw(0, l == 2, 1, 0, 1)));
      hw(T_DISP2, l, 64'(dw(l, 0, 0, 0, 0)));
    end
  endtask

  task automatic check_acf(int mult, string what);
    logic [63:0] d;
    for (int r = 0; r < 4; r++)
      for (int l = 0; l < 3; l++) begin
        hr(T_OUT, r*3 + l, d);
        check(d, 64'(mult * (longint'(L0[10*r+3]) * longint'(R0[10*r+3+l]))), what);
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d;
    repeat (3) @(negedge clk); rst_n = 1;
    fill(48, 32768);

    // ---- A: lag products with the multiplier, 64-bit word ----
    hw(T_CFG, 0, 64'(fm_cfg_t'{bypass: 1'b0, mode: W64}));
    hr(T_CFG, 0, d); check(d, 64'(3'b000), "config readback");
    prog_acf();
    exp_lat = LAT_MULT;
    run(1);
    run(0);
    out_sel = 1;                      // hand bank 0 to the host
    check_acf(2, "A lag product x2");
    check(64'(n_issue), 64'(24), "A terms issued");

    // ---- B: pulse decoding, multiplier by-passed ----
    hw(T_CFG, 0, 64'(fm_cfg_t'{bypass: 1'b1, mode: W64}));
    for (int r = 0; r < 5; r++) hw(T_BASE, r, 64'(bw(7*r, r == 4, 0)));
    for (int k = 0; k < 3; k++) begin
      hw(T_DISP1, k, 64'(dw(k, k == 2, k == 2, k == 2, k == 0)));
      hw(T_DISP2, k, 64'(dw(0, 0, 0, 0, 0)));
    end
    exp_lat = LAT_BYP;
    run(1);
    out_sel = 0;
    for (int r = 0; r < 5; r++) begin
      hr(T_OUT, r, d);
      check(d, 64'(longint'(L0[7*r]) + longint'(L0[7*r+1]) - longint'(L0[7*r+2])), "B decoded");
    end
    checks++;
    if (n_fwd < 10) begin failures++; $display("FAIL forwarding used %0d times", n_fwd); end

    // ---- C: two 32-bit lanes ----
    hw(T_CFG, 0, 64'(fm_cfg_t'{bypass: 1'b0, mode: W32X2}));  // split modes by-pass
    hw(T_BASE, 0, 64'(bw(20, 1, 0)));
    for (int k = 0; k < 4; k++) begin
      hw(T_DISP1, k, 64'(dw(k, k == 3, 1, k == 1, 1)));
      hw(T_DISP2, k, 64'(dw(k + 1, 0, 0, 0, 0)));
    end
    run(1);
    run(0);
    out_sel = 1;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] lo, hi;
      hr(T_OUT, k, d);
      lo = (k == 1) ? 32'(-2 * int'(L0[20+k])) : 32'(2 * int'(L0[20+k]));
      hi = (k == 1) ? 32'(-2 * int'(R0[21+k])) : 32'(2 * int'(R0[21+k]));
      check(d, {hi, lo}, "C two lanes");
    end

    // ---- D: four 16-bit lanes with overflow ----
    hw(T_IN_L0, 40, 64'(16'sh7000)); L0[40] = 16'sh7000;
    hw(T_IN_L0, 41, 64'(16'sh7000)); L0[41] = 16'sh7000;
    hw(T_CFG, 0, 64'(fm_cfg_t'{bypass: 1'b1, mode: W16X4}));
    hw(T_BASE, 0, 64'(bw(40, 1, 0)));
    hw(T_DISP1, 0, 64'(dw(0, 0, 0, 0, 1)));
    hw(T_DISP1, 1, 64'(dw(1, 1, 1, 0, 0)));
    hw(T_DISP2, 0, 64'(dw(2, 0, 0, 0, 0)));
    hw(T_DISP2, 1, 64'(dw(3, 0, 0, 0, 0)));
    run(1);
    out_sel = 0;
    hr(T_OUT, 0, d);
    check(d, {16'(R1[42] + R1[43]), 16'(L1[40] + L1[41]), 16'(R0[42] + R0[43]), 16'(L0[40] + L0[41])}, "D four lanes");
    hr(T_STATUS, 0, d);
    check(d[0], 1'b1, "D lane 0 overflow flagged");
    check(64'(ovf[0]), 64'(1), "D ovf port");

    // ---- E: lag products again with a toggling clock enable ----
    hw(T_CFG, 0, 64'(fm_cfg_t'{bypass: 1'b0, mode: W64}));
    prog_acf();
    exp_lat = LAT_MULT;
    @(negedge clk); start = 1; clear = 1;
    @(negedge clk); start = 0; clear = 0;
    while (busy) begin ce = 1'($urandom % 2); @(negedge clk); end
    ce = 1;
    out_sel = 1;
    check_acf(1, "E single-stepped lag product");
    hr(T_STATUS, 0, d);
    check(d[3:0], 4'b0000, "E overflow cleared by clear pass");

    check(64'(n_lat_bad), 64'(0), "latency 23/18 cycles");
    check(64'(n_ii_bad), 64'(0), "issue every 5 cycles");
    check(64'(n_write), 64'(n_issue), "every term written");
    $display("terms=%0d writes=%0d forwards=%0d", n_issue, n_write, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
