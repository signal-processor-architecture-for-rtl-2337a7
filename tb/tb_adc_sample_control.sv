// tb_adc_sample_control: runs rasters with several sample counts and
// dividers and checks the number of convert strobes, their spacing, the
// restart pulse, the done pulse and that a start during a raster is ignored.
module tb_adc_sample_control;
  logic clk = 0, rst_n = 1, raster_start = 0;
  logic [11:0] num_samples = 0;
  logic [15:0] div = 0;
  logic convert, restart, active, done;
  int checks = 0, failures = 0;

  adc_sample_control #(.AW(11), .DIVW(16)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic raster(int n, int d);
    int conv = 0, last = -1, cyc = 0, restarts = 0, dones = 0, bad_gap = 0;
    int gap;
    gap = (d > 1) ? d : 1;
    @(negedge clk); num_samples = 12'(n); div = 16'(d); raster_start = 1;
    @(negedge clk); raster_start = 0;
    while (cyc < n * gap + 20) begin
      if (cyc == 3) raster_start = 1; else raster_start = 0;  // ignored
      if (convert) begin
        if (last >= 0 && cyc - last != gap) bad_gap++;
        last = cyc; conv++;
      end
      if (restart) restarts++;
      if (done) dones++;
      @(negedge clk); cyc++;
    end
    check(conv == n, $sformatf("strobes %0d exp %0d", conv, n));
    check(bad_gap == 0, "strobe spacing");
    check(restarts == 1, $sformatf("restart pulses %0d", restarts));
    check(dones == 1, $sformatf("done pulses %0d", dones));
    check(!active, "inactive after raster");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    raster(5, 3);
    raster(4, 1);
    raster(7, 0);
    raster(20, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
