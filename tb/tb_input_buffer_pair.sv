// tb_input_buffer_pair: checks the double-buffered Data Input Buffer pair.
// The ADC writes a raster into the non-selected bank at sequential
// addresses while the processing side reads the selected bank, which the
// host loaded; after the select line swaps, the raster is read back at
// random addresses.  Also checks host read-back of both banks, the other-
// bank output, restart of the sequential counter and host-write priority.
module tb_input_buffer_pair;
  localparam int unsigned AW = 6, DW = 16, N = 1 << AW;
  logic clk = 0, rst_n = 1, sel = 0;
  logic adc_we = 0, adc_restart = 0;
  logic [DW-1:0] adc_data = 0;
  logic [AW-1:0] adc_addr;
  logic rd_en = 0; logic [AW-1:0] rd_addr = 0;
  logic [DW-1:0] rd_sel, rd_oth;
  logic h_we = 0, h_re = 0, h_bank = 0;
  logic [AW-1:0] h_addr = 0; logic [DW-1:0] h_wdata = 0, h_rdata;
  logic [DW-1:0] m0 [N], m1 [N];
  int checks = 0, failures = 0;

  input_buffer_pair #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // host loads bank 0 (read by processing while sel = 0)
    for (int i = 0; i < N; i++) begin
      @(negedge clk); h_we = 1; h_bank = 0; h_addr = AW'(i); h_wdata = DW'($urandom); m0[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    // ADC raster into bank 1, processing reads bank 0 in the same cycles
    adc_restart = 1; @(negedge clk); adc_restart = 0;
    for (int i = 0; i < N; i++) begin
      adc_we = 1; adc_data = DW'($urandom); m1[i] = adc_data;
      rd_en = 1; rd_addr = AW'($urandom);
      @(negedge clk);
      check(rd_sel, m0[rd_addr], "processing read during ADC input");
    end
    adc_we = 0; rd_en = 0;
    checks++; if (adc_addr !== '0) begin failures++; $display("FAIL counter did not wrap"); end
    // swap: processing now reads the raster
    sel = 1;
    for (int i = 0; i < 40; i++) begin
      rd_en = 1; rd_addr = AW'($urandom); @(negedge clk);
      check(rd_sel, m1[rd_addr], "read after swap");
      check(rd_oth, m0[rd_addr], "other bank");
    end
    rd_en = 0;
    // host read-back of both banks
    for (int i = 0; i < 10; i++) begin
      h_re = 1; h_bank = 1'(i % 2); h_addr = AW'($urandom); @(negedge clk); h_re = 0;
      check(h_rdata, h_bank ? m1[h_addr] : m0[h_addr], "host read");
    end
    // restart: the next ADC samples go to bank 0 from address 0
    adc_restart = 1; @(negedge clk); adc_restart = 0;
    for (int i = 0; i < 3; i++) begin
      adc_we = 1; adc_data = DW'(16'hA000 + i); m0[i] = adc_data; @(negedge clk);
    end
    // host write wins over an ADC write to the same bank
    adc_we = 1; adc_data = 16'hDEAD; h_we = 1; h_bank = 0; h_addr = 10; h_wdata = 16'hBEEF; m0[10] = 16'hBEEF;
    @(negedge clk); adc_we = 0; h_we = 0;
    for (int i = 0; i < 4; i++) begin
      h_re = 1; h_bank = 0; h_addr = AW'(i); @(negedge clk); h_re = 0;
      check(h_rdata, m0[i], "restarted raster");
    end
    h_re = 1; h_addr = 10; @(negedge clk); h_re = 0; check(h_rdata, 16'hBEEF, "host priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
