// tb_master_control: drives every host command through the Master Control
// and checks what reaches the Functional Module bus and what comes back.
// The FM side is modelled here: a read returns a word built from the FM
// number, target and address one cycle after the read enable.  Checks the
// one-hot write/read enables, read and float-converted responses, start
// masking of busy FMs, buffer select toggling, single stepping of the clock
// enable, ADC programming and the status word.
module tb_master_control;
  import rsc_pkg::*;
  localparam int unsigned NUM_FM = 3;
  logic clk = 0, rst_n = 1;
  logic cmd_valid = 0, cmd_ready; mc_cmd_t cmd = '0;
  logic rsp_valid; logic [63:0] rsp_data;
  logic [NUM_FM-1:0] fm_we, fm_re, fm_start, fm_busy = '0;
  fm_target_e fm_target; logic [10:0] fm_addr; logic [63:0] fm_wdata;
  logic [63:0] fm_rdata [NUM_FM];
  logic [3:0] fm_ovf [NUM_FM];
  logic fm_clear, in_sel, out_sel, ce;
  logic [11:0] adc_num; logic [15:0] adc_div;
  int checks = 0, failures = 0;
  int n_we [NUM_FM], n_start [NUM_FM], n_ce = 0;
  logic [63:0] last_wdata; logic [10:0] last_waddr; fm_target_e last_wtarget;
  logic [63:0] fake [NUM_FM];   // value returned by the FM model

  master_control #(.NUM_FM(NUM_FM)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_FM; i++) begin
      if (fm_re[i]) fm_rdata[i] <= fake[i] ^ 64'(fm_addr);
      if (fm_we[i]) begin n_we[i]++; last_wdata <= fm_wdata; last_waddr <= fm_addr; last_wtarget <= fm_target; end
      if (fm_start[i]) n_start[i]++;
    end
    if (ce) n_ce++;
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic send(mc_op_e op, int fm, fm_target_e t, int a, logic [63:0] d);
    @(negedge clk); cmd_valid = 1; cmd = '{op: op, fm: 8'(fm), target: t, addr: 11'(a), data: d};
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask
  task automatic get(output logic [63:0] d);
    int n = 0;
    while (!rsp_valid && n < 20) begin @(negedge clk); n++; end
    checks++;
    if (!rsp_valid) begin failures++; $display("FAIL no response"); end
    d = rsp_data;
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d;
    for (int i = 0; i < NUM_FM; i++) begin n_we[i] = 0; n_start[i] = 0; fm_ovf[i] = 4'(i + 5); fm_rdata[i] = 0; end
    fake[0] = 64'h1111_0000_0000_0000; fake[1] = 64'h2222_0000_0000_0000; fake[2] = 64'h3333_0000_0000_0000;
    repeat (2) @(negedge clk); rst_n = 1;
    // write
    send(OP_WRITE, 1, T_DISP2, 77, 64'hABCD);
    repeat (2) @(negedge clk);
    check(64'(n_we[1]), 1, "write enable to FM 1"); check(64'(n_we[0] + n_we[2]), 0, "no other write");
    check(last_wdata, 64'hABCD, "write data"); check(64'(last_waddr), 77, "write address");
    check(64'(last_wtarget), 64'(T_DISP2), "write target");
    // raw read from each FM
    for (int i = 0; i < NUM_FM; i++) begin
      send(OP_READ, i, T_OUT, 5 + i, 0); get(d);
      check(d, fake[i] ^ 64'(5 + i), "raw read");
    end
    // float reads
    fake[2] = 64'h0;
    send(OP_READF, 2, T_OUT, 1000, 64'(W64)); get(d);
    check(d, 64'h447A_0000, "float 64-bit 1000");
    fake[2] = 64'h0000_FFFF_FFFF_FC00;   // 48-bit -1024 (address 0 keeps it)
    send(OP_READF, 2, T_OUT, 0, 64'(W48)); get(d);
    check(d, 64'hC480_0000, "float 48-bit -1024");
    fake[2] = {32'd3, 32'hFFFF_FFFF};
    send(OP_READF, 2, T_OUT, 0, 64'(W32X2)); get(d);
    check(d, {32'h4040_0000, 32'hBF80_0000}, "float two lanes 3, -1");
    // start: FM 1 busy, so only FMs 0 and 2 start
    fm_busy = 3'b010;
    send(OP_START, 0, T_CFG, 1, 64'b111);
    repeat (2) @(negedge clk);
    check({32'(n_start[2]), 32'(n_start[0])}, {32'd1, 32'd1}, "started idle FMs");
    check(64'(n_start[1]), 0, "busy FM not started");
    check(64'(fm_clear), 1, "clear flag");
    // status
    send(OP_STATUS, 0, T_CFG, 0, 0); get(d);
    check(d[14:0], {1'b0, 4'd7, 1'b1, 4'd6, 1'b0, 4'd5}, "status word");
    fm_busy = '0;
    // buffer selects
    check({62'b0, in_sel, out_sel}, 0, "selects after reset");
    send(OP_SWAP_IN, 0, T_CFG, 0, 0); send(OP_SWAP_OUT, 0, T_CFG, 0, 0); send(OP_SWAP_OUT, 0, T_CFG, 0, 0);
    @(negedge clk);
    check({62'b0, in_sel, out_sel}, 64'b10, "selects toggled");
    // single stepping: exactly one enabled cycle per step
    send(OP_STEP_MODE, 0, T_CFG, 0, 1);
    @(negedge clk); n_ce = 0;
    repeat (10) @(negedge clk);
    check(64'(n_ce), 0, "clock held in step mode");
    send(OP_STEP, 0, T_CFG, 0, 0); send(OP_STEP, 0, T_CFG, 0, 0);
    repeat (5) @(negedge clk);
    check(64'(n_ce), 2, "two single steps");
    send(OP_STEP_MODE, 0, T_CFG, 0, 0);
    @(negedge clk); n_ce = 0; repeat (10) @(negedge clk);
    check(64'(n_ce), 10, "free run");
    // ADC programming
    send(OP_ADC_CFG, 0, T_CFG, 0, {32'h0, 16'd25, 16'd2048});
    @(negedge clk);
    check({adc_div, 4'b0, adc_num}, {16'd25, 4'b0, 12'd2048}, "ADC config");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
