// tb_rsc_workloads: runs four radar experiments of realistic size on the
// full six-FM machine, each integrated over two rasters with the double-
// buffered input, and checks every result word against a model:
//   MST      13-baud Barker decoding of I and Q (two 32-bit lanes, by-pass),
//            1000 heights, every FM on its own receiver channel
//   E region lag products, 100 heights x 20 lags = 2000 words per FM,
//            multiplier, 64-bit word
//   Protonosphere  60 lags x 20 heights, multiplier, 48-bit word
//   F region 1002 heights x 12 lags = 12024 words, one channel split over
//            all six FMs (167 heights each)
// For each experiment the number of terms and the cycles the passes took
// are printed; a pass must take no more than 5 cycles per term plus the
// pipeline latency and a small start/stop allowance.
module tb_rsc_workloads;
  import rsc_pkg::*;
  localparam int unsigned NF = 6;
  logic clk = 0, rst_n = 1;
  logic cmd_valid = 0, cmd_ready; mc_cmd_t cmd = '0;
  logic rsp_valid; logic [63:0] rsp_data;
  logic raster_start = 0, adc_convert, raster_active, raster_done;
  logic [15:0] adc_data [NF][2];
  int checks = 0, failures = 0;

  rsc_top dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  // ---------------- ADC source and buffer model ----------------
  int raster_no = 0, sample_no = 0;
  bit shared_channel = 0;       // all FMs see the same receiver
  logic in_sel_m = 0, out_sel_m = 0;
  logic [15:0] bankL [NF][2][2048], bankR [NF][2][2048];

  function automatic logic [15:0] gen(int fm, int side, int r, int n);
    logic [31:0] x;
    x = 32'(fm * 7919 + side * 104729 + r * 1299709 + n * 15485863) ^ 32'h5bd1e995;
    x = x ^ (x >> 13); x = x * 32'h2c1b3c6d; x = x ^ (x >> 15);
    return x[15:0];
  endfunction

  always_comb
    for (int i = 0; i < NF; i++)
      for (int s = 0; s < 2; s++)
        adc_data[i][s] = gen(shared_channel ? 0 : i, s, raster_no, sample_no);

  always @(posedge clk) begin
    if (raster_start && !raster_active) sample_no <= 0;
    else if (adc_convert) begin
      for (int i = 0; i < NF; i++) begin
        bankL[i][!in_sel_m][sample_no] = adc_data[i][0];
        bankR[i][!in_sel_m][sample_no] = adc_data[i][1];
      end
      sample_no <= sample_no + 1;
    end
  end

  // ---------------- host commands ----------------
  task automatic send(mc_op_e op, int fm, fm_target_e t, int a, logic [63:0] d);
    @(negedge clk); cmd_valid = 1; cmd = '{op: op, fm: 8'(fm), target: t, addr: 11'(a), data: d};
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask
  task automatic query(mc_op_e op, int fm, fm_target_e t, int a, logic [63:0] d, output logic [63:0] q);
    send(op, fm, t, a, d);
    while (!rsp_valid) @(negedge clk);
    q = rsp_data;
  endtask

  // ---------------- programs and model ----------------
  typedef struct { int la, ra, oa; bit sub, repl; } term_t;
  term_t terms [NF][$];
  width_mode_e mode;
  bit byp;
  logic [63:0] outm [NF][2][2048];
  int nwords [NF];
  logic [15:0] d1w [64], d2w [64];

  function automatic logic [15:0] dw(int a, bit endt, bit onext, bit sb, bit repl);
    return {1'b0, repl, sb, onext, endt, 11'(a)};
  endfunction

  // nr ranges with base base0 + r*step, nt terms from d1w/d2w
  task automatic load_program(int fm, int nr, int base0, int step, int nt);
    int oa = 0;
    terms[fm].delete();
    for (int k = 0; k < nt; k++) begin
      send(OP_WRITE, fm, T_DISP1, k, 64'(d1w[k]));
      send(OP_WRITE, fm, T_DISP2, k, 64'(d2w[k]));
    end
    for (int r = 0; r < nr; r++) begin
      int b; b = base0 + r * step;
      send(OP_WRITE, fm, T_BASE, r, 64'({4'b0, r == nr - 1, 11'(b)}));
      for (int k = 0; k < nt; k++) begin
        term_t t;
        t.la = (b + int'(d1w[k][10:0])) % 2048; t.ra = (b + int'(d2w[k][10:0])) % 2048;
        t.oa = oa; t.sub = d1w[k][13]; t.repl = d1w[k][14];
        terms[fm].push_back(t);
        if (d1w[k][12]) oa++;
      end
    end
    nwords[fm] = oa;
  endtask

  task automatic model_pass(int fm, bit clr);
    int lo[2], wd[2], n;
    unique case (mode)
      W64: begin n = 1; lo[0] = 0; wd[0] = 64; end
      W48: begin n = 1; lo[0] = 0; wd[0] = 48; end
      default: begin n = 2; lo[0] = 0; wd[0] = 32; lo[1] = 32; wd[1] = 32; end
    endcase
    foreach (terms[fm][j]) begin
      term_t t; logic [63:0] opnd, acc, res; logic signed [15:0] l, r;
      t = terms[fm][j];
      l = bankL[fm][in_sel_m][t.la]; r = bankR[fm][in_sel_m][t.ra];
      unique case (mode)
        W64, W48: opnd = byp ? 64'(l) : 64'(32'(l) * 32'(r));
        default:  opnd = {32'(r), 32'(l)};
      endcase
      acc = (clr && t.repl) ? 64'h0 : outm[fm][out_sel_m][t.oa];
      res = '0;
      for (int k = 0; k < n; k++) begin
        logic signed [66:0] x, z, s, lim; logic [63:0] mask;
        mask = (wd[k] == 64) ? '1 : ((64'd1 << wd[k]) - 1);
        lim = 67'sd1 <<< (wd[k] - 1);
        x = 67'((acc >> lo[k]) & mask); z = 67'((opnd >> lo[k]) & mask);
        if (x >= lim) x = x - (lim <<< 1);
        if (z >= lim) z = z - (lim <<< 1);
        s = t.sub ? x - z : x + z;
        res |= (64'(s) & mask) << lo[k];
      end
      outm[fm][out_sel_m][t.oa] = res;
    end
  endtask

  task automatic raster(int ns);
    @(negedge clk); raster_start = 1; @(negedge clk); raster_start = 0;
    while (!raster_done) @(negedge clk);
    raster_no++;
  endtask

  task automatic wait_idle();
    logic [63:0] s;
    do query(OP_STATUS, 0, T_CFG, 0, 0, s);
    while (s[4] | s[9] | s[14] | s[19] | s[24] | s[29]);
  endtask

  // one experiment: program loaded, two rasters integrated, all words checked
  task automatic experiment(string name, int ns);
    longint t0, cyc; int maxterms = 0, bad = 0; logic [63:0] q;
    foreach (terms[i]) if (terms[i].size() > maxterms) maxterms = terms[i].size();
    send(OP_ADC_CFG, 0, T_CFG, 0, {32'h0, 16'd1, 16'(ns)});
    for (int i = 0; i < NF; i++)
      send(OP_WRITE, i, T_CFG, 0, 64'(fm_cfg_t'{bypass: byp, mode: mode}));
    raster(ns);
    send(OP_SWAP_IN, 0, T_CFG, 0, 0); in_sel_m = !in_sel_m;
    t0 = $time / 10;
    send(OP_START, 0, T_CFG, 1, 64'b111111);
    for (int i = 0; i < NF; i++) model_pass(i, 1);
    raster(ns);                      // next raster sampled meanwhile
    wait_idle();
    cyc = $time / 10 - t0;
    send(OP_SWAP_IN, 0, T_CFG, 0, 0); in_sel_m = !in_sel_m;
    send(OP_START, 0, T_CFG, 0, 64'b111111);
    for (int i = 0; i < NF; i++) model_pass(i, 0);
    wait_idle();
    send(OP_SWAP_OUT, 0, T_CFG, 0, 0);
    for (int i = 0; i < NF; i++)
      for (int a = 0; a < nwords[i]; a++) begin
        query(OP_READ, i, T_OUT, a, 0, q);
        checks++;
        if (q !== outm[i][out_sel_m][a]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s FM%0d word %0d got %h exp %h", name, i, a, q, outm[i][out_sel_m][a]);
        end
      end
    out_sel_m = !out_sel_m;
    $display("%s: %0d terms per FM per pass, first pass done within %0d cycles, %0d words checked, %0d wrong",
             name, maxterms, cyc, nwords[0] * NF, bad);
    checks++;
    if (cyc > longint'(maxterms) * II + LAT_MULT + 60) begin
      failures++; $display("FAIL %s slower than one term per %0d cycles", name, II);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int barker [13] = '{1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1};
    repeat (3) @(negedge clk); rst_n = 1;

    // MST: Barker-13 decoding of I (left) and Q (right), 1000 heights
    mode = W32X2; byp = 1; shared_channel = 0;
    for (int k = 0; k < 13; k++) begin
      d1w[k] = dw(k, k == 12, k == 12, barker[k] < 0, k == 0);
      d2w[k] = dw(k, 0, 0, 0, 0);
    end
    for (int i = 0; i < NF; i++) load_program(i, 1000, 0, 1, 13);
    experiment("MST Barker-13 x 1000 heights", 1012);

    // E region: 100 heights x 20 lags
    mode = W64; byp = 0;
    for (int k = 0; k < 20; k++) begin d1w[k] = dw(0, k == 19, 1, 0, 1); d2w[k] = dw(k, 0, 0, 0, 0); end
    for (int i = 0; i < NF; i++) load_program(i, 100, 0, 1, 20);
    experiment("E region 100 heights x 20 lags", 119);

    // Protonosphere: 20 heights x 60 lags, 48-bit word
    mode = W48; byp = 0;
    for (int k = 0; k < 60; k++) begin d1w[k] = dw(0, k == 59, 1, 0, 1); d2w[k] = dw(k, 0, 0, 0, 0); end
    for (int i = 0; i < NF; i++) load_program(i, 20, 0, 10, 60);
    experiment("Protonosphere 20 heights x 60 lags", 250);

    // F region: 1002 heights x 12 lags of one channel, split over the FMs
    mode = W64; byp = 0; shared_channel = 1;
    for (int k = 0; k < 12; k++) begin d1w[k] = dw(0, k == 11, 1, 0, 1); d2w[k] = dw(k, 0, 0, 0, 0); end
    for (int i = 0; i < NF; i++) load_program(i, 167, 167 * i, 1, 12);
    experiment("F region 1002 heights x 12 lags", 1013);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
