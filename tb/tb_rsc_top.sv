// tb_rsc_top: end-to-end run of the whole Compender at its default size
// (six Functional Modules, 2k-word memories), driven only through the host
// command channel, the raster start and the ADC sample ports.
//
// Each FM gets its own program and word split:
//   FM0 lag products, multiplier, 64-bit     FM3 four 16-bit lanes (unbuffered)
//   FM1 pulse decoding, by-pass, 64-bit      FM4 lag products, multiplier, 48-bit
//   FM2 two 32-bit lanes (I and Q sums)      FM5 pulse decoding, by-pass, 48-bit
// Sequence: raster 1 is sampled; the input buffers swap; FMs 0-2,4,5 run a
// clearing pass on raster 1 while raster 2 is sampled into the other banks
// (double buffering); FM3 then runs its clearing pass; the buffers swap and
// all FMs accumulate raster 2; a third pass over raster 2 is begun in
// single-step mode and finished free-running; the output buffers swap and
// every result word is read back raw, some also as floating point.  The
// expected words and overflow flags come from a term-by-term model here.
// Each mechanism (raster input, buffer swap, processing during sampling,
// multiplier pass, by-pass pass, forwarding, every word split, overflow,
// single step, float read-out) is counted and must occur at least once.
module tb_rsc_top;
  import rsc_pkg::*;
  localparam int unsigned NF = 6, NS = 64;
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
      for (int s = 0; s < 2; s++) adc_data[i][s] = gen(i, s, raster_no, sample_no);

  always @(posedge clk) begin
    if (dut.u_adc.restart) sample_no <= 0;
    else if (adc_convert) begin
      for (int i = 0; i < NF; i++) begin
        bankL[i][!in_sel_m][sample_no] = adc_data[i][0];
        bankR[i][!in_sel_m][sample_no] = adc_data[i][1];
      end
      sample_no <= sample_no + 1;
    end
  end

  // ---------------- mechanism counters ----------------
  int m_raster = 0, m_swap = 0, m_overlap = 0, m_mult = 0, m_byp = 0, m_fwd = 0;
  int m_ovf = 0, m_step = 0, m_float = 0;
  int m_mode [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    if (raster_done) m_raster++;
    if (raster_active && dut.g_fm[0].u_fm.busy) m_overlap++;
    if (dut.g_fm[1].u_fm.s_acc && dut.g_fm[1].u_fm.fwd_hit) m_fwd++;
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
  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // ---------------- programs and reference model ----------------
  typedef struct { int la, ra, oa; bit sub, repl; } term_t;
  term_t terms [NF][$];
  width_mode_e fm_mode [NF];
  bit fm_byp [NF];
  logic [63:0] outm [NF][2][2048];
  logic [3:0] ovfm [NF];
  int nwords [NF];

  function automatic logic [15:0] bw(int a, bit last);
    return {4'b0, last, 11'(a)};
  endfunction
  function automatic logic [15:0] dw(int a, bit endt, bit onext, bit sb, bit repl);
    return {1'b0, repl, sb, onext, endt, 11'(a)};
  endfunction

  // program kinds: 0 lag products, 1 pulse decoding, 2 one term per range,
  // 3 two terms per word
  task automatic load_program(int fm, int kind);
    int nr, nt, oa; logic [15:0] d1 [4], d2 [4]; int step;
    unique case (kind)
      0: begin nr = 8; nt = 3; step = 6; end
      1: begin nr = 8; nt = 4; step = 7; end
      2: begin nr = 16; nt = 1; step = 4; end
      default: begin nr = 8; nt = 2; step = 5; end
    endcase
    terms[fm].delete();
    oa = 0;
    for (int k = 0; k < nt; k++) begin
      unique case (kind)
        0: begin d1[k] = dw(0, k == nt-1, 1, 0, 1); d2[k] = dw(k, 0, 0, 0, 0); end
        1: begin d1[k] = dw(k, k == nt-1, k == nt-1, k == 2, k == 0); d2[k] = dw(0, 0, 0, 0, 0); end
        2: begin d1[k] = dw(0, 1, 1, 0, 1); d2[k] = dw(1, 0, 0, 0, 0); end
        default: begin d1[k] = dw(k, k == nt-1, k == nt-1, 0, k == 0); d2[k] = dw(k + 2, 0, 0, 0, 0); end
      endcase
      send(OP_WRITE, fm, T_DISP1, k, 64'(d1[k]));
      send(OP_WRITE, fm, T_DISP2, k, 64'(d2[k]));
    end
    for (int r = 0; r < nr; r++) begin
      send(OP_WRITE, fm, T_BASE, r, 64'(bw(r * step, r == nr-1)));
      for (int k = 0; k < nt; k++) begin
        term_t t;
        t.la = (r * step + int'(d1[k][10:0])) % 2048;
        t.ra = (r * step + int'(d2[k][10:0])) % 2048;
        t.oa = oa; t.sub = d1[k][13]; t.repl = d1[k][14];
        terms[fm].push_back(t);
        if (d1[k][12]) oa++;
      end
    end
    nwords[fm] = oa;
  endtask

  function automatic logic [63:0] sx(logic [15:0] v, int w);
    logic [63:0] r; r = 64'($signed(v));
    return (w == 64) ? r : (r & ((64'd1 << w) - 1));
  endfunction

  // one pass of FM 'fm' in the model
  task automatic model_pass(int fm, bit clr);
    int lo[4], wd[4], n;
    unique case (fm_mode[fm])
      W64: begin n = 1; lo[0] = 0; wd[0] = 64; end
      W48: begin n = 1; lo[0] = 0; wd[0] = 48; end
      W32X2: begin n = 2; lo[0] = 0; wd[0] = 32; lo[1] = 32; wd[1] = 32; end
      default: begin n = 4; for (int i = 0; i < 4; i++) begin lo[i] = 16*i; wd[i] = 16; end end
    endcase
    foreach (terms[fm][j]) begin
      term_t t; logic [63:0] opnd, acc, res; logic signed [15:0] l, r, lo2, ro2;
      t = terms[fm][j];
      l = bankL[fm][in_sel_m][t.la]; r = bankR[fm][in_sel_m][t.ra];
      lo2 = bankL[fm][!in_sel_m][t.la]; ro2 = bankR[fm][!in_sel_m][t.ra];
      unique case (fm_mode[fm])
        W64, W48: opnd = fm_byp[fm] ? 64'(l) : 64'(32'(l) * 32'(r));
        W32X2:    opnd = {32'(r), 32'(l)};
        default:  opnd = {ro2, lo2, r, l};
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
        if (s >= lim || s < -lim) ovfm[fm][(lo[k] + wd[k]) / 16 - 1] = 1'b1;
        res |= (64'(s) & mask) << lo[k];
      end
      outm[fm][out_sel_m][t.oa] = res;
    end
  endtask

  function automatic logic [31:0] ref_f(logic [63:0] x);
    logic s; logic [63:0] m; int e;
    s = x[63]; m = s ? -x : x;
    if (m == 0) return 32'h0;
    e = 23;
    while (m >= 64'h100_0000) begin m = m >> 1; e++; end
    while (m <  64'h80_0000)  begin m = m << 1; e--; end
    return {s, 8'(127 + e), m[22:0]};
  endfunction

  task automatic start_fms(logic [NF-1:0] mask, bit clr);
    send(OP_START, 0, T_CFG, int'(clr), 64'(mask));
    for (int i = 0; i < NF; i++) if (mask[i]) begin
      model_pass(i, clr);
      if (fm_byp[i] || fm_mode[i] inside {W32X2, W16X4}) m_byp++; else m_mult++;
      m_mode[fm_mode[i]]++;
      if (clr) ovfm[i] = ovfm[i];
    end
  endtask

  task automatic wait_idle();
    logic [63:0] s;
    do query(OP_STATUS, 0, T_CFG, 0, 0, s);
    while (s[4] | s[9] | s[14] | s[19] | s[24] | s[29]);
  endtask

  task automatic raster();
    @(negedge clk); raster_start = 1; @(negedge clk); raster_start = 0;
    while (!raster_done) @(negedge clk);
    raster_no++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] q;
    int kinds [NF] = '{0, 1, 2, 3, 0, 1};
    fm_mode = '{W64, W64, W32X2, W16X4, W48, W48};
    fm_byp  = '{0, 1, 1, 1, 0, 1};
    for (int i = 0; i < NF; i++) ovfm[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    send(OP_ADC_CFG, 0, T_CFG, 0, {32'h0, 16'd2, 16'(NS)});
    for (int i = 0; i < NF; i++) begin
      send(OP_WRITE, i, T_CFG, 0, 64'(fm_cfg_t'{bypass: fm_byp[i], mode: fm_mode[i]}));
      load_program(i, kinds[i]);
    end
    // raster 1 into bank 1, then swap
    raster();
    send(OP_SWAP_IN, 0, T_CFG, 0, 0); in_sel_m = 1; m_swap++;
    // clearing pass on raster 1 while raster 2 is sampled
    start_fms(6'b110111, 1);
    raster();
    wait_idle();
    start_fms(6'b001000, 1);        // unbuffered FM once sampling is over
    wait_idle();
    // accumulate raster 2
    send(OP_SWAP_IN, 0, T_CFG, 0, 0); in_sel_m = 0; m_swap++;
    start_fms(6'b111111, 0);
    wait_idle();
    // third pass over raster 2, begun one master-clock step at a time
    send(OP_STEP_MODE, 0, T_CFG, 0, 1);
    start_fms(6'b111111, 0);
    for (int k = 0; k < 30; k++) begin send(OP_STEP, 0, T_CFG, 0, 0); m_step++; end
    query(OP_STATUS, 0, T_CFG, 0, 0, q);
    check(64'(q[4] & q[29]), 1, "FMs still busy after 30 single steps");
    send(OP_STEP_MODE, 0, T_CFG, 0, 0);
    wait_idle();
    // hand the results to the host and read them back
    send(OP_SWAP_OUT, 0, T_CFG, 0, 0);
    for (int i = 0; i < NF; i++)
      for (int a = 0; a < nwords[i]; a++) begin
        query(OP_READ, i, T_OUT, a, 0, q);
        check(q, outm[i][out_sel_m][a], $sformatf("FM%0d word %0d", i, a));
      end
    out_sel_m = 1;
    for (int a = 0; a < 4; a++) begin
      logic [63:0] w;
      w = outm[0][0][a];
      query(OP_READF, 0, T_OUT, a, 64'(W64), q);
      check(q, {32'h0, ref_f(w)}, "FM0 float");
      w = outm[2][0][a];
      query(OP_READF, 2, T_OUT, a, 64'(W32X2), q);
      check(q, {ref_f(64'($signed(w[63:32]))), ref_f(64'($signed(w[31:0])))}, "FM2 float lanes");
      m_float += 2;
    end
    query(OP_STATUS, 0, T_CFG, 0, 0, q);
    for (int i = 0; i < NF; i++) begin
      check(64'(q[5*i +: 4]), 64'(ovfm[i]), $sformatf("FM%0d overflow flags", i));
      if (q[5*i +: 4] != 0) m_ovf++;
    end
    // every mechanism must have happened
    check(64'(m_raster >= 2), 1, "rasters sampled");
    check(64'(m_swap >= 2), 1, "input buffer swaps");
    check(64'(m_overlap > 0), 1, "processing during sampling");
    check(64'(m_mult > 0), 1, "multiplier passes");
    check(64'(m_byp > 0), 1, "by-pass passes");
    check(64'(m_fwd > 0), 1, "result forwarding");
    check(64'(m_ovf > 0), 1, "overflow flagged");
    check(64'(m_step > 0), 1, "single steps");
    check(64'(m_float > 0), 1, "float read-out");
    for (int k = 0; k < 4; k++) check(64'(m_mode[k] > 0), 1, $sformatf("word split %0d used", k));
    $display("rasters=%0d swaps=%0d overlap_cycles=%0d mult=%0d bypass=%0d fwd=%0d ovf_fms=%0d steps=%0d floats=%0d modes=%0d/%0d/%0d/%0d",
             m_raster, m_swap, m_overlap, m_mult, m_byp, m_fwd, m_ovf, m_step, m_float,
             m_mode[0], m_mode[1], m_mode[2], m_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
