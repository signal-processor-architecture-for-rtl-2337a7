// functional_module: one Functional Module of the Radar Signal Compender, a
// fully pipelined multiply-(replace/add) processor for one data stream.
//
// Data flow (one term per 5 master-clock cycles):
//   address_generator -> left / right Data Input Buffer pairs -> multiplier
//   (or by-pass) -> operand former -> segmented adder/subtractor, which reads
//   the output word, adds or subtracts the operand and writes it back.
// With the multiplier the pipe has 9 stages and a term takes 23 cycles from
// issue to the output-memory write; by-passed it has 7 stages and 18 cycles.
// A shift register of issue pulses (sr) tells each stage register when to
// load; every stage holds its value until the next stage has taken it,
// which the 5-cycle issue interval guarantees.
//
// The configuration register (cfg) selects the data word split and the
// multiplier by-pass.  Operand formation:
//   W64 / W48   product (or, by-passed, the left sample), sign-extended
//   W32X2       left sample in bits 31:0, right sample in bits 63:32
//   W16X4       left, right, other-left, other-right samples in the four
//               16-bit lanes; reads both banks, so this mode is unbuffered
// W32X2 and W16X4 always by-pass the multiplier.
// Each term carries the control tag of its operand words: 'sub' subtracts,
// 'replace' (honoured only on a pass started with clear) writes the operand
// instead of accumulating, 'out_next' advances the output address counter
// after the term.  The output address counter starts at 0 on every pass.
// When two consecutive terms update the same output word the second would
// read it before the first has written it; the first term's result is then
// forwarded to the adder.  Overflow flags are per lane and sticky until a
// pass started with clear.
//
// Interface: start (pulse, idle only) runs one pass of the address program;
// busy is high until its last write.  ce is the master clock enable used
// for single stepping: the processing pipe advances only when it is high;
// ADC writes and host access are not gated.  in_sel / out_sel are the
// buffer select lines.  Host access (h_*) reaches every memory, the
// configuration register (target T_CFG, bits 2:0) and the status word
// (T_STATUS: bit 4 busy, bits 3:0 overflow); h_rdata is valid the cycle
// after h_re and the host must use it only while the module is idle.
// The pipeline lengths, issue interval, data widths, lane splits, overflow
// flagging, double buffering and Base/Displacement addressing are as
// published; the stage timing inside the latency, the operand formation of
// the split modes, the tag encoding and the result forwarding are this
// design's own choices.
module functional_module
  import rsc_pkg::*;
#(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 16,
  parameter int unsigned OW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          start,
  input  logic          clear,
  input  logic          in_sel,
  input  logic          out_sel,
  output logic          busy,
  output logic [3:0]    ovf,
  // ADC side
  input  logic          adc_we,
  input  logic          adc_restart,
  input  logic [DW-1:0] adc_l,
  input  logic [DW-1:0] adc_r,
  // host / Master Control access
  input  logic          h_we,
  input  logic          h_re,
  input  fm_target_e    h_target,
  input  logic [AW-1:0] h_addr,
  input  logic [OW-1:0] h_wdata,
  output logic [OW-1:0] h_rdata
);
  fm_cfg_t cfg;
  logic    byp;        // multiplier by-passed for this configuration
  assign byp = cfg.bypass || cfg.mode == W32X2 || cfg.mode == W16X4;

  // ---------------- sequencing ----------------
  logic              running, clr_run;
  logic [2:0]        phase;
  logic [SR_LEN-1:0] sr;
  logic              issue, ag_done;

  assign issue = ce && running && !ag_done && phase == 3'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; clr_run <= 1'b0; phase <= '0; sr <= '0;
    end else begin
      if (start && !busy) begin
        running <= 1'b1; clr_run <= clear; phase <= '0;
      end else if (ce) begin
        phase <= (phase == 3'(II - 1)) ? '0 : phase + 1'b1;
        sr    <= {sr[SR_LEN-2:0], issue};
        if (running && ag_done && sr == '0) running <= 1'b0;
      end
    end
  end
  assign busy = running;

  // stage strobes
  logic s_read, s_adv, s_add, s_in, s_m1, s_m2, s_ord, s_acc, s_wr, fwd_ok;
  assign s_read = ce && sr[S_OPREAD];
  assign s_adv  = ce && sr[S_ADV];
  assign s_add  = ce && sr[S_ADD];
  assign s_in   = ce && sr[S_INREAD];
  assign s_m1   = ce && sr[S_MUL1] && !byp;
  assign s_m2   = ce && sr[S_MUL2] && !byp;
  assign s_ord  = ce && (byp ? sr[S_OREAD_B] : sr[S_OREAD_M]);
  assign s_acc  = ce && (byp ? sr[S_ACC_B]   : sr[S_ACC_M]);
  assign s_wr   = ce && (byp ? sr[S_WR_B]    : sr[S_WR_M]);
  // a term was issued one interval before the one now in the adder stage
  assign fwd_ok = byp ? sr[S_ACC_B + II] : sr[S_ACC_M + II];

  // ---------------- host decode ----------------
  logic hw_l, hr_l, hw_r, hr_r, hw_op, hr_op, hw_out, hr_out;
  assign hw_l   = h_we && (h_target == T_IN_L0 || h_target == T_IN_L1);
  assign hr_l   = h_re && (h_target == T_IN_L0 || h_target == T_IN_L1);
  assign hw_r   = h_we && (h_target == T_IN_R0 || h_target == T_IN_R1);
  assign hr_r   = h_re && (h_target == T_IN_R0 || h_target == T_IN_R1);
  assign hw_op  = h_we && (h_target == T_BASE || h_target == T_DISP1 || h_target == T_DISP2);
  assign hr_op  = h_re && (h_target == T_BASE || h_target == T_DISP1 || h_target == T_DISP2);
  assign hw_out = h_we && h_target == T_OUT;
  assign hr_out = h_re && h_target == T_OUT;

  logic [1:0] op_sel;
  always_comb begin
    unique case (h_target)
      T_DISP1: op_sel = 2'd1;
      T_DISP2: op_sel = 2'd2;
      default: op_sel = 2'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg <= '0;
    else if (h_we && h_target == T_CFG && !busy) cfg <= fm_cfg_t'(h_wdata[2:0]);
  end

  // ---------------- address generation ----------------
  logic [AW-1:0] la, ra;
  tag_t          tag_a;
  logic [DW-1:0] op_hrdata;
  address_generator #(.AW(AW), .OPW(DW)) u_ag (
    .clk, .rst_n, .start(start && !busy),
    .s_issue(issue), .s_read, .s_adv, .s_add,
    .left_addr(la), .right_addr(ra), .tag(tag_a), .done(ag_done),
    .h_we(hw_op), .h_re(hr_op), .h_sel(op_sel), .h_addr, .h_wdata(h_wdata[DW-1:0]),
    .h_rdata(op_hrdata));

  // ---------------- Data Input Buffers ----------------
  logic [DW-1:0] l_sel, l_oth, r_sel, r_oth, l_hr, r_hr;
  input_buffer_pair #(.AW(AW), .DW(DW)) u_left (
    .clk, .rst_n, .sel(in_sel),
    .adc_we, .adc_restart, .adc_data(adc_l), .adc_addr(),
    .rd_en(s_in), .rd_addr(la), .rd_sel(l_sel), .rd_oth(l_oth),
    .h_we(hw_l), .h_re(hr_l), .h_bank(h_target == T_IN_L1), .h_addr,
    .h_wdata(h_wdata[DW-1:0]), .h_rdata(l_hr));
  input_buffer_pair #(.AW(AW), .DW(DW)) u_right (
    .clk, .rst_n, .sel(in_sel),
    .adc_we, .adc_restart, .adc_data(adc_r), .adc_addr(),
    .rd_en(s_in), .rd_addr(ra), .rd_sel(r_sel), .rd_oth(r_oth),
    .h_we(hw_r), .h_re(hr_r), .h_bank(h_target == T_IN_R1), .h_addr,
    .h_wdata(h_wdata[DW-1:0]), .h_rdata(r_hr));

  // tag and output address at the buffer-read stage
  logic [AW-1:0] oa_cnt, oa_in, oa_m1, oa_m2, oa_rd, oa_acc;
  tag_t          tag_in, tag_m1, tag_m2, tag_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oa_cnt <= '0; oa_in <= '0; tag_in <= '0;
    end else if (start && !busy) begin
      oa_cnt <= '0;
    end else if (s_in) begin
      oa_in  <= oa_cnt;
      tag_in <= tag_a;
      if (tag_a.d1.out_next) oa_cnt <= oa_cnt + 1'b1;
    end
  end

  // ---------------- multiplier ----------------
  logic signed [2*DW-1:0] prod;
  pipelined_multiplier #(.DW(DW)) u_mul (
    .clk, .en1(s_m1), .en2(s_m2), .a(l_sel), .b(r_sel), .p(prod));

  always_ff @(posedge clk) begin
    if (s_m1) begin oa_m1 <= oa_in; tag_m1 <= tag_in; end
    if (s_m2) begin oa_m2 <= oa_m1; tag_m2 <= tag_m1; end
  end

  // ---------------- operand former and output read ----------------
  logic [OW-1:0] operand, operand_q;
  always_comb begin
    logic signed [2*DW-1:0] x;
    x = byp ? (2*DW)'($signed(l_sel)) : prod;
    unique case (cfg.mode)
      W64:     operand = OW'(x);
      W48:     operand = {16'h0, 48'(x)};
      W32X2:   operand = {32'($signed(r_sel)), 32'($signed(l_sel))};
      default: operand = {r_oth, l_oth, r_sel, l_sel};
    endcase
  end

  logic [OW-1:0] acc_q, w_data, sum, sum_q;
  logic [AW-1:0] w_addr;
  logic          w_valid;
  logic [3:0]    lane_ovf;

  always_ff @(posedge clk) begin
    if (s_ord) begin
      operand_q <= operand;
      oa_rd     <= byp ? oa_in  : oa_m2;
      tag_rd    <= byp ? tag_in : tag_m2;
    end
    if (s_acc) begin
      oa_acc  <= oa_rd;
    end
  end

  logic [OW-1:0] om_hrdata, om_prdata;
  output_memory #(.AW(AW), .W(OW)) u_out (
    .clk, .sel(out_sel),
    .p_re(s_ord), .p_raddr(byp ? oa_in : oa_m2), .p_rdata(om_prdata),
    .p_we(s_wr), .p_waddr(oa_acc), .p_wdata(sum_q),
    .h_we(hw_out), .h_re(hr_out), .h_addr, .h_wdata, .h_rdata(om_hrdata));

  // ---------------- adder/subtractor ----------------
  logic fwd_hit, repl;
  assign fwd_hit = fwd_ok && w_valid && (w_addr == oa_rd);
  assign repl    = clr_run && tag_rd.d1.replace;
  always_comb acc_q = repl ? '0 : (fwd_hit ? w_data : om_prdata);

  segmented_adder #(.W(OW)) u_add (
    .a(acc_q), .b(operand_q), .sub(tag_rd.d1.sub), .mode(cfg.mode),
    .y(sum), .ovf(lane_ovf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0; w_data <= '0; w_addr <= '0; w_valid <= 1'b0; ovf <= '0;
    end else begin
      if (start && !busy) begin
        w_valid <= 1'b0;
        if (clear) ovf <= '0;
      end
      if (s_acc) begin
        sum_q <= sum;
        ovf   <= ovf | lane_ovf;
      end
      if (s_wr) begin
        w_data  <= sum_q;
        w_addr  <= oa_acc;
        w_valid <= 1'b1;
      end
    end
  end

  // ---------------- host read mux ----------------
  fm_target_e    ht_q;
  logic [OW-1:0] cs_q;
  always_ff @(posedge clk) begin
    if (h_re) begin
      ht_q <= h_target;
      cs_q <= (h_target == T_CFG) ? OW'(cfg) : OW'({busy, ovf});
    end
  end
  always_comb begin
    unique case (ht_q)
      T_IN_L0, T_IN_L1:        h_rdata = OW'(l_hr);
      T_IN_R0, T_IN_R1:        h_rdata = OW'(r_hr);
      T_BASE, T_DISP1, T_DISP2: h_rdata = OW'(op_hrdata);
      T_OUT:                   h_rdata = om_hrdata;
      default:                 h_rdata = cs_q;
    endcase
  end

  // start is only accepted while idle; host writes to the configuration
  // only while idle
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("start while busy");
endmodule
