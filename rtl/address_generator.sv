// address_generator: Base plus Displacement addressing of the Data Input
// Buffers.
//
// Three 2k x 16 operand memories hold the program: the Base Operand Memory
// (one word per range) and the First and Second Displacement Operand
// Memories (one word per term, read at a common address).  A Base counter
// and a Displacement counter walk them as a nested loop: the outer loop
// indexes the range, the inner loop the terms contributing to it.  For each
// term the left address is base[10:0] + disp1[10:0] and the right address
// base[10:0] + disp2[10:0] (modulo 2k); the upper 5 bits of the three words
// leave as a control tag that follows the term down the pipeline.
//
// Counter control (this design's encoding of the 5 control bits):
//   disp1[11] end_terms  - last term of the range: the Base counter steps;
//                          the Displacement counter restarts at 0 unless
//                          base[12] hold_disp is set, then it steps on.
//   base[11]  last_range - with end_terms, ends the program (done).
// Strobes from the Functional Module sequence one term:
//   s_issue  latch the counters as operand memory addresses
//   s_read   read the three operand memories
//   s_adv    update the counters from the words just read
//   s_add    register left_addr, right_addr and tag
// start clears both counters and done.  The host loads and reads back the
// operand memories through h_* while the pipeline is idle (h_rdata valid
// from the edge after h_re).
// The memories, counters, adders and the 11+5 bit split follow the
// published addressing scheme; the strobe timing and the control bit
// assignment are this design's.
module address_generator
  import rsc_pkg::*;
#(
  parameter int unsigned AW  = 11,
  parameter int unsigned OPW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           s_issue,
  input  logic           s_read,
  input  logic           s_adv,
  input  logic           s_add,
  output logic [AW-1:0]  left_addr,
  output logic [AW-1:0]  right_addr,
  output tag_t           tag,
  output logic           done,
  // host access: h_sel 0 base, 1 first disp, 2 second disp
  input  logic           h_we,
  input  logic           h_re,
  input  logic [1:0]     h_sel,
  input  logic [AW-1:0]  h_addr,
  input  logic [OPW-1:0] h_wdata,
  output logic [OPW-1:0] h_rdata
);
  logic [AW-1:0]  bptr, dptr;       // Base / Displacement address counters
  logic [AW-1:0]  b_raddr, d_raddr; // operand memory addresses of this term
  logic [OPW-1:0] bq, d1q, d2q;     // operand words
  logic [1:0]     hsel_q;
  base_ctl_t      bctl;
  disp_ctl_t      dctl;

  assign bctl = base_ctl_t'(bq[OPW-1:AW]);
  assign dctl = disp_ctl_t'(d1q[OPW-1:AW]);

  // Address Counter Control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bptr <= '0; dptr <= '0; done <= 1'b0;
      b_raddr <= '0; d_raddr <= '0;
    end else if (start) begin
      bptr <= '0; dptr <= '0; done <= 1'b0;
    end else begin
      if (s_issue) begin
        b_raddr <= bptr;
        d_raddr <= dptr;
      end
      if (s_adv) begin
        if (dctl.end_terms) begin
          if (bctl.last_range) done <= 1'b1;
          bptr <= bptr + 1'b1;
          dptr <= bctl.hold_disp ? dptr + 1'b1 : '0;
        end else begin
          dptr <= dptr + 1'b1;
        end
      end
    end
  end

  // Operand memories
  logic re;
  assign re = s_read || h_re;
  sram_1r1w #(.DEPTH(1 << AW), .WIDTH(OPW)) u_base (
    .clk, .we(h_we && h_sel == 2'd0), .waddr(h_addr), .wdata(h_wdata),
    .re, .raddr(h_re ? h_addr : b_raddr), .rdata(bq));
  sram_1r1w #(.DEPTH(1 << AW), .WIDTH(OPW)) u_disp1 (
    .clk, .we(h_we && h_sel == 2'd1), .waddr(h_addr), .wdata(h_wdata),
    .re, .raddr(h_re ? h_addr : d_raddr), .rdata(d1q));
  sram_1r1w #(.DEPTH(1 << AW), .WIDTH(OPW)) u_disp2 (
    .clk, .we(h_we && h_sel == 2'd2), .waddr(h_addr), .wdata(h_wdata),
    .re, .raddr(h_re ? h_addr : d_raddr), .rdata(d2q));

  always_ff @(posedge clk) if (h_re) hsel_q <= h_sel;
  assign h_rdata = (hsel_q == 2'd0) ? bq : (hsel_q == 2'd1) ? d1q : d2q;

  // Address adders
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_addr <= '0; right_addr <= '0; tag <= '0;
    end else if (s_add) begin
      left_addr  <= bq[AW-1:0] + d1q[AW-1:0];
      right_addr <= bq[AW-1:0] + d2q[AW-1:0];
      tag        <= '{b: bctl, d1: dctl, d2: d2q[OPW-1:AW]};
    end
  end
endmodule
