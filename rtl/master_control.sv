// master_control: command decoder between the host computer and the
// Functional Modules (FMs).
//
// The host sends one command at a time (cmd_valid/cmd_ready handshake, see
// rsc_pkg::mc_cmd_t) to program and run the machine:
//   OP_WRITE / OP_READ  load or read back one word of any FM memory, its
//                       configuration register or status (OP_READ answers
//                       on rsp_valid/rsp_data three cycles after acceptance)
//   OP_READF            read an output word and convert it to IEEE single:
//                       data[1:0] gives the word split (W64, W48: one value
//                       in bits 31:0; W32X2: lane 0 in 31:0, lane 1 in
//                       63:32; W16X4 is returned raw)
//   OP_START            start a pass on the idle FMs in mask data[NUM_FM-1:0]
//                       (addr[0] = clear: first pass of a new integration)
//   OP_SWAP_IN/OUT      toggle the input / output buffer select line
//   OP_STEP_MODE/STEP   single-step the master clock enable of the FMs
//   OP_ADC_CFG          samples per raster (data[11:0]) and master-clock
//                       cycles per sample (data[31:16]) for ADC sample control
//   OP_STATUS           {busy, ovf[3:0]} of FM i in bits 5i+4..5i
// Bus to the FMs: one-hot write/read enables and shared target, address and
// data, registered; read data returns the cycle after the read enable.
// The machine's Master Control is a Z80-based board whose command set is not
// published; this fixed decoder provides the functions it is described as
// serving (programming, test read-back, timing, buffer switching, single
// stepping, integer to floating-point conversion) with its own encoding.
module master_control
  import rsc_pkg::*;
#(
  parameter int unsigned NUM_FM = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host side
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  mc_cmd_t              cmd,
  output logic                 rsp_valid,
  output logic [P_OW-1:0]      rsp_data,
  // FM bus
  output logic [NUM_FM-1:0]    fm_we,
  output logic [NUM_FM-1:0]    fm_re,
  output fm_target_e           fm_target,
  output logic [P_AW-1:0]      fm_addr,
  output logic [P_OW-1:0]      fm_wdata,
  input  logic [P_OW-1:0]      fm_rdata [NUM_FM],
  output logic [NUM_FM-1:0]    fm_start,
  output logic                 fm_clear,
  input  logic [NUM_FM-1:0]    fm_busy,
  input  logic [3:0]           fm_ovf [NUM_FM],
  output logic                 in_sel,
  output logic                 out_sel,
  output logic                 ce,
  // ADC sample control programming
  output logic [P_AW:0]        adc_num,
  output logic [15:0]          adc_div
);
  localparam int unsigned FW = (NUM_FM > 1) ? $clog2(NUM_FM) : 1;
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_CAP, S_RSP} state_e;
  state_e        st;
  mc_cmd_t       c;
  logic [P_OW-1:0] cap;
  logic          step_mode, step_pulse;

  assign cmd_ready = (st == S_IDLE);
  assign ce        = !step_mode || step_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; cap <= '0;
      fm_we <= '0; fm_re <= '0; fm_target <= T_CFG; fm_addr <= '0; fm_wdata <= '0;
      fm_start <= '0; fm_clear <= 1'b0; in_sel <= 1'b0; out_sel <= 1'b0;
      step_mode <= 1'b0; step_pulse <= 1'b0; adc_num <= '0; adc_div <= '0;
    end else begin
      fm_we <= '0; fm_re <= '0; fm_start <= '0; step_pulse <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          c         <= cmd;
          fm_target <= cmd.target;
          fm_addr   <= cmd.addr;
          fm_wdata  <= cmd.data;
          st        <= S_IDLE;
          unique case (cmd.op)
            OP_WRITE:     if (32'(cmd.fm) < NUM_FM) fm_we[FW'(cmd.fm)] <= 1'b1;
            OP_READ, OP_READF: begin
              if (32'(cmd.fm) < NUM_FM) fm_re[FW'(cmd.fm)] <= 1'b1;
              st <= S_EXEC;
            end
            OP_START: begin
              fm_start <= cmd.data[NUM_FM-1:0] & ~fm_busy;
              fm_clear <= cmd.addr[0];
            end
            OP_SWAP_IN:   in_sel  <= !in_sel;
            OP_SWAP_OUT:  out_sel <= !out_sel;
            OP_STEP_MODE: step_mode <= cmd.data[0];
            OP_STEP:      step_pulse <= 1'b1;
            OP_ADC_CFG: begin
              adc_num <= cmd.data[P_AW:0];
              adc_div <= cmd.data[31:16];
            end
            OP_STATUS: begin
              cap <= '0;
              for (int i = 0; i < NUM_FM; i++)
                cap[5*i +: 5] <= {fm_busy[i], fm_ovf[i]};
              st <= S_RSP;
            end
            default: ;
          endcase
        end
        S_EXEC: st <= S_CAP;
        S_CAP: begin
          cap <= (32'(c.fm) < NUM_FM) ? fm_rdata[FW'(c.fm)] : '0;
          st  <= S_RSP;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // float conversion of the captured word
  logic [P_OW-1:0] cv0_in, cv1_in;
  logic [31:0]     f0, f1;
  always_comb begin
    unique case (width_mode_e'(c.data[1:0]))
      W48:     cv0_in = P_OW'($signed(cap[47:0]));
      W32X2:   cv0_in = P_OW'($signed(cap[31:0]));
      default: cv0_in = cap;
    endcase
    cv1_in = P_OW'($signed(cap[63:32]));
  end
  int_to_float #(.IW(P_OW)) u_cv0 (.i(cv0_in), .f(f0));
  int_to_float #(.IW(P_OW)) u_cv1 (.i(cv1_in), .f(f1));

  always_comb begin
    rsp_valid = (st == S_RSP);
    rsp_data  = cap;
    if (c.op == OP_READF) begin
      unique case (width_mode_e'(c.data[1:0]))
        W64, W48: rsp_data = {32'h0, f0};
        W32X2:    rsp_data = {f1, f0};
        default:  rsp_data = cap;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid && !cmd_ready |=> cmd_valid)
    else $error("host dropped a command before it was accepted");
endmodule
