// rsc_pkg: types and constants shared by the Radar Signal Compender RTL.
//
// Holds the Functional Module configuration register layout, the control
// tags that travel with every processing term, the host-visible memory
// targets, the Master Control command format and the pipeline timing of the
// Functional Module.  The 5-cycle initiation interval and the 23/18-cycle
// latency (multiplier used / bypassed) are the published figures of the
// machine; the cycle at which each stage loads inside that latency, the bit
// assignment of the 5 control bits of each operand word and all encodings
// below are this design's own choices.
package rsc_pkg;

  // Memory geometry: every memory is 2k words deep.
  localparam int unsigned P_AW = 11;
  localparam int unsigned P_DW = 16;   // Data Input Buffer and operand word
  localparam int unsigned P_OW = 64;   // output memory word (two 32-bit halves)

  // Data path split selected by the configuration register.
  typedef enum logic [1:0] {
    W64   = 2'd0,   // one 64-bit accumulation
    W48   = 2'd1,   // one 48-bit accumulation in bits 47:0, bits 63:48 zero
    W32X2 = 2'd2,   // two independent 32-bit accumulations
    W16X4 = 2'd3    // four independent 16-bit accumulations (unbuffered)
  } width_mode_e;

  typedef struct packed {
    logic        bypass;   // 1: multiplier by-passed (7-stage, 18-cycle pipe)
    width_mode_e mode;
  } fm_cfg_t;

  // Upper 5 bits of each 16-bit operand word, split into named flags.
  typedef struct packed {
    logic [2:0] rsvd;
    logic       hold_disp;   // bit 12: keep displacement counter running
    logic       last_range;  // bit 11: last range of the program
  } base_ctl_t;

  typedef struct packed {
    logic       rsvd;
    logic       replace;     // bit 14: first term of an output word
    logic       sub;         // bit 13: subtract instead of add
    logic       out_next;    // bit 12: advance the output address afterwards
    logic       end_terms;   // bit 11: last term of this range
  } disp_ctl_t;

  typedef struct packed {
    base_ctl_t  b;
    disp_ctl_t  d1;
    logic [4:0] d2;          // second displacement flags: carried, unused
  } tag_t;

  // Host / Master Control access targets inside one Functional Module.
  typedef enum logic [3:0] {
    T_IN_L0  = 4'd0,  T_IN_L1 = 4'd1,  T_IN_R0 = 4'd2,  T_IN_R1 = 4'd3,
    T_BASE   = 4'd4,  T_DISP1 = 4'd5,  T_DISP2 = 4'd6,
    T_OUT    = 4'd7,  // output bank not in use by the processing
    T_CFG    = 4'd8,  T_STATUS = 4'd9
  } fm_target_e;

  // Pipeline timing, in master-clock cycles after the issue of a term.
  localparam int unsigned II       = 5;
  localparam int unsigned S_OPREAD = 2;   // operand memories read
  localparam int unsigned S_ADV    = 3;   // address counters updated
  localparam int unsigned S_ADD    = 5;   // base + displacement adders
  localparam int unsigned S_INREAD = 7;   // Data Input Buffers read
  localparam int unsigned S_MUL1   = 10;  // multiplier partial products
  localparam int unsigned S_MUL2   = 13;  // multiplier final sum
  localparam int unsigned S_OREAD_M = 15, S_OREAD_B = 10; // output memory read
  localparam int unsigned S_ACC_M   = 18, S_ACC_B   = 13; // adder/subtractor
  localparam int unsigned S_WR_M    = 22, S_WR_B    = 17; // output memory write
  localparam int unsigned LAT_MULT = S_WR_M + 1;  // 23 cycles, 9 stages
  localparam int unsigned LAT_BYP  = S_WR_B + 1;  // 18 cycles, 7 stages
  localparam int unsigned SR_LEN   = S_ACC_M + II + 1;

  // Master Control commands.
  typedef enum logic [3:0] {
    OP_WRITE    = 4'd0,  // write data to target/addr of FM 'fm'
    OP_READ     = 4'd1,  // read target/addr of FM 'fm', raw
    OP_READF    = 4'd2,  // read and convert to float (data[0]: two lanes)
    OP_START    = 4'd3,  // start FMs in mask data; addr[0] = clear
    OP_SWAP_IN  = 4'd4,  // toggle the input buffer select line
    OP_SWAP_OUT = 4'd5,  // toggle the output buffer select line
    OP_STEP_MODE= 4'd6,  // data[0]: 1 single-step, 0 free run
    OP_STEP     = 4'd7,  // one master-clock step in single-step mode
    OP_ADC_CFG  = 4'd8,  // data[11:0] samples per raster, data[31:16] divider
    OP_STATUS   = 4'd9   // busy and overflow flags of all FMs
  } mc_op_e;

  typedef struct packed {
    mc_op_e      op;
    logic [7:0]  fm;
    fm_target_e  target;
    logic [P_AW-1:0] addr;
    logic [P_OW-1:0] data;
  } mc_cmd_t;

endpackage
