// rsc_top: the Radar Signal Compender, a programmable pipelined
// multiprocessor that accumulates radar samples, or products of samples,
// in real time.
//
// NUM_FM Functional Modules (FMs) work in parallel, each on its own pair of
// ADC input streams.  The Master Control connects the host to all FMs over
// one bus (programming, start, buffer select lines, single stepping,
// read-out with optional conversion to floating point).  ADC sample control
// turns a raster start from the radar timing controller into a train of
// convert strobes that write the samples into every FM's input buffers at
// sequential addresses.  The ADC converters, the radar timing controller
// and the host are outside this RTL: their signals are the ports.
// Interface: cmd_* / rsp_* host command channel (see master_control);
// raster_start input; adc_data[i][0] / [1] are the left / right samples of
// FM i, sampled on each adc_convert strobe; raster_active is high while a
// raster is being sampled and raster_done pulses at its end.
// Six FMs is the size of the published MST-radar machine; how the ADC
// channels are distributed to the FMs is this design's choice.
module rsc_top
  import rsc_pkg::*;
#(
  parameter int unsigned NUM_FM = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  mc_cmd_t          cmd,
  output logic             rsp_valid,
  output logic [P_OW-1:0]  rsp_data,
  input  logic             raster_start,
  input  logic [P_DW-1:0]  adc_data [NUM_FM][2],
  output logic             adc_convert,
  output logic             raster_active,
  output logic             raster_done
);
  logic [NUM_FM-1:0] fm_we, fm_re, fm_start, fm_busy;
  fm_target_e        fm_target;
  logic [P_AW-1:0]   fm_addr;
  logic [P_OW-1:0]   fm_wdata;
  logic [P_OW-1:0]   fm_rdata [NUM_FM];
  logic [3:0]        fm_ovf [NUM_FM];
  logic              fm_clear, in_sel, out_sel, ce, adc_restart;
  logic [P_AW:0]     adc_num;
  logic [15:0]       adc_div;

  master_control #(.NUM_FM(NUM_FM)) u_mc (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_data,
    .fm_we, .fm_re, .fm_target, .fm_addr, .fm_wdata, .fm_rdata,
    .fm_start, .fm_clear, .fm_busy, .fm_ovf, .in_sel, .out_sel, .ce,
    .adc_num, .adc_div);

  adc_sample_control #(.AW(P_AW), .DIVW(16)) u_adc (
    .clk, .rst_n, .raster_start, .num_samples(adc_num), .div(adc_div),
    .convert(adc_convert), .restart(adc_restart), .active(raster_active),
    .done(raster_done));

  for (genvar i = 0; i < NUM_FM; i++) begin : g_fm
    functional_module #(.AW(P_AW), .DW(P_DW), .OW(P_OW)) u_fm (
      .clk, .rst_n, .ce, .start(fm_start[i]), .clear(fm_clear),
      .in_sel, .out_sel, .busy(fm_busy[i]), .ovf(fm_ovf[i]),
      .adc_we(adc_convert), .adc_restart, .adc_l(adc_data[i][0]), .adc_r(adc_data[i][1]),
      .h_we(fm_we[i]), .h_re(fm_re[i]), .h_target(fm_target), .h_addr(fm_addr),
      .h_wdata(fm_wdata), .h_rdata(fm_rdata[i]));
  end
endmodule
