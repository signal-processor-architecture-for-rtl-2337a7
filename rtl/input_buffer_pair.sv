// input_buffer_pair: one double-buffered pair of 2k x 16 Data Input Buffers.
//
// The select line 'sel' names the bank that the processing pipeline reads
// at generated addresses; the other bank is written by the ADC at
// sequential addresses from its own counter, so sampling and processing
// never compete for a memory cycle.  Swapping the two is a change of 'sel'.
// adc_restart clears the sequential counter (start of a raster); every
// adc_we writes adc_data to the non-selected bank at the counter value and
// advances it.  The host can load either bank directly (h_we, h_bank) for
// test or off-line use; a host write takes priority over an ADC write to the
// same bank in the same cycle.
// Reads: rd_en (processing) or h_re (host) reads both banks at one address;
// rd_sel / rd_oth are the words of the selected and the other bank and
// h_rdata the word of bank h_bank, all valid from the next clock edge.  The
// host must not read while the pipeline does.
// The double buffering, the sequential ADC counter and the host load path
// are as published; port names, priorities and timing are this design's.
module input_buffer_pair #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  // ADC side
  input  logic          adc_we,
  input  logic          adc_restart,
  input  logic [DW-1:0] adc_data,
  output logic [AW-1:0] adc_addr,
  // processing read side
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_sel,
  output logic [DW-1:0] rd_oth,
  // host test access
  input  logic          h_we,
  input  logic          h_re,
  input  logic          h_bank,
  input  logic [AW-1:0] h_addr,
  input  logic [DW-1:0] h_wdata,
  output logic [DW-1:0] h_rdata
);
  logic [DW-1:0] q [2];
  logic          sel_q, hbank_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           adc_addr <= '0;
    else if (adc_restart) adc_addr <= '0;
    else if (adc_we)      adc_addr <= adc_addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rd_en || h_re) begin
      sel_q   <= sel;
      hbank_q <= h_bank;
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_bank
    logic          we;
    logic [AW-1:0] waddr;
    logic [DW-1:0] wdata;
    always_comb begin
      if (h_we && h_bank == 1'(i)) begin
        we = 1'b1; waddr = h_addr; wdata = h_wdata;
      end else begin
        we = adc_we && !adc_restart && sel != 1'(i);
        waddr = adc_addr; wdata = adc_data;
      end
    end
    sram_1r1w #(.DEPTH(1 << AW), .WIDTH(DW)) u_mem (
      .clk, .we, .waddr, .wdata,
      .re(rd_en || h_re), .raddr(h_re ? h_addr : rd_addr), .rdata(q[i])
    );
  end

  assign rd_sel  = q[sel_q];
  assign rd_oth  = q[!sel_q];
  assign h_rdata = q[hbank_q];
endmodule
