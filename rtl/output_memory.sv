// output_memory: double-buffered 2k x 64 Output Data Memory.
//
// Four 32-bit memories, paired into two 64-bit banks as in the published
// machine.  The bank named by 'sel' belongs to the
// accumulator, which reads a word (p_re/p_raddr, data on p_rdata from the
// next edge) and later writes the updated word back (p_we).  The other bank
// belongs to the host, which reads out finished results or loads test data
// through h_*, with h_rdata valid from the edge after h_re.  Changing 'sel'
// hands the finished bank to the host and a fresh one to the accumulator.
// The pairing and double buffering follow the published description; the
// port arrangement is this design's.
module output_memory #(
  parameter int unsigned AW = 11,
  parameter int unsigned W  = 64
) (
  input  logic          clk,
  input  logic          sel,
  input  logic          p_re,
  input  logic [AW-1:0] p_raddr,
  output logic [W-1:0]  p_rdata,
  input  logic          p_we,
  input  logic [AW-1:0] p_waddr,
  input  logic [W-1:0]  p_wdata,
  input  logic          h_we,
  input  logic          h_re,
  input  logic [AW-1:0] h_addr,
  input  logic [W-1:0]  h_wdata,
  output logic [W-1:0]  h_rdata
);
  logic [W-1:0] q [2];
  logic         psel_q, hsel_q;

  always_ff @(posedge clk) begin
    if (p_re) psel_q <= sel;
    if (h_re) hsel_q <= !sel;
  end

  // bank i is built from two W/2-bit memories (low and high half)
  for (genvar i = 0; i < 2; i++) begin : g_bank
    logic own;   // bank i belongs to the accumulator
    assign own = (sel == 1'(i));
    for (genvar h = 0; h < 2; h++) begin : g_half
      sram_1r1w #(.DEPTH(1 << AW), .WIDTH(W / 2)) u_mem (
        .clk,
        .we   (own ? p_we    : h_we),
        .waddr(own ? p_waddr : h_addr),
        .wdata(own ? p_wdata[h*(W/2) +: W/2] : h_wdata[h*(W/2) +: W/2]),
        .re   (own ? p_re    : h_re),
        .raddr(own ? p_raddr : h_addr),
        .rdata(q[i][h*(W/2) +: W/2])
      );
    end
  end

  assign p_rdata = q[psel_q];
  assign h_rdata = q[hsel_q];
endmodule
