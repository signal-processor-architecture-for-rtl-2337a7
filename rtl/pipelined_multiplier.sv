// pipelined_multiplier: signed 16 x 16 multiplier split over two pipeline
// stages of the Functional Module.
//
// On en1 the multiplicands are split: the signed multiplicand a is
// multiplied by the unsigned low byte and by the signed high byte of b, and
// the two partial products are registered.  On en2 the high partial product
// is shifted by 8 and added to the low one, giving the 32-bit product p,
// which holds until the next en2.  The two-stage split matches the two
// extra pipeline stages the multiplier adds to the published 7-stage
// by-pass pipe; the partial-product arrangement is this design's own.
module pipelined_multiplier #(
  parameter int unsigned DW = 16
) (
  input  logic                   clk,
  input  logic                   en1,
  input  logic                   en2,
  input  logic signed [DW-1:0]   a,
  input  logic signed [DW-1:0]   b,
  output logic signed [2*DW-1:0] p
);
  localparam int unsigned H = DW / 2;
  logic signed [DW+H:0]   pp_lo;   // a * unsigned b[H-1:0]
  logic signed [DW+H-1:0] pp_hi;   // a * signed b[DW-1:H]

  always_ff @(posedge clk) begin
    if (en1) begin
      pp_lo <= a * $signed({1'b0, b[H-1:0]});
      pp_hi <= a * $signed(b[DW-1:H]);
    end
    if (en2)
      p <= (2*DW)'(pp_lo) + ((2*DW)'(pp_hi) <<< H);
  end
endmodule
