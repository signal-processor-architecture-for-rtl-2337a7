// int_to_float: converts a signed two's-complement integer to an IEEE-754
// single-precision number, for handing accumulated results to a host that
// works in floating point.
// The magnitude is normalised by locating its leading one; the exponent is
// 127 plus that bit position and the 23 bits below the leading one form the
// fraction, the rest are dropped (round toward zero).  Zero gives +0.0.
// Purely combinational.  The machine's Master Control carries integer to
// floating-point converters whose format depends on the host; IEEE single
// and truncation are this design's choice.
module int_to_float #(
  parameter int unsigned IW = 64
) (
  input  logic [IW-1:0] i,
  output logic [31:0]   f
);
  logic          neg;
  logic [IW-1:0] mag, norm;
  logic [7:0]    pos;
  logic          nz;

  always_comb begin
    neg = i[IW-1];
    mag = neg ? (~i + 1'b1) : i;
    pos = '0;
    nz  = 1'b0;
    for (int k = 0; k < IW; k++)
      if (mag[k]) begin pos = 8'(k); nz = 1'b1; end
    norm = mag << (8'(IW - 1) - pos);
    if (!nz) f = '0;
    else     f = {neg, 8'(8'd127 + pos), norm[IW-2 -: 23]};
  end
endmodule
