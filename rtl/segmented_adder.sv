// segmented_adder: 64-bit adder/subtractor whose carry chain can be cut into
// independent lanes, with a signed overflow flag per lane.
//
// The word is handled as four 16-bit chunks.  The mode decides where the
// carry passes from one chunk to the next: W64 chains all four, W48 chains
// the low three and forces the top chunk to zero, W32X2 cuts between chunks
// 1 and 2, W16X4 cuts everywhere.  Subtraction adds the inverted operand
// with a carry-in of one at the bottom of every lane.  ovf[i] is set for the
// lane whose top chunk is i when the signed result of that lane overflows
// (for W64 that is ovf[3], W48 ovf[2], W32X2 ovf[1] and ovf[3]).
// Purely combinational.  The lane splits and the overflow flagging follow
// the published description of the data path; the chunked structure is this
// design's choice.
module segmented_adder
  import rsc_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          sub,
  input  width_mode_e   mode,
  output logic [W-1:0]  y,
  output logic [3:0]    ovf
);
  localparam int unsigned C = W / 4;   // chunk width

  logic [3:0] lane_start;   // chunk begins a lane (takes the carry-in)
  logic [3:0] lane_top;     // chunk ends a lane (overflow checked)

  always_comb begin
    unique case (mode)
      W64:     begin lane_start = 4'b0001; lane_top = 4'b1000; end
      W48:     begin lane_start = 4'b0001; lane_top = 4'b0100; end
      W32X2:   begin lane_start = 4'b0101; lane_top = 4'b1010; end
      default: begin lane_start = 4'b1111; lane_top = 4'b1111; end
    endcase
  end

  always_comb begin
    logic          carry;
    logic [C:0]    s;
    logic [C-1:0]  bb;
    carry = 1'b0;
    y     = '0;
    ovf   = '0;
    for (int i = 0; i < 4; i++) begin
      bb = sub ? ~b[i*C +: C] : b[i*C +: C];
      if (lane_start[i]) carry = sub;
      s = {1'b0, a[i*C +: C]} + {1'b0, bb} + {{C{1'b0}}, carry};
      y[i*C +: C] = s[C-1:0];
      carry = s[C];
      if (lane_top[i])
        ovf[i] = (a[i*C+C-1] == bb[C-1]) && (s[C-1] != a[i*C+C-1]);
    end
    if (mode == W48) begin
      y[3*C +: C] = '0;
      ovf[3]      = 1'b0;
    end
  end
endmodule
