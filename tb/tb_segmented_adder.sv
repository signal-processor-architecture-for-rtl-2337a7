// tb_segmented_adder: random and corner-case test of the lane-split
// adder/subtractor in all four word splits.  The reference treats each lane
// as a separate signed integer, adds or subtracts with extra headroom and
// flags overflow when the exact result leaves the lane's range.
module tb_segmented_adder;
  import rsc_pkg::*;
  logic [63:0] a, b, y;
  logic sub;
  width_mode_e mode;
  logic [3:0] ovf;
  int checks = 0, failures = 0;

  segmented_adder #(.W(64)) dut (.*);

  function automatic void ref_model(input logic [63:0] ra, rb, input logic rsub, input width_mode_e m,
                                    output logic [63:0] ry, output logic [3:0] rovf);
    int lo[4], wd[4], n;
    unique case (m)
      W64:   begin n = 1; lo[0] = 0; wd[0] = 64; end
      W48:   begin n = 1; lo[0] = 0; wd[0] = 48; end
      W32X2: begin n = 2; lo[0] = 0; wd[0] = 32; lo[1] = 32; wd[1] = 32; end
      default: begin n = 4; for (int i = 0; i < 4; i++) begin lo[i] = 16*i; wd[i] = 16; end end
    endcase
    ry = '0; rovf = '0;
    for (int k = 0; k < n; k++) begin
      logic signed [66:0] x, z, res, lim;
      logic [63:0] mask;
      mask = (wd[k] == 64) ? '1 : ((64'd1 << wd[k]) - 1);
      x = 67'((ra >> lo[k]) & mask);
      z = 67'((rb >> lo[k]) & mask);
      lim = 67'sd1 <<< (wd[k] - 1);
      if (x >= lim) x = x - (lim <<< 1);
      if (z >= lim) z = z - (lim <<< 1);
      res = rsub ? x - z : x + z;
      ry |= (64'(res) & mask) << lo[k];
      if (res >= lim || res < -lim) rovf[(lo[k] + wd[k]) / 16 - 1] = 1'b1;
    end
  endfunction

  initial begin
    logic [63:0] ey; logic [3:0] eovf;
    logic [63:0] corners [6] = '{64'h0, 64'h7FFF_7FFF_7FFF_7FFF, 64'h8000_8000_8000_8000,
                                 64'hFFFF_FFFF_FFFF_FFFF, 64'h0000_7FFF_FFFF_FFFF, 64'h1};
    for (int t = 0; t < 4000; t++) begin
      mode = width_mode_e'(t % 4);
      sub  = 1'((t / 4) % 2);
      if (t < 288) begin
        a = corners[(t / 8) % 6]; b = corners[(t / 48) % 6];
      end else begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
      end
      #1;
      ref_model(a, b, sub, mode, ey, eovf);
      checks++;
      if (y !== ey || ovf !== eovf) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d sub=%0d a=%h b=%h y=%h/%h ovf=%b/%b", mode, sub, a, b, y, ey, ovf, eovf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
