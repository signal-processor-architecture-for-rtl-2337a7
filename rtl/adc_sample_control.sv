// adc_sample_control: ADC sample timing for one raster.
//
// When the radar timing controller signals the start of a raster, this
// block pulses 'restart' (which returns the Functional Modules' sequential
// input-buffer address counters to 0) and then issues num_samples
// 'convert' strobes, one every 'div' master-clock cycles (div 0 acts as 1).
// Each strobe starts a conversion and writes the converted sample into the
// input buffers; the converters are taken to present their sample in the
// same cycle.  'active' is high for the raster, 'done' pulses after the last
// strobe.  A raster_start during a raster is ignored.
// The published block diagram only names the ADC sample control and says the
// samples are written under external timing logic; the counters and their
// programming are this design's.
module adc_sample_control #(
  parameter int unsigned AW   = 11,
  parameter int unsigned DIVW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            raster_start,
  input  logic [AW:0]     num_samples,
  input  logic [DIVW-1:0] div,
  output logic            convert,
  output logic            restart,
  output logic            active,
  output logic            done
);
  logic [AW:0]     cnt;
  logic [DIVW-1:0] tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; tmr <= '0; convert <= 1'b0; restart <= 1'b0;
      active <= 1'b0; done <= 1'b0;
    end else begin
      convert <= 1'b0;
      restart <= 1'b0;
      done    <= 1'b0;
      if (!active) begin
        if (raster_start) begin
          restart <= 1'b1;
          active  <= (num_samples != '0);
          done    <= (num_samples == '0);
          cnt     <= '0;
          tmr     <= '0;
        end
      end else if (tmr != '0) begin
        tmr <= tmr - 1'b1;
      end else begin
        convert <= 1'b1;
        cnt     <= cnt + 1'b1;
        tmr     <= (div > 1) ? div - 1'b1 : '0;
        if (cnt + 1'b1 == num_samples) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
