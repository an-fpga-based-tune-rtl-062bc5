// turn_sampler: takes one sample per turn from the ADC stream.
//
// The pickup signal is a short burst once per turn (the bunch passing), so only the
// few ADC samples that fall on it carry position information. After each revolution
// marker `p0` the sampler waits `adc_delay` RF buckets, takes the first ADC sample at
// or after that point, adds `extra_samples` (0..15) following samples, and divides by
// their number. The result is one averaged turn-by-turn sample per turn.
//
// The ADC clock is BUCKETS_PER_CLK buckets long, so the delay is resolved by counting
// buckets in steps of BUCKETS_PER_CLK and sampling on the first clock whose bucket
// position is >= adc_delay (the p0 cycle is bucket 0). The division by n = extra+1 is a
// multiplication by floor(2^16 / n) from a 16-entry table computed at elaboration;
// the result keeps two bits below the ADC LSB: turn_sample = 4 * mean(ADC) (SAMP_W bits).
//
// Timing: `sample_instant` pulses on the cycle after the first sample of a turn is
// taken (it marks sampling points in the raw ADC record); `turn_valid` pulses
// extra_samples+2 cycles after that first sample, with `turn_sample`. A marker
// arriving while samples are still being summed is ignored.
// As in the original: the per-turn sampling, the bucket delay relative to the
// revolution clock and the averaging of additional samples per turn. The bucket
// arithmetic and the division method are this design's choices.
module turn_sampler
  import tune_pkg::*;
#(
  parameter int BPC = BUCKETS_PER_CLK
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [ADC_W-1:0]  adc,
  input  logic                     p0,
  input  logic [3:0]               extra_samples,
  input  logic [15:0]              adc_delay,
  output logic                     sample_instant,
  output logic                     turn_valid,
  output logic signed [SAMP_W-1:0] turn_sample
);

  localparam int ACC_W = ADC_W + 4;

  typedef logic [16:0] recip_t [17];
  function automatic recip_t mk_recip();
    recip_t r;
    r[0] = '0;
    for (int n = 1; n <= 16; n++) r[n] = 17'((1 << 16) / n);
    return r;
  endfunction
  localparam recip_t RECIP = mk_recip();

  logic [17:0]              bpos, cur_bpos;
  logic                     seek, seek_now, hit;
  logic                     busy;
  logic [3:0]               rem;
  logic [4:0]               nsamp;
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W+17:0] prod;

  always_comb begin
    cur_bpos = p0 ? '0 : bpos;
    seek_now = (p0 && !busy) || seek;
    hit      = seek_now && (cur_bpos >= {2'b00, adc_delay});
    prod     = acc * $signed({1'b0, RECIP[nsamp]});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bpos           <= '0;
      seek           <= 1'b0;
      busy           <= 1'b0;
      rem            <= '0;
      nsamp          <= 5'd1;
      acc            <= '0;
      sample_instant <= 1'b0;
      turn_valid     <= 1'b0;
      turn_sample    <= '0;
    end else begin
      sample_instant <= 1'b0;
      turn_valid     <= 1'b0;
      if (cur_bpos < 18'h3FFFF - 18'(BPC)) bpos <= cur_bpos + 18'(BPC);
      seek <= seek_now && !hit;
      if (hit) begin
        acc            <= ACC_W'(adc);
        rem            <= extra_samples;
        nsamp          <= {1'b0, extra_samples} + 5'd1;
        busy           <= 1'b1;
        sample_instant <= 1'b1;
      end else if (busy) begin
        if (rem == '0) begin
          busy        <= 1'b0;
          turn_valid  <= 1'b1;
          turn_sample <= SAMP_W'(prod >>> 14);
        end else begin
          acc <= acc + ACC_W'(adc);
          rem <= rem - 4'd1;
        end
      end
    end
  end

endmodule
