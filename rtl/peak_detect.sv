// peak_detect: finds the tune line in a magnitude spectrum and interpolates it.
//
// The magnitudes of bins 0..N/2-1 arrive as a stream. Only bins inside the operator's
// search range between start_tune and end_tune compete (the two limits may come in
// either order); the range (tune fractions, 16 bits, converted to bins as
// floor(tune * N / 2^16), both ends included) keeps synchrotron sidebands, the DC region and
// known spurious lines out of the search. The largest bin k in range is kept together
// with its neighbours m[k-1] and m[k+1] (which may lie just outside the range). A
// parabola through the three points puts the true line at k + d, with
//   d = (m[k+1] - m[k-1]) / (2 * (2*m[k] - m[k-1] - m[k+1])),   |d| <= 1/2,
// which refines the FFT's 1/N bin spacing well below one bin. The tune is
//   tune = (k + d) / N, output as a 16-bit fraction (tune = value / 2^16).
// d is computed as a Q16 fraction by a sequential divider on magnitudes (sign
// handled apart); a non-positive denominator (no true maximum) gives d = 0, and d is
// clamped to +-1/2. A missing neighbour (bin 0 or the last bin) counts as 0.
//
// Timing: the search runs at stream rate; the division starts on the cycle after
// `in_last` and takes DIV_NW clocks (MAG_W+17 = 49); `tune_valid` then pulses for one
// cycle with tune, peak_bin, peak_mag and `found` (low when no bin was in range, in
// which case tune is 0). A new spectrum may begin once `tune_valid` has pulsed.
// The divider's busy flag and remainder are not needed and are left open.
// As in the original: peak detection on the FFT magnitude within a start/end range per
// channel, refined by parabolic interpolation of the FFT result. The streaming search,
// the fixed-point formats and the edge rules are this design's choices.
module peak_detect
  import tune_pkg::*;
#(
  parameter int N = N_FFT
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic                   in_last,
  input  logic [$clog2(N)-2:0]   in_idx,
  input  logic [MAG_W-1:0]       in_mag,
  input  logic [TUNE_W-1:0]      start_tune,
  input  logic [TUNE_W-1:0]      end_tune,
  output logic                   tune_valid,
  output logic                   found,
  output logic [TUNE_W-1:0]      tune,
  output logic [$clog2(N)-2:0]   peak_bin,
  output logic [MAG_W-1:0]       peak_mag
);

  localparam int LN     = $clog2(N);
  localparam int BW     = LN - 1;
  localparam int DIV_NW = MAG_W + 17;
  localparam int DIV_DW = MAG_W + 3;

  typedef enum logic [1:0] {P_SCAN, P_SETUP, P_DIV, P_OUT} pstate_e;

  pstate_e             st;
  logic [MAG_W-1:0]    prev, best, left, right;
  logic [BW-1:0]       bin;
  logic                have, need_right;
  logic [LN:0]         sb, eb;
  logic                in_range, new_max;
  logic [TUNE_W-1:0]   lo_t, hi_t;

  logic signed [MAG_W+1:0] num;
  logic signed [MAG_W+3:0] den;
  logic                    neg;
  logic [MAG_W+1:0]        num_mag;
  logic                    div_start, div_done;
  logic [DIV_NW-1:0]       div_q;
  logic [DIV_NW-1:0]       num_abs;
  logic [DIV_DW-1:0]       den_abs;
  logic signed [17:0]      dq;
  logic signed [TUNE_W+LN+2:0] tfull;

  // search range in bins; the two limits may be given in either order
  assign lo_t = (start_tune <= end_tune) ? start_tune : end_tune;
  assign hi_t = (start_tune <= end_tune) ? end_tune : start_tune;
  assign sb = (LN+1)'((32'(lo_t) * N) >> TUNE_W);
  assign eb = (LN+1)'((32'(hi_t) * N) >> TUNE_W);
  assign in_range = ((LN+1)'(in_idx) >= sb) && ((LN+1)'(in_idx) <= eb);
  assign new_max  = in_range && (!have || in_mag > best);

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= P_SCAN;
      prev       <= '0;
      best       <= '0;
      left       <= '0;
      right      <= '0;
      bin        <= '0;
      have       <= 1'b0;
      need_right <= 1'b0;
      num        <= '0;
      den        <= '0;
      div_start  <= 1'b0;
      tune_valid <= 1'b0;
      found      <= 1'b0;
      tune       <= '0;
      peak_bin   <= '0;
      peak_mag   <= '0;
    end else begin
      div_start  <= 1'b0;
      tune_valid <= 1'b0;
      unique case (st)
        P_SCAN: if (in_valid) begin
          prev <= in_last ? '0 : in_mag;
          if (new_max) begin
            best       <= in_mag;
            bin        <= in_idx;
            left       <= (in_idx == '0) ? '0 : prev;
            right      <= '0;
            have       <= 1'b1;
            need_right <= !in_last;
          end else if (need_right) begin
            right      <= in_mag;
            need_right <= 1'b0;
          end
          if (in_last) st <= P_SETUP;
        end
        P_SETUP: begin
          num <= (MAG_W+2)'(right) - (MAG_W+2)'(left);
          den <= ((MAG_W+4)'(best) <<< 2) - ((MAG_W+4)'(left) <<< 1) - ((MAG_W+4)'(right) <<< 1);
          need_right <= 1'b0;
          st <= P_DIV;
          div_start <= 1'b1;
        end
        P_DIV: if (div_done) st <= P_OUT;
        P_OUT: begin
          tune_valid <= 1'b1;
          found      <= have;
          peak_bin   <= bin;
          peak_mag   <= best;
          if (!have)           tune <= '0;
          else if (tfull < 0)  tune <= '0;
          else                 tune <= TUNE_W'(tfull >>> LN);
          have <= 1'b0;
          best <= '0;
          st   <= P_SCAN;
        end
        default: st <= P_SCAN;
      endcase
    end
  end

  // |num| * 2^16 / |den|, sign applied afterwards
  always_comb begin
    neg     = num[MAG_W+1];
    num_mag = neg ? (MAG_W+2)'(-num) : (MAG_W+2)'(num);
    num_abs = DIV_NW'(num_mag) << 16;
    den_abs = (den > 0) ? DIV_DW'(den) : '0;
    if (den <= 0 || !have)
      dq = '0;
    else if (div_q > DIV_NW'(32768))
      dq = neg ? -18'sd32768 : 18'sd32768;
    else
      dq = neg ? -$signed({1'b0, div_q[16:0]}) : $signed({1'b0, div_q[16:0]});
    tfull = ($signed({1'b0, (TUNE_W+LN+2)'(bin)}) <<< TUNE_W) + (TUNE_W+LN+3)'(dq);
  end

  seq_divider #(.NW(DIV_NW), .DW(DIV_DW)) u_div (
    .clk      (clk),
    .rst      (rst),
    .start    (div_start),
    .dividend (num_abs),
    .divisor  (den_abs),
    .busy     (),
    .done     (div_done),
    .quotient (div_q),
    .remainder()
  );

endmodule
