// dc_window: removes the record's DC level and applies a Hann window.
//
// The closed orbit gives the turn-by-turn samples a large constant offset that would
// swamp the low-frequency FFT bins, and the finite record leaks energy from the tune
// line into neighbouring bins. Each sample x[n] of the stream therefore becomes
//   y[n] = (x[n] - mean) * w[n],   w[n] = (1 - cos(2*pi*n/N)) / 2,
// with the record mean supplied alongside the stream. The window is a ROM of N
// unsigned 17-bit values (1.0 = 2^16), computed at elaboration from the formula above.
// The Hann window also suits the parabolic interpolation of the spectral peak done
// later, its main lobe being close to a parabola around the maximum.
//
// Timing: fully pipelined, one sample per clock, latency 2 cycles; out_idx and
// out_last follow their input with the same latency.
// As in the original: a DC-removal and windowing stage before the FFT. The window shape,
// its precision and the pipeline are this design's choices.
module dc_window
  import tune_pkg::*;
#(
  parameter int N = N_FFT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic [$clog2(N)-1:0]     in_idx,
  input  logic signed [SAMP_W-1:0] in_data,
  input  logic signed [SAMP_W-1:0] in_mean,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [$clog2(N)-1:0]     out_idx,
  output logic signed [WIN_W-1:0]  out_data
);

  localparam int LN = $clog2(N);

  typedef logic [16:0] win_t [N];
  function automatic win_t mk_win();
    win_t t;
    for (int n = 0; n < N; n++)
      t[n] = 17'($rtoi(0.5 * (1.0 - $cos(2.0 * 3.14159265358979323846 * n / N)) * 65536.0 + 0.5));
    return t;
  endfunction
  localparam win_t WIN = mk_win();

  logic                    v1, l1;
  logic [LN-1:0]           i1;
  logic signed [SAMP_W:0]  d1;
  logic [16:0]             w1;
  logic signed [SAMP_W+18:0] prod;

  assign prod = d1 * $signed({1'b0, w1});

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; l1 <= 1'b0; i1 <= '0; d1 <= '0; w1 <= '0;
      out_valid <= 1'b0; out_last <= 1'b0; out_idx <= '0; out_data <= '0;
    end else begin
      v1 <= in_valid;
      l1 <= in_last && in_valid;
      i1 <= in_idx;
      d1 <= (SAMP_W+1)'(in_data) - (SAMP_W+1)'(in_mean);
      w1 <= WIN[in_idx];
      out_valid <= v1;
      out_last  <= l1;
      out_idx   <= i1;
      out_data  <= WIN_W'(prod >>> 16);
    end
  end

endmodule
