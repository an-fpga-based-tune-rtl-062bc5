// fft_core: N-point radix-2 FFT of one windowed turn-by-turn record.
//
// The betatron tune shows as a spectral line in the FFT of the turn-by-turn
// positions; its bin, refined by interpolation, gives the tune. This core takes the N
// real samples of a record as a stream, computes the complex spectrum in place and
// streams out bins 0..N/2-1 (the spectrum of real data is symmetric, so the upper half
// carries nothing new; tunes are read as fractions 0..0.5).
//
// Structure: one in-place memory of N complex words (FFT_W bits each part) and one
// butterfly. Loading writes sample n to address bitrev(n) with zero imaginary part.
// Decimation-in-time then runs LOG2(N) stages of N/2 butterflies, one butterfly per
// clock: for stage s and butterfly b, span = 2^s, i0 = (b / span) * 2 * span + b mod
// span, i1 = i0 + span, twiddle W = exp(-j*2*pi*(b mod span)*2^(LOG2N-1-s)/N);
//   X[i0] <- X[i0] + W*X[i1],  X[i1] <- X[i0] - W*X[i1].
// Twiddles are Q16 cosines and sines (18 bits signed) computed at elaboration. No
// scaling between stages: the word grows at most LOG2(N) bits over the input, which
// FFT_W = 32 holds for an 18-bit input and N = 1024.
//
// Timing: loading takes one clock per sample (in_last ends it); the transform takes
// LOG2(N) * N/2 clocks (5120 for N = 1024); output gives one bin per clock, out_last
// on bin N/2-1, starting 1 clock after the transform ends. `ready` is high while a new
// record may be loaded, i.e. after the last output bin has left.
// As in the original: an FFT of the per-ping record followed by magnitude/phase and
// peak detection. The algorithm, the single-butterfly architecture, the length and the
// word widths are this design's choices.
module fft_core
  import tune_pkg::*;
#(
  parameter int N = N_FFT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic [$clog2(N)-1:0]     in_idx,
  input  logic signed [WIN_W-1:0]  in_data,
  output logic                     ready,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [$clog2(N)-2:0]     out_idx,
  output logic signed [FFT_W-1:0]  out_re,
  output logic signed [FFT_W-1:0]  out_im
);

  localparam int LN = $clog2(N);
  localparam int TW = 18;

  typedef logic signed [TW-1:0] tw_t [N/2];
  function automatic tw_t mk_tw(input bit sine);
    tw_t t;
    real a;
    for (int k = 0; k < N/2; k++) begin
      a = 2.0 * 3.14159265358979323846 * k / N;
      t[k] = TW'($rtoi((sine ? $sin(a) : $cos(a)) * 65536.0 + (((sine ? $sin(a) : $cos(a)) >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam tw_t COS = mk_tw(1'b0);
  localparam tw_t SIN = mk_tw(1'b1);

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] v);
    for (int i = 0; i < LN; i++) bitrev[i] = v[LN-1-i];
  endfunction

  typedef enum logic [1:0] {F_LOAD, F_CALC, F_OUT} fstate_e;

  fstate_e                  st;
  logic [$clog2(LN)-1:0]    stage;
  logic [LN-2:0]            bfly, pos, twi, kout;
  logic [LN-1:0]            i0, i1;
  logic signed [FFT_W-1:0]  mre [N];
  logic signed [FFT_W-1:0]  mim [N];
  logic signed [FFT_W-1:0]  x0re, x0im, x1re, x1im, tre, tim;
  logic signed [TW-1:0]     c, s;
  logic signed [FFT_W+TW:0] pre, pim;

  always_comb begin
    pos  = bfly & ((LN-1)'((1 << stage) - 1));
    i0   = (LN'(bfly >> stage) << (stage + 1)) | LN'(pos);
    i1   = i0 | LN'(1 << stage);
    twi  = (LN-1)'(pos << (LN - 1 - int'(stage)));
    c    = COS[twi];
    s    = SIN[twi];
    x0re = mre[i0];
    x0im = mim[i0];
    x1re = mre[i1];
    x1im = mim[i1];
    // W * X[i1] with W = c - j*s
    pre  = x1re * c + x1im * s;
    pim  = x1im * c - x1re * s;
    tre  = FFT_W'(pre >>> 16);
    tim  = FFT_W'(pim >>> 16);
  end

  always_ff @(posedge clk) begin
    if (st == F_LOAD && in_valid) begin
      mre[bitrev(in_idx)] <= FFT_W'(in_data);
      mim[bitrev(in_idx)] <= '0;
    end else if (st == F_CALC) begin
      mre[i0] <= x0re + tre;
      mim[i0] <= x0im + tim;
      mre[i1] <= x0re - tre;
      mim[i1] <= x0im - tim;
    end
    out_re <= mre[LN'(kout)];
    out_im <= mim[LN'(kout)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= F_LOAD;
      stage     <= '0;
      bfly      <= '0;
      kout      <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (st)
        F_LOAD: if (in_valid && in_last) begin
                  stage <= '0;
                  bfly  <= '0;
                  st    <= F_CALC;
                end
        F_CALC: begin
                  bfly <= bfly + 1'b1;
                  if (bfly == '1) begin
                    if (int'(stage) == LN - 1) begin
                      kout <= '0;
                      st   <= F_OUT;
                    end else begin
                      stage <= stage + 1'b1;
                    end
                  end
                end
        F_OUT: begin
                  out_valid <= 1'b1;
                  out_last  <= (kout == '1);
                  out_idx <= kout;
                  kout    <= kout + 1'b1;
                  if (kout == '1) st <= F_LOAD;
                end
        default: st <= F_LOAD;
      endcase
    end
  end

  assign ready = (st == F_LOAD);

endmodule
