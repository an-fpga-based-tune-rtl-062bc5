// cordic_magphase: converts FFT bins from I/Q (real/imaginary) to magnitude and phase.
//
// The peak search works on the magnitude of each bin; the phase is passed on with it.
// A vectoring CORDIC rotates the vector (I, Q) onto the positive real axis in ITER
// micro-rotations by +-atan(2^-i), each needing only shifts and adds; the accumulated
// angle is the phase and the final real part is the magnitude times the CORDIC gain
// (about 1.6468), which one constant multiplication (by round(0.60725 * 2^16)) removes.
// A first stage folds vectors in the left half-plane into the right one by negation
// and a 180 degree phase offset, so all angles converge. GUARD fraction bits below the
// input LSB keep the truncation of the shifted terms from biasing small vectors.
//
// Units: magnitude in the input's units (MAG_W bits, unsigned, saturated); phase
// PH_W bits with a full circle = 2^PH_W (two's complement, -pi..pi).
// Timing: fully pipelined, one bin per clock, latency ITER + 2 cycles; idx and last
// travel with the data.
// As in the original: an I/Q to magnitude/phase stage after the FFT. The CORDIC method,
// its iteration count and precision are this design's choices.
module cordic_magphase
  import tune_pkg::*;
#(
  parameter int ITER  = 16,
  parameter int IDX_W = $clog2(N_FFT) - 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic [IDX_W-1:0]         in_idx,
  input  logic signed [FFT_W-1:0]  in_re,
  input  logic signed [FFT_W-1:0]  in_im,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [IDX_W-1:0]         out_idx,
  output logic [MAG_W-1:0]         out_mag,
  output logic signed [PH_W-1:0]   out_phase
);

  localparam int GUARD = 5;             // fraction bits below the input LSB
  localparam int IW = FFT_W + 2 + GUARD;
  localparam int GAIN_COMP = 39797;   // round(2^16 / 1.646760258)

  typedef logic signed [PH_W-1:0] atan_t [ITER];
  function automatic atan_t mk_atan();
    atan_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = PH_W'($rtoi($atan(1.0 / (2.0 ** i)) / (2.0 * 3.14159265358979323846) * (2.0 ** PH_W) + 0.5));
    return t;
  endfunction
  localparam atan_t ATAN = mk_atan();

  logic signed [IW-1:0]   xs [ITER+1];
  logic signed [IW-1:0]   ys [ITER+1];
  logic signed [PH_W-1:0] zs [ITER+1];
  logic                   vs [ITER+1];
  logic                   ls [ITER+1];
  logic [IDX_W-1:0]       ix [ITER+1];
  logic signed [IW+17:0]  scaled;

  assign scaled = xs[ITER] * $signed(18'(GAIN_COMP));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= ITER; i++) begin
        xs[i] <= '0; ys[i] <= '0; zs[i] <= '0;
        vs[i] <= 1'b0; ls[i] <= 1'b0; ix[i] <= '0;
      end
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_mag   <= '0;
      out_phase <= '0;
    end else begin
      // stage 0: fold into the right half-plane
      vs[0] <= in_valid;
      ls[0] <= in_last && in_valid;
      ix[0] <= in_idx;
      if (in_re < 0) begin
        xs[0] <= -(IW'(in_re) <<< GUARD);
        ys[0] <= -(IW'(in_im) <<< GUARD);
        zs[0] <= PH_W'(1 << (PH_W - 1));
      end else begin
        xs[0] <= IW'(in_re) <<< GUARD;
        ys[0] <= IW'(in_im) <<< GUARD;
        zs[0] <= '0;
      end
      // micro-rotations
      for (int i = 0; i < ITER; i++) begin
        vs[i+1] <= vs[i];
        ls[i+1] <= ls[i];
        ix[i+1] <= ix[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ATAN[i];
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ATAN[i];
        end
      end
      // gain compensation
      out_valid <= vs[ITER];
      out_last  <= ls[ITER];
      out_idx   <= ix[ITER];
      out_phase <= zs[ITER];
      if ((scaled >>> (16 + GUARD)) > (IW+18)'({MAG_W{1'b1}}))
        out_mag <= '1;
      else if (scaled < 0)
        out_mag <= '0;
      else
        out_mag <= MAG_W'(scaled >>> (16 + GUARD));
    end
  end

endmodule
