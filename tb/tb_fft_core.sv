// tb_fft_core: transforms two records at the full length of 1024 points (two tones,
// a DC level and noise; then a single full-scale bin-centred cosine) and compares
// every output bin with a direct DFT computed here in floating point. Also checks
// the transform time of LOG2(N)*N/2 clocks and the output order.
module tb_fft_core;
  import tune_pkg::*;
  localparam int N = N_FFT, LN = $clog2(N);
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 0, in_last = 0;
  logic [LN-1:0] in_idx = '0;
  logic signed [WIN_W-1:0] in_data = '0;
  logic ready, out_valid, out_last;
  logic [LN-2:0] out_idx;
  logic signed [FFT_W-1:0] out_re, out_im;
  int checks = 0, failures = 0, cyc = 0, t_last = 0, t_first = -1, nout = 0;
  int x [N];
  real xr [N/2], xi [N/2];
  real sumabs, maxerr;

  fft_core #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_last) t_last = cyc;
    if (out_valid && !rst) begin
      real er, ei, tol;
      if (t_first < 0) t_first = cyc;
      tol = 3.0e-5 * sumabs + 40.0;
      er = real'(out_re) - xr[out_idx];
      ei = real'(out_im) - xi[out_idx];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (int'(out_idx) != nout || er > tol || ei > tol) begin
        failures++;
        if (failures < 10)
          $display("bin %0d (expected %0d): got %0d,%0d expected %f,%f", out_idx, nout, out_re, out_im, xr[out_idx], xi[out_idx]);
      end
      nout++;
    end
  end

  task automatic run(input int kind);
    for (int n = 0; n < N; n++) begin
      real v;
      if (kind == 0)
        v = 1500.0 + 40000.0 * $cos(2.0 * PI * 83.3 * n / N) + 25000.0 * $sin(2.0 * PI * 240.0 * n / N + 0.3)
            + real'($urandom_range(0, 2000)) - 1000.0;
      else
        v = 131071.0 * $cos(2.0 * PI * 100.0 * n / N);
      x[n] = $rtoi(v);
    end
    sumabs = 0.0;
    for (int n = 0; n < N; n++) sumabs += (x[n] < 0) ? -x[n] : x[n];
    for (int k = 0; k < N / 2; k++) begin
      xr[k] = 0.0; xi[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a = 2.0 * PI * real'((k * n) % N) / N;
        xr[k] += x[n] * $cos(a);
        xi[k] -= x[n] * $sin(a);
      end
    end
    wait (ready);
    nout = 0; t_first = -1; maxerr = 0.0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; in_idx = LN'(n); in_data = WIN_W'(x[n]); in_last = (n == N - 1);
    end
    @(negedge clk) in_valid = 0; in_last = 0;
    wait (nout == N / 2);
    checks++;
    // the first bin is driven LN*N/2+1 clocks after the edge that took the last
    // sample, so it is sampled one edge later
    if (t_first - t_last != LN * N / 2 + 2) begin
      failures++;
      $display("transform took %0d clocks, expected %0d", t_first - t_last, LN * N / 2 + 2);
    end
    $display("record %0d: max bin error %f", kind, maxerr);
    @(negedge clk);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
