// tb_peak_detect: streams synthetic 32-bin magnitude spectra (N = 64) with a peak at
// a fractional bin and checks the interpolated tune against the parabola vertex
// computed here, the search range (a larger line outside it must be ignored, limits
// in either order), the empty-range case, a peak on bin 0, and the result latency.
module tb_peak_detect;
  import tune_pkg::*;
  localparam int N = 64, NB = N / 2;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 0, in_last = 0;
  logic [4:0] in_idx = '0, peak_bin;
  logic [MAG_W-1:0] in_mag = '0, peak_mag;
  logic [TUNE_W-1:0] start_tune = '0, end_tune = '0, tune;
  logic tune_valid, found;
  int checks = 0, failures = 0, cyc = 0, t_last = 0, t_res = 0;
  longint m [NB];

  peak_detect #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_last) t_last = cyc;
    if (tune_valid) t_res = cyc;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // peak of height a at fractional bin p, parabolic shape, on a noise floor
  task automatic add_peak(input real p, input real a);
    for (int k = 0; k < NB; k++) begin
      real v;
      v = a - a / 4.0 * (k - p) * (k - p);
      if (v > 0 && longint'(v) > m[k]) m[k] = longint'(v);
    end
  endtask

  task automatic make_floor();
    for (int k = 0; k < NB; k++) m[k] = $urandom_range(0, 2000);
  endtask

  task automatic send_and_wait();
    for (int k = 0; k < NB; k++) begin
      @(negedge clk);
      in_valid = 1; in_idx = 5'(k); in_mag = MAG_W'(m[k]); in_last = (k == NB - 1);
    end
    @(negedge clk) in_valid = 0; in_last = 0;
    wait (tune_valid);
    @(posedge clk);
    @(negedge clk);
  endtask

  // expected tune from the largest bin in [lo, hi] and its neighbours
  function automatic int expected(input int lo, input int hi, output int kb);
    real l, b, r, d;
    kb = lo;
    for (int k = lo; k <= hi; k++) if (m[k] > m[kb]) kb = k;
    l = (kb > 0) ? real'(m[kb - 1]) : 0.0;
    b = real'(m[kb]);
    r = (kb < NB - 1) ? real'(m[kb + 1]) : 0.0;
    d = (2.0 * b - l - r > 0.0) ? (r - l) / (2.0 * (2.0 * b - l - r)) : 0.0;
    return $rtoi((kb + d) / N * 65536.0);
  endfunction

  task automatic one(input real p, input real a, input real other_p, input int lo, input int hi,
                     input bit swap, input string what);
    int e, kb;
    make_floor();
    add_peak(p, a);
    if (other_p >= 0) add_peak(other_p, 3.0 * a);
    start_tune = 16'(lo * 65536 / N);
    end_tune   = 16'(hi * 65536 / N);
    if (swap) begin start_tune = 16'(hi * 65536 / N); end_tune = 16'(lo * 65536 / N); end
    send_and_wait();
    e = expected(lo, hi, kb);
    check(found, {what, ": found"});
    check(int'(peak_bin) == kb, $sformatf("%s: bin %0d expected %0d", what, peak_bin, kb));
    check(int'(tune) - e <= 2 && e - int'(tune) <= 2,
          $sformatf("%s: tune %0d expected %0d (true %0d)", what, tune, e, $rtoi(p / N * 65536.0)));
    check(t_res - t_last == MAG_W + 17 + 5, $sformatf("%s: latency %0d", what, t_res - t_last));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    one(12.3, 1.0e6, -1.0, 5, 20, 0, "centre peak");
    one(12.7, 3.0e9, -1.0, 5, 20, 0, "large peak");
    one(20.45, 5.0e5, 4.2, 15, 25, 0, "larger line outside range");
    one(9.1, 5.0e5, 25.0, 5, 15, 1, "reversed limits");
    for (int i = 0; i < 20; i++) begin
      real p;
      p = 3.0 + $urandom_range(0, 2400) / 100.0;
      one(p, real'($urandom_range(10000, 100000000)), -1.0, 2, 29, 0, $sformatf("random %f", p));
    end
    one(0.2, 1.0e6, -1.0, 0, 3, 0, "peak on bin 0");
    // range above all bins: nothing found
    make_floor();
    start_tune = 16'd40000; end_tune = 16'd60000;
    send_and_wait();
    check(!found && tune == 0, "empty range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
