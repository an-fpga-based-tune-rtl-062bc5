// tb_dc_window: streams random samples with a random mean and checks each output
// against (x - mean) * Hann(n), the window computed here from its formula, and the
// two-clock latency.
module tb_dc_window;
  import tune_pkg::*;
  localparam int N = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [5:0] in_idx = '0, out_idx;
  logic signed [SAMP_W-1:0] in_data = '0, in_mean = '0;
  logic signed [WIN_W-1:0] out_data;
  int checks = 0, failures = 0, cyc = 0, n_out = 0;
  int xs [N], ts [N];

  dc_window #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic int expected(input int n);
    real w = 0.5 * (1.0 - $cos(2.0 * 3.14159265358979 * n / N));
    int wq = $rtoi(w * 65536.0 + 0.5);
    longint p = longint'(xs[n] - int'(in_mean)) * wq;
    return int'(p >>> 16);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (out_valid && !rst) begin
      checks++;
      n_out++;
      if (int'(out_data) != expected(int'(out_idx)) || cyc - ts[out_idx] != 2 ||
          out_last != (out_idx == 6'(N - 1))) begin
        failures++;
        $display("n=%0d got %0d expected %0d latency %0d", out_idx, out_data, expected(int'(out_idx)), cyc - ts[out_idx]);
      end
    end
    if (in_valid) ts[in_idx] = cyc;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    in_mean = SAMP_W'(-1234);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0) || n == 0;
      if (!in_valid) begin n--; continue; end
      in_idx = 6'(n);
      in_data = (n == 5) ? 16'sh7FFF : (n == 6) ? 16'sh8000 : SAMP_W'($urandom);
      xs[n] = int'(in_data);
      in_last = (n == N - 1);
    end
    @(negedge clk) in_valid = 0; in_last = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (out_valid) failures++;
    checks++;
    if (n_out != N) begin failures++; $display("%0d outputs, expected %0d", n_out, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
