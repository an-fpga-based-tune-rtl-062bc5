// tb_cordic_magphase: streams random I/Q vectors (all quadrants, small to full
// scale, plus the axes) and checks magnitude against sqrt(I^2+Q^2), phase against
// atan2(Q, I), and the ITER+2 clock latency.
module tb_cordic_magphase;
  import tune_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NV = 400;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [8:0] in_idx = '0, out_idx;
  logic signed [FFT_W-1:0] in_re = '0, in_im = '0;
  logic [MAG_W-1:0] out_mag;
  logic signed [PH_W-1:0] out_phase;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int re_v [NV], im_v [NV], t_in [NV];

  cordic_magphase dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (in_valid) t_in[in_idx] = cyc;
    if (out_valid && !rst) begin
      real m, p, em, ep;
      int k;
      k = int'(out_idx);
      m = $sqrt(real'(re_v[k]) * re_v[k] + real'(im_v[k]) * im_v[k]);
      p = $atan2(real'(im_v[k]), real'(re_v[k])) / (2.0 * PI) * 65536.0;
      em = real'(out_mag) - m;
      if (em < 0) em = -em;
      ep = real'(out_phase) - p;
      while (ep > 32768.0) ep -= 65536.0;
      while (ep < -32768.0) ep += 65536.0;
      if (ep < 0) ep = -ep;
      checks++;
      if (em > 1.0e-4 * m + 2.0 || (m > 1000.0 && ep > 6.0) || cyc - t_in[k] != 18) begin
        failures++;
        if (failures < 10)
          $display("k=%0d (%0d,%0d): mag %0d exp %f, phase %0d exp %f, latency %0d",
                   k, re_v[k], im_v[k], out_mag, m, out_phase, p, cyc - t_in[k]);
      end
      nout++;
    end
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
    for (int i = 0; i < NV; i++) begin
      int sh;
      sh = $urandom_range(4, 31);
      re_v[i] = int'($urandom) >>> (32 - sh);
      im_v[i] = int'($urandom) >>> (32 - sh);
      if (i == 0) begin re_v[i] = 1000000; im_v[i] = 0; end
      if (i == 1) begin re_v[i] = 0; im_v[i] = -1000000; end
      if (i == 2) begin re_v[i] = -1000000; im_v[i] = 0; end
      if (i == 3) begin re_v[i] = 2147483647; im_v[i] = 2147483647; end
      if (i == 4) begin re_v[i] = -2147483647; im_v[i] = -2147483647; end
      @(negedge clk);
      in_valid = 1; in_idx = 9'(i); in_re = re_v[i]; in_im = im_v[i]; in_last = (i == NV - 1);
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (nout != NV) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
