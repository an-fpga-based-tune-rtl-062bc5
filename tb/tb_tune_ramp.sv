// tb_tune_ramp: a complete ramp of 128 pings, the number of records the firmware keeps
// per plane, with the tune drifting from ping to ping as it does along an energy ramp.
//
// The top runs with its default ping count, record sizes and turn length, but with a
// 64-turn FFT so that 128 measurements simulate in seconds; the FFT length is the only
// parameter set. The ping table gives every ping an interval of 130 turns (enough for
// 50 + 64 recorded turns and the processing) and an offset that steps with the ping
// number, as the pinger timing does to follow the beam energy. The beam model is the
// one of tb_tune_top: the pickup burst sits on samples 67..70 of each turn and carries
// an offset and a betatron oscillation whose tune is set at every ping.
// Checks: the spacing of consecutive pings (interval turns plus the offset step), no
// skipped ping, 128 tunes per plane counted by the status registers, every tune record
// read back over the processor bus (found flag and value within 0.0015), the on-chip
// tune strobe against the same model, and for every ping the largest bin of the stored
// spectrum against the model tune.
module tb_tune_ramp;
  import tune_pkg::*;
  localparam int NF = 64;
  localparam int NP = N_PINGS;
  localparam int TURN = int'(CLKS_PER_TURN);
  localparam int INTERVAL = 130;
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 98;                       // 0.0015 in tune units
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc_a = '0, adc_b = '0;
  logic p0 = 0, ev_valid = 0;
  logic [7:0] ev_code = '0;
  logic cs = 0, we = 0, rvalid, ping_out;
  logic [19:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic tune_valid_a, tune_valid_b, tune_found_a, tune_found_b;
  logic [TUNE_W-1:0] tune_a, tune_b;

  tune_top #(.N(NF)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, pos = 0, turn = 0;
  int n_ping_out = 0, n_res_a = 0, n_res_b = 0, n_spacing_bad = 0, n_strobe_bad = 0;
  int ping_cyc [NP];
  real qx = 0.36, qy = 0.24;
  int worst = 0;

  always #5 clk = ~clk;

  function automatic real qx_of(input int k);
    return 0.3600 - 0.0200 * k / (NP - 1);
  endfunction
  function automatic real qy_of(input int k);
    return 0.2400 + 0.0150 * k / (NP - 1);
  endfunction
  function automatic int off_of(input int k);
    return 4 + (k % 16);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int err_of(input int got, input real q);
    int e;
    e = $rtoi(q * 65536.0) - got;
    return (e < 0) ? -e : e;
  endfunction

  // beam and machine model
  always @(negedge clk) begin
    if (!rst) begin
      pos = (pos + 1) % TURN;
      if (pos == 0) turn++;
      p0 = (pos == 0);
      if (pos >= 67 && pos <= 70) begin
        adc_a = ADC_W'($rtoi(500.0 + 1500.0 * $cos(2.0 * PI * qx * turn)) + $urandom_range(0, 6) - 3);
        adc_b = ADC_W'($rtoi(-300.0 + 1500.0 * $sin(2.0 * PI * qy * turn)) + $urandom_range(0, 6) - 3);
      end else begin
        adc_a = ADC_W'(-6000 - int'($urandom_range(0, 2000)));
        adc_b = ADC_W'(-6000 - int'($urandom_range(0, 2000)));
      end
    end
  end

  logic ping_out_q = 0;
  always @(posedge clk) begin
    cyc++;
    ping_out_q <= ping_out;
    if (ping_out && !ping_out_q && !rst) begin
      if (n_ping_out < NP) begin
        qx = qx_of(n_ping_out);
        qy = qy_of(n_ping_out);
        ping_cyc[n_ping_out] = cyc;
        if (n_ping_out > 0 &&
            cyc - ping_cyc[n_ping_out - 1] != INTERVAL * TURN + off_of(n_ping_out) - off_of(n_ping_out - 1))
          n_spacing_bad++;
      end
      n_ping_out++;
    end
    if (tune_valid_a && !rst) begin
      if (n_res_a >= NP || !tune_found_a || err_of(int'(tune_a), qx_of(n_res_a)) > TOL) n_strobe_bad++;
      n_res_a++;
    end
    if (tune_valid_b && !rst) begin
      if (n_res_b >= NP || !tune_found_b || err_of(int'(tune_b), qy_of(n_res_b)) > TOL) n_strobe_bad++;
      n_res_b++;
    end
  end

  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk) cs = 1; we = 1; addr = a; wdata = d;
    @(negedge clk) cs = 0; we = 0;
  endtask

  task automatic rd(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk) cs = 1; we = 0; addr = a;
    @(negedge clk) cs = 0;
    d = rdata;
  endtask

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int e, best, bestk, bad_rec, bad_wf, want;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < NP; k++)
      wr(20'h1_0000 | 20'(k), {16'(off_of(k)), 16'(INTERVAL)});
    wr(20'h00007, 32'h02);                // booster inject starts the pinger
    wr(20'h00008, 32'd10);                // 1 us pinger delay
    wr(20'h00000, 32'h01);                // pinger on
    repeat (50) @(posedge clk);
    @(negedge clk) ev_valid = 1; ev_code = 8'd46;
    @(negedge clk) ev_valid = 0;
    wait (n_ping_out == NP);
    // last record, processing and the final tune
    wait (n_res_a == NP && n_res_b == NP);
    repeat (INTERVAL * TURN) @(posedge clk);

    check(n_ping_out == NP, $sformatf("%0d pings fired", n_ping_out));
    check(n_spacing_bad == 0, $sformatf("%0d pings off their interval and offset", n_spacing_bad));
    check(n_res_a == NP && n_res_b == NP, $sformatf("tune strobes %0d / %0d", n_res_a, n_res_b));
    check(n_strobe_bad == 0, $sformatf("%0d strobed tunes wrong", n_strobe_bad));
    rd(20'h00012, d); check(d == 32'h0, $sformatf("overruns %h", d));
    rd(20'h00013, d); check(d == {16'(NP), 16'(NP)}, $sformatf("tune counts %h", d));
    rd(20'h00015, d); check(d == {16'(NP), 16'(NP)}, $sformatf("spectrum counts %h", d));

    // tune records of both planes
    bad_rec = 0;
    for (int k = 0; k < NP; k++) begin
      rd(20'h5_0000 | 20'(k), d);
      e = err_of(int'(d[15:0]), qx_of(k));
      if (e > worst) worst = e;
      if (!d[31] || e > TOL) bad_rec++;
      rd(20'h6_0000 | 20'(k), d);
      e = err_of(int'(d[15:0]), qy_of(k));
      if (e > worst) worst = e;
      if (!d[31] || e > TOL) bad_rec++;
    end
    check(bad_rec == 0, $sformatf("%0d tune records wrong", bad_rec));
    $display("largest tune error %0d / 65536", worst);

    // spectra: the largest stored bin of each ping sits at the model tune
    bad_wf = 0;
    for (int k = 0; k < NP; k++) begin
      best = -1; bestk = 0;
      for (int b = 1; b < NF / 2; b++) begin
        rd(20'h7_0000 | 20'(k * (NF / 2) + b), d);
        if (int'(d[15:0]) > best) begin best = int'(d[15:0]); bestk = b; end
      end
      want = $rtoi(qx_of(k) * NF + 0.5);
      if (bestk - want > 1 || want - bestk > 1) bad_wf++;
      best = -1; bestk = 0;
      for (int b = 1; b < NF / 2; b++) begin
        rd(20'h8_0000 | 20'(k * (NF / 2) + b), d);
        if (int'(d[15:0]) > best) begin best = int'(d[15:0]); bestk = b; end
      end
      want = $rtoi(qy_of(k) * NF + 0.5);
      if (bestk - want > 1 || want - bestk > 1) bad_wf++;
    end
    check(bad_wf == 0, $sformatf("%0d spectra with the peak off the model tune", bad_wf));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
