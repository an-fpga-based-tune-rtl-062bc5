// tb_tune_sr: the firmware set up for a storage ring instead of the booster.
//
// Nothing in the logic depends on the turn length: turns are whatever the revolution
// marker says. This test drives a 1296-bucket ring (432 clocks per turn at RF/3),
// enables only the storage-ring-inject event (47) for the pinger, moves the sampling
// point to bucket 600 (clock 200) with no extra samples, and sets both search ranges
// over the processor bus. The FFT is shortened to 64 turns to keep the run short;
// that is the only parameter set. Four pings, 130 turns apart.
// Checks: a booster-inject event (46) does not start the pinger while only 47 is
// enabled; 47 does; ping spacing; every tune (strobe and record) within 0.0015 of the
// model; the record's found flags; no skipped ping.
module tb_tune_sr;
  import tune_pkg::*;
  localparam int NF = 64;
  localparam int NP = 4;
  localparam int TURN = 432;                    // 1296 buckets / 3
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
    return 0.1950 - 0.0030 * k;
  endfunction
  function automatic real qy_of(input int k);
    return 0.2700 + 0.0040 * k;
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
      if (pos == 200) begin
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
    #40000000;
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
    wr(20'h0000A, 32'(NP));               // four pings
    wr(20'h00002, 32'd0);                 // no extra samples
    wr(20'h00003, 32'd600);               // sampling point: bucket 600 = clock 200
    wr(20'h00005, {16'd16384, 16'd9830}); // A' range 0.15 .. 0.25
    wr(20'h00006, {16'd20972, 16'd16384});// B' range 0.32 .. 0.25, given high first
    wr(20'h00007, 32'h04);                // only storage-ring inject starts the pinger
    wr(20'h00008, 32'd10);                // 1 us pinger delay
    wr(20'h00000, 32'h01);                // pinger on
    repeat (50) @(posedge clk);
    @(negedge clk) ev_valid = 1; ev_code = 8'd46;
    @(negedge clk) ev_valid = 0;
    repeat (3 * TURN) @(posedge clk);
    rd(20'h00010, d);
    check(n_ping_out == 0 && !d[0], "booster-inject event ignored when only event 47 is enabled");
    @(negedge clk) ev_valid = 1; ev_code = 8'd47;
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
