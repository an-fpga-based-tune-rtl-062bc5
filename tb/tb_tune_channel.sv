// tb_tune_channel: one plane end to end at N = 64 with 24-clock turns. A beam model
// puts a betatron oscillation of a known tune (changed at every ping) on an offset,
// only on the ADC samples the sampler should average; other samples carry large
// junk. Checks each measured tune against the model tune, the tune and waterfall
// records, the DC removal (bin 0 small despite the offset), the overrun count for a
// ping during a record, and the time from the last recorded turn to the result.
module tb_tune_channel;
  import tune_pkg::*;
  localparam int N = 64, NP = 4, TURN = 24;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc = '0;
  logic p0 = 0;
  chan_cfg_t cfg;
  logic [TUNE_W-1:0] start_tune, end_tune, tune, last_tune;
  logic ping_strobe = 0;
  logic [1:0] ping_idx = '0;
  logic sample_instant, tune_valid, tune_found, tbt_busy;
  logic [4:0] peak_bin;
  logic [MAG_W-1:0] peak_mag;
  logic [15:0] overruns, tune_count, wf_records;
  logic [5:0] tbt_rd_addr = '0;
  logic signed [SAMP_W-1:0] tbt_rd_data;
  logic [1:0] tune_rd_addr = '0;
  logic [31:0] tune_rd_data;
  logic [6:0] wf_rd_addr = '0;
  logic [15:0] wf_rd_data;
  int checks = 0, failures = 0, cyc = 0, pos = 0, turn = 0;
  real q = 0.25;
  int nres = 0;
  real qs [NP] = '{0.2113, 0.3456, 0.1234, 0.4071};

  tune_channel #(.N(N), .NPINGS(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // beam model: samples 10..12 of each turn (delay 30 buckets, 2 extra samples)
  always @(negedge clk) begin
    if (!rst) begin
      pos = (pos + 1) % TURN;
      if (pos == 0) turn++;
      p0 = (pos == 0);
      if (pos >= 10 && pos <= 12)
        adc = ADC_W'($rtoi(1000.0 + 2500.0 * $cos(2.0 * PI * q * turn + 0.7)) + $urandom_range(0, 8) - 4);
      else
        adc = ADC_W'($urandom_range(0, 16000) - 8000);
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (tune_valid && !rst) begin
      int e;
      e = $rtoi(qs[nres] * 65536.0);
      check(tune_found, "found");
      check(int'(tune) - e <= 80 && e - int'(tune) <= 80,
            $sformatf("record %0d: tune %0d (%f) expected %0d (%f)", nres, tune, tune / 65536.0, e, qs[nres]));
      nres++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    cfg.extra_samples = 4'd2;
    cfg.adc_delay = 16'd30;
    cfg.ping_to_fft = 16'd3;
    start_tune = 16'd3277;     // 0.05
    end_tune   = 16'd29491;    // 0.45
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5 * TURN) @(posedge clk);
    for (int r = 0; r < NP; r++) begin
      wait (pos == 2);
      q = qs[r];
      @(negedge clk) ping_strobe = 1; ping_idx = 2'(r);
      @(negedge clk) ping_strobe = 0;
      t0 = turn;
      if (r == 1) begin
        // a second ping 20 turns later falls inside the record
        repeat (20 * TURN) @(posedge clk);
        @(negedge clk) ping_strobe = 1; ping_idx = 2'(3);
        @(negedge clk) ping_strobe = 0;
      end
      wait (nres == r + 1);
      // result about 2 turns of clocks after the last recorded turn (turn t0+3+64)
      check(turn - (t0 + 3 + N) <= 20, $sformatf("result %0d turns after the record", turn - (t0 + 3 + N)));
      repeat (2 * TURN) @(posedge clk);
    end
    check(overruns == 1, $sformatf("overruns %0d", overruns));
    check(tune_count == NP && wf_records == NP, "record counts");
    check(last_tune == tune, "last tune");
    // tune record and waterfall peak per ping
    for (int r = 0; r < NP; r++) begin
      int best, bestk;
      @(negedge clk) tune_rd_addr = 2'(r);
      @(negedge clk);
      check(tune_rd_data[31] && (int'(tune_rd_data[15:0]) - $rtoi(qs[r] * 65536.0)) <= 80 &&
            ($rtoi(qs[r] * 65536.0) - int'(tune_rd_data[15:0])) <= 80, $sformatf("tune record %0d", r));
      best = -1; bestk = 0;
      for (int k = 0; k < N / 2; k++) begin
        @(negedge clk) wf_rd_addr = 7'(r * N / 2 + k);
        @(negedge clk);
        if (k == 0) check(int'(wf_rd_data) < 200, $sformatf("record %0d: DC bin %0d", r, wf_rd_data));
        if (int'(wf_rd_data) > best) begin best = int'(wf_rd_data); bestk = k; end
      end
      check(bestk == $rtoi(qs[r] * N + 0.5) || bestk == $rtoi(qs[r] * N),
            $sformatf("record %0d: spectrum peak at bin %0d", r, bestk));
    end
    // the turn-by-turn record holds 4 x the model samples (averaged, x4 scaling)
    @(negedge clk) tbt_rd_addr = 6'd0;
    @(negedge clk);
    check(tbt_rd_data > -16'sd10200 && tbt_rd_data < 16'sd14200, "turn-by-turn record range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
