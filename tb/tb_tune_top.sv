// tb_tune_top: the whole firmware at its default sizes (1024-turn FFT, 128-entry ping
// table, 144 clocks per turn) through one ramp of four pings.
//
// Beam model: on each ADC, the pickup burst falls on samples 67..70 of a turn (the
// default 201-bucket delay with 3 extra samples) and carries an offset, a betatron
// oscillation whose tune changes at every ping, and on plane x a stronger slow line
// at 0.02 (outside the x search range, like a synchrotron sideband); all other
// samples are large negative junk. The test programs the pinger table over the
// processor bus, starts the ramp with a booster-inject event and a 300 us delay,
// arms the ADC recorder on the first ping, and reads results back over the bus.
// Mechanisms exercised and counted: event start with delay, pinger table sequence,
// ping skipped during a record (overrun), crosspoint swap with swapped ranges, search
// range excluding a stronger line, per-turn sampling position (via the ADC record's
// sampling flags), DC removal, tune and spectrum recorders, result within 2 ms.
module tb_tune_top;
  import tune_pkg::*;
  localparam int TURN = int'(CLKS_PER_TURN);
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 66;                       // 0.001 in tune units
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc_a = '0, adc_b = '0;
  logic p0 = 0, ev_valid = 0;
  logic [7:0] ev_code = '0;
  logic cs = 0, we = 0, rvalid, ping_out;
  logic [19:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic tune_valid_a, tune_valid_b, tune_found_a, tune_found_b;
  int   n_notfound = 0;
  logic [TUNE_W-1:0] tune_a, tune_b;

  tune_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, pos = 0, turn = 0;
  int n_ping_out = 0, n_res_a = 0, n_res_b = 0, ev_cyc = 0, first_ping_cyc = -1;
  int ping_cyc [8];
  int ping_turn [8];
  real qx = 0.36, qy = 0.24;
  real qxs [4] = '{0.3612, 0.3521, 0.3521, 0.3489};   // the skipped ping does not change the tune
  real qys [4] = '{0.2413, 0.2366, 0.2366, 0.2352};
  int res_a [4], res_b [4];
  // mechanism counters
  int m_event = 0, m_pings = 0, m_overrun = 0, m_cross = 0, m_range = 0, m_flags = 0,
      m_dc = 0, m_latency = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // beam and machine model
  always @(negedge clk) begin
    if (!rst) begin
      pos = (pos + 1) % TURN;
      if (pos == 0) turn++;
      p0 = (pos == 0);
      if (pos >= 67 && pos <= 70) begin
        adc_a = ADC_W'($rtoi(500.0 + 1200.0 * $cos(2.0 * PI * qx * turn)
                              + 2500.0 * $cos(2.0 * PI * 0.02 * turn)) + $urandom_range(0, 6) - 3);
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
      if (n_ping_out < 4) begin
        qx = qxs[n_ping_out];
        qy = qys[n_ping_out];
      end
      ping_cyc[n_ping_out] = cyc;
      ping_turn[n_ping_out] = turn;
      n_ping_out++;
    end
    if (tune_valid_a && !rst) begin res_a[n_res_a] = int'(tune_a); n_res_a++; if (!tune_found_a) n_notfound++; end
    if (tune_valid_b && !rst) begin res_b[n_res_b] = int'(tune_b); n_res_b++; if (!tune_found_b) n_notfound++; end
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

  function automatic bit near(input int got, input real q);
    int e;
    e = $rtoi(q * 65536.0);
    return (got - e <= TOL) && (e - got <= TOL);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int best, bestk, flagged, flag_ok;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // ping table: intervals in turns and timing offsets in clocks
    wr(20'h1_0000, {16'd5,  16'd10});
    wr(20'h1_0001, {16'd9,  16'd1200});
    wr(20'h1_0002, {16'd0,  16'd600});    // falls inside the record of ping 1
    wr(20'h1_0003, {16'd12, 16'd1300});
    rd(20'h1_0001, d); check(d == {16'd9, 16'd1200}, "ping table read-back");
    wr(20'h0000A, 32'd4);                 // four pings
    wr(20'h00007, 32'h02);                // booster inject starts the pinger
    wr(20'h00000, 32'h09);                // pinger on, ADC recorder triggered by ping
    wr(20'h00009, 32'd0);                 // no ADC trigger delay
    wr(20'h00001, 32'h2);                 // arm the ADC recorder
    // booster inject event
    repeat (200) @(posedge clk);
    @(negedge clk) ev_valid = 1; ev_code = 8'd46; ev_cyc = cyc;
    @(negedge clk) ev_valid = 0;
    wait (n_ping_out == 1);
    // 300 us pinger delay, then up to one turn plus offset to the first ping
    check(ping_cyc[0] - ev_cyc >= 35193 - 20 && ping_cyc[0] - ev_cyc <= 35193 + 10 * TURN + 40,
          $sformatf("event to first ping %0d clocks", ping_cyc[0] - ev_cyc));
    m_event++;
    wait (n_res_a == 1 && n_res_b == 1);
    if (cyc - ping_cyc[0] < 234620) m_latency++;
    check(cyc - ping_cyc[0] < 234620, $sformatf("ping to tune %0d clocks (2 ms = 234620)", cyc - ping_cyc[0]));
    wait (n_res_a == 2 && n_res_b == 2);
    // swap the planes for the last ping: A' takes ADC B with the y range, B' ADC A with the x range
    wr(20'h00000, 32'h39);
    wr(20'h00005, {16'd19661, 16'd8330});
    wr(20'h00006, {16'd26214, 16'd21627});
    m_cross++;
    wait (n_res_a == 3 && n_res_b == 3);
    repeat (100) @(posedge clk);
    check(n_ping_out == 4, $sformatf("%0d ping pulses", n_ping_out));
    if (n_ping_out == 4) m_pings++;
    check(ping_turn[1] - ping_turn[0] == 1200 && ping_turn[2] - ping_turn[1] == 600 &&
          ping_turn[3] - ping_turn[2] == 1300, "ping intervals");
    // results: pings 0, 1 and 3 (ping 2 skipped)
    check(near(res_a[0], qxs[0]) && near(res_b[0], qys[0]),
          $sformatf("ping 0: %f %f", res_a[0] / 65536.0, res_b[0] / 65536.0));
    check(near(res_a[1], qxs[1]) && near(res_b[1], qys[1]),
          $sformatf("ping 1: %f %f", res_a[1] / 65536.0, res_b[1] / 65536.0));
    check(near(res_a[2], qys[3]) && near(res_b[2], qxs[3]),
          $sformatf("ping 3 crossed: %f %f", res_a[2] / 65536.0, res_b[2] / 65536.0));
    $display("tunes x: %f %f | y: %f %f | crossed %f %f", res_a[0] / 65536.0, res_a[1] / 65536.0,
             res_b[0] / 65536.0, res_b[1] / 65536.0, res_a[2] / 65536.0, res_b[2] / 65536.0);
    // status over the bus
    rd(20'h00012, d); check(d == {16'd1, 16'd1}, $sformatf("overruns %h", d));
    if (d == {16'd1, 16'd1}) m_overrun++;
    rd(20'h00013, d); check(d == {16'd3, 16'd3}, $sformatf("tune counts %h", d));
    // tune records sit at the ping index
    rd(20'h5_0000, d); check(d[31] && d[15:0] == 16'(res_a[0]), "tune record A' ping 0");
    rd(20'h5_0003, d); check(d[31] && d[15:0] == 16'(res_a[2]), "tune record A' ping 3");
    rd(20'h6_0001, d); check(d[31] && d[15:0] == 16'(res_b[1]), "tune record B' ping 1");
    // spectrum of A' for ping 0: strongest line is the 0.02 line, outside the range
    best = -1; bestk = 0;
    for (int k = 0; k < 512; k++) begin
      rd(20'h7_0000 + 20'(k), d);
      // without DC removal the 500-count offset would give 500*4*1024/2 >> 8 = 4000 here;
      // what is left comes from the mean of the non-integer 0.02 line
      if (k == 0) begin check(d < 400, $sformatf("DC bin %0d", d)); if (d < 400) m_dc++; end
      if (int'(d) > best) begin best = int'(d); bestk = k; end
    end
    check(bestk == 20, $sformatf("strongest line of the x spectrum at bin %0d", bestk));
    if (bestk == 20 && near(res_a[0], qxs[0])) m_range++;
    // ADC record of the first ping: flagged samples are the first burst sample of a turn
    flagged = 0; flag_ok = 0;
    rd(20'h0_0011, d); check(d == 1, "one ADC record");
    for (int i = 1; i < 1024; i++) begin
      logic [31:0] prev;
      rd(20'h2_0000 + 20'(i - 1), prev);
      rd(20'h2_0000 + 20'(i), d);
      if (d[31]) begin
        flagged++;
        if ($signed(d[13:0]) > -4000 && $signed(prev[13:0]) < -5000) flag_ok++;
      end
    end
    check(flagged >= 7 && flag_ok == flagged, $sformatf("sampling flags %0d, aligned %0d", flagged, flag_ok));
    if (flagged > 0 && flag_ok == flagged) m_flags++;
    // turn-by-turn record over the bus: 4 x averaged burst, within the model's range
    rd(20'h3_0005, d); check($signed(d) > -4 * 3300 && $signed(d) < 4 * 4300, "turn-by-turn word");
    // every mechanism must have happened
    check(m_event > 0, "event start");
    check(m_pings > 0, "ping sequence");
    check(m_overrun > 0, "overrun");
    check(m_cross > 0, "crosspoint swap");
    check(m_range > 0, "range excluding a stronger line");
    check(n_notfound == 0, "every tune flagged as found in its range");
    check(m_flags > 0, "sampling flags");
    check(m_dc > 0, "DC removal");
    check(m_latency > 0, "result within 2 ms");
    $display("mechanisms: event %0d pings %0d overrun %0d cross %0d range %0d flags %0d dc %0d latency %0d",
             m_event, m_pings, m_overrun, m_cross, m_range, m_flags, m_dc, m_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
