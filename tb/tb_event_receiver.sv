// tb_event_receiver: checks the 0.1 us time base rate, event selection by code and
// enable, the pinger start delay in 0.1 us steps, and the restart of a running delay.
module tb_event_receiver;
  import tune_pkg::*;
  localparam real CLK_PER_TICK = real'(CLK_HZ) / 10.0e6;   // 11.731 clocks
  logic clk = 1'b0, rst = 1'b1;
  logic ev_valid = 0;
  logic [7:0] ev_code = '0;
  logic [2:0] ping_ev_en = '0, adc_ev_en = '0;
  logic [15:0] ping_delay = '0;
  logic tick_100ns, pinger_start, adc_event, delay_busy;
  int checks = 0, failures = 0;
  int cyc = 0, ticks = 0, nstart = 0, nadc = 0, t_start = 0;

  event_receiver dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (tick_100ns) ticks++;
    if (pinger_start) begin nstart++; t_start = cyc; end
    if (adc_event) nadc++;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] code);
    @(negedge clk); ev_valid = 1'b1; ev_code = code;
    @(negedge clk); ev_valid = 1'b0;
  endtask

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int t0, s0, a0, expect_cyc;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // time base: 11731 clocks should hold 1000 ticks
    t0 = ticks;
    repeat (11731) @(posedge clk);
    check(ticks - t0 >= 999 && ticks - t0 <= 1001, $sformatf("ticks in 1 ms-ish window: %0d", ticks - t0));

    // booster inject enabled for the pinger, storage-ring inject for the ADC recorder
    ping_ev_en = 3'b010; adc_ev_en = 3'b100; ping_delay = 16'd20;
    s0 = nstart; a0 = nadc;
    send(8'd47);                       // SR inject: ADC only
    repeat (400) @(posedge clk);
    check(nstart == s0, "SR inject must not start the pinger");
    check(nadc == a0 + 1, "SR inject must trigger the ADC recorder");
    send(8'd2);                        // linac trigger: nothing enabled
    send(8'd99);                       // unknown code
    repeat (400) @(posedge clk);
    check(nstart == s0 && nadc == a0 + 1, "disabled / unknown events must be ignored");

    // pinger delay: 20 x 0.1 us = 2 us = 234.6 clocks
    send(8'd46);
    t0 = cyc;
    repeat (400) @(posedge clk);
    check(nstart == s0 + 1, "booster inject must start the pinger once");
    check(nadc == a0 + 1, "booster inject must not trigger the ADC recorder");
    expect_cyc = int'(20.0 * CLK_PER_TICK);
    check(t_start - t0 >= expect_cyc - 14 && t_start - t0 <= expect_cyc + 14,
          $sformatf("delay %0d clocks, expected about %0d", t_start - t0, expect_cyc));

    // zero delay: start two clocks after the event
    ping_delay = 16'd0;
    send(8'd46);
    t0 = cyc;
    repeat (10) @(posedge clk);
    check(nstart == s0 + 2 && t_start - t0 <= 2, $sformatf("zero delay took %0d", t_start - t0));

    // a second event during the delay restarts it
    ping_delay = 16'd50;
    send(8'd46);
    repeat (300) @(posedge clk);
    send(8'd46);
    t0 = cyc;
    repeat (800) @(posedge clk);
    check(nstart == s0 + 3, "restarted delay must fire once");
    expect_cyc = int'(50.0 * CLK_PER_TICK);
    check(t_start - t0 >= expect_cyc - 14 && t_start - t0 <= expect_cyc + 14,
          $sformatf("restarted delay %0d, expected about %0d", t_start - t0, expect_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
