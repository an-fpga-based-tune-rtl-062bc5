// tb_adc_recorder: feeds counting ADC words and checks arming, each trigger source,
// the trigger delay in time-base ticks, the stored words and flags, auto restart and
// disarm.
module tb_adc_recorder;
  import tune_pkg::*;
  localparam int D = 64, TICKDIV = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc_a = '0, adc_b = '0;
  logic sample_flag = 0, arm = 0, disarm = 0, auto_restart = 0;
  trig_src_e trig_src = TRIG_SOFT;
  logic soft_trig = 0, event_trig = 0, ping_trig = 0, tick_100ns = 0;
  logic [15:0] trig_delay = '0, rec_count;
  logic [5:0] rd_addr = '0;
  logic [31:0] rd_data;
  logic armed, recording, done;
  int checks = 0, failures = 0, cyc = 0;

  adc_recorder #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  // counting data: A = cycle, B = -cycle, flag every 7th cycle
  always @(negedge clk) begin
    cyc++;
    adc_a = ADC_W'(cyc);
    adc_b = ADC_W'(-cyc);
    sample_flag = (cyc % 7 == 0);
    tick_100ns = (cyc % TICKDIV == 0);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  // read the record and check it holds D consecutive cycles starting at `first`
  task automatic check_record(input int first, input string what);
    int bad = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk) rd_addr = 6'(i);
      @(negedge clk);
      if (rd_data[13:0] != 14'(first + i) || rd_data[27:14] != 14'(-(first + i)) ||
          rd_data[31] != ((first + i) % 7 == 0)) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d words wrong (word0 %h, first %0d)", what, bad, rd_data, first));
  endtask

  int trig_cyc;
  int first_seen;
  // remember the ADC word present on the first recording clock
  always @(posedge clk) begin
    if (recording && first_seen < 0) first_seen = int'(adc_a);
    if (soft_trig || event_trig) trig_cyc = int'(adc_a);
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // not armed: a trigger does nothing
    pulse(soft_trig);
    repeat (5) @(posedge clk);
    check(!recording && !armed, "trigger while disarmed");
    // soft trigger, no delay
    pulse(arm);
    check(armed, "armed");
    first_seen = -1;
    @(negedge clk) soft_trig = 1;
    @(negedge clk) soft_trig = 0;
    wait (done);
    check(first_seen == trig_cyc + 2, $sformatf("first sample %0d, trigger at %0d", first_seen, trig_cyc));
    check(rec_count == 1, "one record");
    check_record(first_seen, "soft");
    // event source: soft and ping pulses are ignored, delay of 10 ticks
    trig_src = TRIG_EVENT; trig_delay = 16'd10;
    pulse(arm);
    pulse(soft_trig); pulse(ping_trig);
    repeat (10) @(posedge clk);
    check(armed && !recording, "wrong source must not trigger");
    first_seen = -1;
    @(negedge clk) event_trig = 1;
    @(negedge clk) event_trig = 0;
    wait (done);
    check(first_seen - trig_cyc >= 10 * TICKDIV && first_seen - trig_cyc <= 11 * TICKDIV + 2,
          $sformatf("delayed start after %0d clocks", first_seen - trig_cyc));
    check_record(first_seen, "event");
    // ping source with auto restart: two records from two pings
    trig_src = TRIG_PING; trig_delay = 0; auto_restart = 1;
    pulse(arm);
    pulse(ping_trig);
    wait (recording); wait (!recording);
    check(armed && !done, "auto restart re-arms");
    pulse(ping_trig);
    wait (recording); wait (!recording);
    check(rec_count == 4, $sformatf("rec_count %0d", rec_count));
    pulse(disarm);
    check(!armed && !recording && !done, "disarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
