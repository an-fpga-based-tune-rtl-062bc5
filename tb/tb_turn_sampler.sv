// tb_turn_sampler: drives 144-clock turns of random ADC words and checks, for
// varying bucket delays and averaging counts, the value of each per-turn sample, the
// clock on which the first sample is taken (sample_instant) and the output latency.
module tb_turn_sampler;
  import tune_pkg::*;
  localparam int TURN = 144;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc = '0;
  logic p0 = 0;
  logic [3:0] extra_samples = '0;
  logic [15:0] adc_delay = '0;
  logic sample_instant, turn_valid;
  logic signed [SAMP_W-1:0] turn_sample;
  int checks = 0, failures = 0;
  int pos = 0, turn = 0, nvalid = 0, s_first;
  logic signed [ADC_W-1:0] tv [TURN];

  turn_sampler dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL turn %0d: %s", turn, msg); end
  endtask

  function automatic int exp_value();
    longint sum = 0;
    int n = int'(extra_samples) + 1;
    for (int i = 0; i < n; i++) sum += tv[s_first + i];
    return int'((sum * ((1 << 16) / n)) >>> 14);
  endfunction

  // stimulus on the falling edge
  always @(negedge clk) begin
    if (!rst) begin
      pos = (pos + 1) % TURN;
      if (pos == 0) begin
        turn++;
        adc_delay     = (turn % 5 == 4) ? 16'd440 : 16'($urandom_range(0, 300));
        extra_samples = 4'($urandom_range(0, 15));
        if (turn % 7 == 1) begin adc_delay = 16'd201; extra_samples = 4'd3; end
        if (turn % 7 == 2) adc_delay = 16'd0;
        s_first = (int'(adc_delay) + 2) / 3;
      end
      p0 = (pos == 0);
      adc = ADC_W'($urandom);
      tv[pos] = adc;
    end
  end

  // checks on the rising edge (pre-edge values)
  always @(posedge clk) begin
    if (!rst && turn > 0) begin
      if (sample_instant)
        check(pos == s_first + 1, $sformatf("sample_instant at %0d, first sample %0d", pos, s_first));
      if (turn_valid) begin
        nvalid++;
        check(s_first < TURN, "sample from a turn whose delay exceeds the turn");
        check(pos == s_first + int'(extra_samples) + 2,
              $sformatf("turn_valid at %0d, expected %0d", pos, s_first + int'(extra_samples) + 2));
        check(int'(turn_sample) == exp_value(),
              $sformatf("value %0d expected %0d (delay %0d, extra %0d)", turn_sample, exp_value(), adc_delay, extra_samples));
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (turn == 200);
    check(nvalid >= 150 && nvalid <= 170, $sformatf("%0d samples in 199 turns", nvalid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
