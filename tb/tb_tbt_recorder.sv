// tb_tbt_recorder: feeds a per-turn sample every few clocks, pings, and checks that
// the record starts ping_to_fft turns after the ping, holds N turns, replays them in
// order with the correct mean, waits for play_ready, counts overrun pings and can be
// read by the host.
module tb_tbt_recorder;
  import tune_pkg::*;
  localparam int N = 16, NP = 8, GAP = 5;
  logic clk = 1'b0, rst = 1'b1;
  logic turn_valid = 0;
  logic signed [SAMP_W-1:0] turn_sample = '0;
  logic ping_strobe = 0;
  logic [2:0] ping_idx = '0, out_rec;
  logic [15:0] ping_to_fft = 16'd3, overruns;
  logic play_ready = 0;
  logic out_valid, out_last, busy;
  logic [3:0] out_idx, rd_addr = '0;
  logic signed [SAMP_W-1:0] out_data, out_mean, rd_data;
  int checks = 0, failures = 0;
  int turn = 0, cyc = 0;
  int hist [4096];
  int ping_turn, nout;

  tbt_recorder #(.N(N), .NPINGS(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk) begin
    cyc++;
    turn_valid = !rst && (cyc % GAP == 0);
    if (turn_valid) begin
      turn++;
      turn_sample = SAMP_W'($urandom_range(0, 60000) - 30000);
      hist[turn] = int'(turn_sample);
    end
  end

  function automatic int exp_mean(input int first);
    longint s = 0;
    for (int i = 0; i < N; i++) s += hist[first + i];
    return int'(s >>> $clog2(N));
  endfunction

  task automatic run_record(input int delay, input logic [2:0] idx);
    int first;
    ping_to_fft = 16'(delay);
    @(negedge clk) ping_strobe = 1; ping_idx = idx; ping_turn = turn;
    @(negedge clk) ping_strobe = 0;
    first = ping_turn + delay + 1;
    wait (turn >= first + N + 2);
    check(busy && !out_valid, "record must wait for play_ready");
    @(negedge clk) play_ready = 1;
    nout = 0;
    while (nout < N) begin
      @(posedge clk);
      if (out_valid) begin
        check(int'(out_idx) == nout, "replay order");
        check(int'(out_data) == hist[first + nout],
              $sformatf("sample %0d: %0d expected %0d", nout, out_data, hist[first + nout]));
        check(out_last == (nout == N - 1), "out_last");
        if (nout == 0) begin
          check(int'(out_mean) == exp_mean(first), $sformatf("mean %0d expected %0d", out_mean, exp_mean(first)));
          check(out_rec == idx, "record index");
        end
        nout++;
      end
    end
    @(negedge clk) play_ready = 0;
    @(negedge clk);
    check(!busy, "idle after replay");
    // host read-back
    for (int i = 0; i < N; i++) begin
      @(negedge clk) rd_addr = 4'(i);
      @(negedge clk);
      check(int'(rd_data) == hist[first + i], "host read");
    end
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
    repeat (20) @(posedge clk);
    run_record(3, 3'd5);
    run_record(0, 3'd2);
    // a ping during a record is skipped and counted
    ping_to_fft = 16'd2;
    @(negedge clk) ping_strobe = 1; ping_idx = 3'd1;
    @(negedge clk) ping_strobe = 0;
    repeat (10 * GAP) @(posedge clk);
    @(negedge clk) ping_strobe = 1; ping_idx = 3'd7;
    @(negedge clk) ping_strobe = 0;
    check(overruns == 16'd1, $sformatf("overruns %0d", overruns));
    @(negedge clk) play_ready = 1;
    wait (out_valid);
    check(out_rec == 3'd1, "skipped ping must not replace the record index");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
