// tb_pinger_driver: runs a ping sequence from a programmed table against a turn
// marker every TURN clocks and checks each ping's turn, its offset from the marker,
// its index, the trigger pulse width, the pinger-off gating and the soft ping.
module tb_pinger_driver;
  localparam int NP = 8, TURN = 40, PW = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic enable = 1, start = 0, soft_ping = 0, p0 = 0;
  logic [3:0] npings = 4'd5;
  logic tab_we = 0;
  logic [2:0] tab_addr = '0;
  logic [31:0] tab_wdata = '0, tab_rdata;
  logic ping_out, ping_strobe, seq_busy;
  logic [2:0] ping_idx;
  int checks = 0, failures = 0;
  int cyc = 0, p0_count = 0, last_p0 = 0, nping = 0, hi_len = 0;
  int intervals [NP] = '{3, 2, 1, 4, 2, 1, 1, 1};
  int offsets   [NP] = '{5, 0, 17, 9, 30, 0, 0, 0};
  int p0_at_start, exp_turn;

  pinger_driver #(.NPINGS(NP), .PULSE_CLKS(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // turn marker
  always @(negedge clk) p0 = ((cyc % TURN) == 0);

  always @(posedge clk) begin
    cyc++;
    if (p0) begin p0_count++; last_p0 = cyc; end
    if (ping_out && !rst) hi_len++;
    else if (hi_len != 0) begin
      check(hi_len == PW, $sformatf("ping_out width %0d", hi_len));
      hi_len = 0;
    end
    if (ping_strobe && !rst) begin
      if (nping < 5 && !soft_seen) begin
        exp_turn += intervals[nping];
        check(ping_idx == 3'(nping), $sformatf("ping_idx %0d expected %0d", ping_idx, nping));
        check(p0_count - p0_at_start == exp_turn,
              $sformatf("ping %0d on turn %0d expected %0d", nping, p0_count - p0_at_start, exp_turn));
        check(cyc - last_p0 == offsets[nping] + 2,
              $sformatf("ping %0d offset %0d expected %0d", nping, cyc - last_p0, offsets[nping] + 2));
      end
      nping++;
    end
  end
  bit soft_seen = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_out;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      tab_we = 1; tab_addr = 3'(i); tab_wdata = {16'(offsets[i]), 16'(intervals[i])};
    end
    @(negedge clk); tab_we = 0;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk); tab_addr = 3'(i);
      @(negedge clk);
      check(tab_rdata == {16'(offsets[i]), 16'(intervals[i])}, "table read-back");
    end
    // sequence of 5 pings
    @(negedge clk); start = 1; p0_at_start = p0_count; exp_turn = 0;
    @(negedge clk); start = 0;
    check(seq_busy, "busy after start");
    wait (!seq_busy);
    repeat (20) @(posedge clk);
    check(nping == 5, $sformatf("%0d pings, expected 5", nping));
    // pinger off: strobes continue, no output pulse
    enable = 0; nping = 0; soft_seen = 1;
    n_out = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      begin wait (!seq_busy); end
      forever begin @(posedge clk); if (ping_out) n_out++; end
    join_any
    disable fork;
    repeat (5) @(posedge clk);
    check(nping == 5 && n_out == 0, $sformatf("pinger off: %0d strobes, %0d output cycles", nping, n_out));
    // soft ping: one ping on the next turn
    enable = 1; nping = 0;
    @(negedge clk); soft_ping = 1;
    @(negedge clk); soft_ping = 0;
    repeat (3 * TURN) @(posedge clk);
    check(nping == 1 && !seq_busy, $sformatf("soft ping gave %0d pings", nping));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
