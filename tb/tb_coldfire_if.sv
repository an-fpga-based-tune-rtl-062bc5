// tb_coldfire_if: checks register reset values, write/read-back of every setting,
// the one-clock command pulses, the ping-table write strobe, status read-out, and
// the region multiplexer with one-clock read latency (memories modelled here as
// registered functions of the address).
module tb_coldfire_if;
  import tune_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic cs = 0, we = 0, rvalid, ptab_we;
  logic [19:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  host_cfg_t cfg;
  host_cmd_t cmd;
  host_status_t status;
  logic [15:0] mem_addr;
  logic [31:0] ptab_rdata, adc_rdata, tune_a_rdata, tune_b_rdata;
  logic [15:0] tbt_a_rdata, tbt_b_rdata, wf_a_rdata, wf_b_rdata;
  int checks = 0, failures = 0, ncmd = 0;

  coldfire_if dut (.*);

  always #5 clk = ~clk;

  // memory models: registered read of a per-region pattern
  always_ff @(posedge clk) begin
    ptab_rdata   <= {16'h1111, mem_addr};
    adc_rdata    <= {16'h2222, mem_addr};
    tbt_a_rdata  <= mem_addr ^ 16'h8003;
    tbt_b_rdata  <= mem_addr ^ 16'h0004;
    tune_a_rdata <= {16'h5555, mem_addr};
    tune_b_rdata <= {16'h6666, mem_addr};
    wf_a_rdata   <= mem_addr ^ 16'h7777;
    wf_b_rdata   <= mem_addr ^ 16'h8888;
  end

  always @(posedge clk) if (!rst && cmd != '0) ncmd++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [19:0] a, input logic [31:0] d);
    @(negedge clk) cs = 1; we = 1; addr = a; wdata = d;
    @(negedge clk) cs = 0; we = 0;
  endtask

  task automatic rd(input logic [19:0] a, output logic [31:0] d);
    @(negedge clk) cs = 1; we = 0; addr = a;
    @(negedge clk) cs = 0;
    if (!rvalid) begin failures++; $display("no rvalid"); end
    d = rdata;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    status = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // reset values from the operator screens
    rd(20'h00002, d); check(d == 3, $sformatf("extra samples reset %0d", d));
    rd(20'h00003, d); check(d == 201, "ADC delay reset");
    rd(20'h00004, d); check(d == 50, "ping-to-FFT reset");
    rd(20'h00005, d); check(d == {16'd26214, 16'd21627}, "range A' reset");
    rd(20'h00006, d); check(d == {16'd19661, 16'd8330}, "range B' reset");
    rd(20'h00008, d); check(d == 3000, "pinger delay reset");
    // write / read back
    wr(20'h00000, 32'h39);
    check(cfg.pinger_enable && !cfg.adc_auto_restart && cfg.adc_trig_src == TRIG_PING &&
          cfg.xpt_sel_a && cfg.xpt_sel_b, "CTRL fields");
    rd(20'h00000, d); check(d == 32'h39, $sformatf("CTRL read %h", d));
    wr(20'h00002, 32'h7); wr(20'h00003, 32'd330); wr(20'h00004, 32'd12);
    wr(20'h00005, 32'h1234_5678); wr(20'h00006, 32'h9ABC_DEF0);
    wr(20'h00007, 32'h52); wr(20'h00008, 32'd77); wr(20'h00009, 32'd88); wr(20'h0000A, 32'd9);
    check(cfg.chan.extra_samples == 7 && cfg.chan.adc_delay == 330 && cfg.chan.ping_to_fft == 12,
          "channel settings");
    check(cfg.range_a_start == 16'h5678 && cfg.range_a_end == 16'h1234 &&
          cfg.range_b_start == 16'hDEF0 && cfg.range_b_end == 16'h9ABC, "ranges");
    check(cfg.ping_ev_en == 3'b010 && cfg.adc_ev_en == 3'b101, "event enables");
    check(cfg.ping_delay == 77 && cfg.adc_trig_delay == 88 && cfg.npings == 9, "delays, npings");
    rd(20'h00007, d); check(d == 32'h52, "EVENTS read");
    rd(20'h0000A, d); check(d == 9, "NPINGS read");
    // commands: one pulse each
    check(ncmd == 0, "no command yet");
    @(negedge clk) cs = 1; we = 1; addr = 20'h00001; wdata = 32'h5;
    @(negedge clk) cs = 0; we = 0;
    check(cmd.soft_ping && !cmd.adc_arm && cmd.adc_disarm && !cmd.adc_soft_trig, "command bits");
    @(negedge clk);
    check(cmd == '0 && ncmd == 1, "command lasts one clock");
    // ping table strobe
    @(negedge clk) cs = 1; we = 1; addr = 20'h1_0003; wdata = 32'hABCD;
    #1 check(ptab_we && mem_addr == 16'h0003, "ping table write strobe");
    @(negedge clk) cs = 0; we = 0;
    #1 check(!ptab_we, "strobe only with cs");
    // status
    status.pinger_busy = 1; status.adc_done = 1; status.tbt_busy_b = 1;
    status.adc_records = 16'd42; status.overruns_a = 16'd3; status.overruns_b = 16'd4;
    status.tune_count_a = 16'd10; status.tune_count_b = 16'd11;
    status.last_tune_a = 16'hAAAA; status.last_tune_b = 16'hBBBB;
    status.wf_records_a = 16'd7; status.wf_records_b = 16'd8;
    rd(20'h00010, d); check(d == 32'h29, $sformatf("STATUS %h", d));
    rd(20'h00011, d); check(d == 42, "ADC_RECS");
    rd(20'h00012, d); check(d == {16'd4, 16'd3}, "OVERRUNS");
    rd(20'h00013, d); check(d == {16'd11, 16'd10}, "TUNES");
    rd(20'h00014, d); check(d == 32'hBBBB_AAAA, "LAST_TUNE");
    rd(20'h00015, d); check(d == {16'd8, 16'd7}, "SPECTRA");
    // regions
    rd(20'h1_0021, d); check(d == 32'h1111_0021, "ping table region");
    rd(20'h2_0321, d); check(d == 32'h2222_0321, "ADC region");
    rd(20'h3_0010, d); check(d == 32'hFFFF_8013, "TBT A' region, sign extended");
    rd(20'h4_0010, d); check(d == 32'h0000_0014, "TBT B' region");
    rd(20'h5_0002, d); check(d == 32'h5555_0002, "tune A' region");
    rd(20'h6_0002, d); check(d == 32'h6666_0002, "tune B' region");
    rd(20'h7_1000, d); check(d == 32'h0000_6777, "spectrum A' region");
    rd(20'h8_1000, d); check(d == 32'h0000_9888, "spectrum B' region");
    rd(20'hF_0000, d); check(d == 0, "unmapped region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
