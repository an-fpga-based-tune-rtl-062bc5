// tune_top: FPGA firmware of the booster tune-measurement system.
//
// A pinger kicks the beam at programmed times along the 226 ms energy ramp; after each
// ping both transverse planes are sampled once per turn, and an FFT of N turns, a
// magnitude stage and an interpolating peak search yield the betatron tune of that
// moment. Over a ramp the firmware collects, per plane, one tune and one spectrum per
// ping, plus the raw turn-by-turn record of the latest ping and a raw ADC waveform for
// timing set-up.
//
// Blocks: crosspoint (ADC A/B to tune channels A'/B'), two tune_channel instances
// (sampling, turn-by-turn record, DC removal and window, FFT, magnitude/phase, peak
// detect, waterfall and tune recorders), event_receiver (machine events and the 0.1 us
// time base), pinger_driver (ping table and the trigger to the external pulse
// generator), adc_recorder and coldfire_if (processor registers and readout).
// As in the original: this set of blocks, two channels behind an A/B crosspoint, and
// 128 pings per ramp. This design's own choices: the single RF/3 clock, the 1024-turn
// FFT and the delay alignment described below.
//
// Interface: one sample clock (the ADC clock, RF/3); `rst` synchronous, active high;
// ADC words in two's complement; `p0` a one-cycle revolution marker per turn
// synchronous to the clock; `ev_valid`/`ev_code` a decoded timing event; the
// processor bus as described in coldfire_if; `ping_out` the pinger trigger. The
// latest tune of each channel is also brought out with its strobe for a fast digital
// link, with its found flag (low when no bin of the range was searched). p0 is
// delayed one clock to match the crosspoint register, and the raw ADC
// words are delayed two clocks into the ADC recorder so that the recorded
// sampling-instant flag lines up with the sample it marks.
//
// Left unconnected on purpose: the sampling-instant marker of channel B' (the ADC
// recorder flags channel A' only; both channels share one sampling delay) and the peak
// bin and magnitude of each channel, which exist for the channel's own test.
module tune_top
  import tune_pkg::*;
#(
  parameter int N         = N_FFT,
  parameter int NPINGS    = N_PINGS,
  parameter int ADC_DEPTH = ADC_REC_DEPTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc_a,
  input  logic signed [ADC_W-1:0] adc_b,
  input  logic                    p0,
  input  logic                    ev_valid,
  input  logic [7:0]              ev_code,
  input  logic                    cs,
  input  logic                    we,
  input  logic [19:0]             addr,
  input  logic [31:0]             wdata,
  output logic [31:0]             rdata,
  output logic                    rvalid,
  output logic                    ping_out,
  output logic                    tune_valid_a,
  output logic [TUNE_W-1:0]       tune_a,
  output logic                    tune_found_a,
  output logic                    tune_valid_b,
  output logic [TUNE_W-1:0]       tune_b,
  output logic                    tune_found_b
);

  localparam int LN = $clog2(N);
  localparam int RW = $clog2(NPINGS);

  host_cfg_t    cfg;
  host_cmd_t    cmd;
  host_status_t status;

  logic                    ptab_we;
  logic [15:0]             mem_addr;
  logic [31:0]             ptab_rdata, adc_rdata, tune_a_rdata, tune_b_rdata;
  logic [15:0]             tbt_a_rdata, tbt_b_rdata;
  logic [15:0]             wf_a_rdata, wf_b_rdata;

  logic signed [ADC_W-1:0] xa, xb;
  logic signed [ADC_W-1:0] adc_a_d [2];
  logic signed [ADC_W-1:0] adc_b_d [2];
  logic                    p0_d;

  logic                    tick_100ns, pinger_start, adc_event, ev_busy, seq_busy;
  logic                    ping_strobe;
  logic [RW-1:0]           ping_idx;
  logic                    si_a, si_b;
  logic [LN-2:0]           pbin_a, pbin_b;
  logic [MAG_W-1:0]        pmag_a, pmag_b;

  always_ff @(posedge clk) begin
    p0_d       <= p0;
    adc_a_d[0] <= adc_a;
    adc_a_d[1] <= adc_a_d[0];
    adc_b_d[0] <= adc_b;
    adc_b_d[1] <= adc_b_d[0];
  end

  coldfire_if u_cf (
    .clk, .rst, .cs, .we, .addr, .wdata, .rdata, .rvalid,
    .cfg, .cmd, .status,
    .ptab_we, .mem_addr,
    .ptab_rdata, .adc_rdata,
    .tbt_a_rdata, .tbt_b_rdata,
    .tune_a_rdata, .tune_b_rdata,
    .wf_a_rdata, .wf_b_rdata
  );

  crosspoint u_xpt (
    .clk,
    .in_a (adc_a), .in_b (adc_b),
    .sel_a(cfg.xpt_sel_a), .sel_b(cfg.xpt_sel_b),
    .out_a(xa), .out_b(xb)
  );

  event_receiver u_evr (
    .clk, .rst, .ev_valid, .ev_code,
    .ping_ev_en (cfg.ping_ev_en),
    .adc_ev_en  (cfg.adc_ev_en),
    .ping_delay (cfg.ping_delay),
    .tick_100ns, .pinger_start, .adc_event,
    .delay_busy (ev_busy)
  );

  pinger_driver #(.NPINGS(NPINGS)) u_ping (
    .clk, .rst,
    .enable    (cfg.pinger_enable),
    .start     (pinger_start),
    .soft_ping (cmd.soft_ping),
    .p0        (p0_d),
    .npings    ((RW+1)'(cfg.npings)),
    .tab_we    (ptab_we),
    .tab_addr  (mem_addr[RW-1:0]),
    .tab_wdata (wdata),
    .tab_rdata (ptab_rdata),
    .ping_out, .ping_strobe, .ping_idx,
    .seq_busy  (seq_busy)
  );

  // The pinger counts as busy from the machine event until its last ping.
  assign status.pinger_busy = ev_busy | seq_busy;

  adc_recorder #(.DEPTH(ADC_DEPTH)) u_adcrec (
    .clk, .rst,
    .adc_a        (adc_a_d[1]),
    .adc_b        (adc_b_d[1]),
    .sample_flag  (si_a),
    .arm          (cmd.adc_arm),
    .disarm       (cmd.adc_disarm),
    .auto_restart (cfg.adc_auto_restart),
    .trig_src     (cfg.adc_trig_src),
    .soft_trig    (cmd.adc_soft_trig),
    .event_trig   (adc_event),
    .ping_trig    (ping_strobe),
    .trig_delay   (cfg.adc_trig_delay),
    .tick_100ns,
    .rd_addr      (mem_addr[$clog2(ADC_DEPTH)-1:0]),
    .rd_data      (adc_rdata),
    .armed        (status.adc_armed),
    .recording    (status.adc_recording),
    .done         (status.adc_done),
    .rec_count    (status.adc_records)
  );

  tune_channel #(.N(N), .NPINGS(NPINGS)) u_cha (
    .clk, .rst, .adc (xa), .p0 (p0_d), .cfg (cfg.chan),
    .start_tune (cfg.range_a_start), .end_tune (cfg.range_a_end),
    .ping_strobe, .ping_idx,
    .sample_instant (si_a),
    .tune_valid (tune_valid_a), .tune_found (tune_found_a), .tune (tune_a),
    .peak_bin (pbin_a), .peak_mag (pmag_a),
    .tbt_busy (status.tbt_busy_a), .overruns (status.overruns_a),
    .tune_count (status.tune_count_a), .last_tune (status.last_tune_a),
    .wf_records (status.wf_records_a),
    .tbt_rd_addr  (mem_addr[LN-1:0]),        .tbt_rd_data  (tbt_a_rdata),
    .tune_rd_addr (mem_addr[RW-1:0]),        .tune_rd_data (tune_a_rdata),
    .wf_rd_addr   (mem_addr[RW+LN-2:0]),     .wf_rd_data   (wf_a_rdata)
  );

  tune_channel #(.N(N), .NPINGS(NPINGS)) u_chb (
    .clk, .rst, .adc (xb), .p0 (p0_d), .cfg (cfg.chan),
    .start_tune (cfg.range_b_start), .end_tune (cfg.range_b_end),
    .ping_strobe, .ping_idx,
    .sample_instant (si_b),
    .tune_valid (tune_valid_b), .tune_found (tune_found_b), .tune (tune_b),
    .peak_bin (pbin_b), .peak_mag (pmag_b),
    .tbt_busy (status.tbt_busy_b), .overruns (status.overruns_b),
    .tune_count (status.tune_count_b), .last_tune (status.last_tune_b),
    .wf_records (status.wf_records_b),
    .tbt_rd_addr  (mem_addr[LN-1:0]),        .tbt_rd_data  (tbt_b_rdata),
    .tune_rd_addr (mem_addr[RW-1:0]),        .tune_rd_data (tune_b_rdata),
    .wf_rd_addr   (mem_addr[RW+LN-2:0]),     .wf_rd_data   (wf_b_rdata)
  );

endmodule
