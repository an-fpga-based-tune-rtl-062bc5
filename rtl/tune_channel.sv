// tune_channel: one complete tune-measurement channel (one plane).
//
// Chain: per-turn sampling of the selected ADC -> turn-by-turn record of N turns,
// taken `ping_to_fft` turns after each ping -> DC removal and Hann window -> N-point
// FFT -> magnitude/phase per bin -> peak search in the channel's tune range with
// parabolic interpolation. Every spectrum goes to the waterfall recorder and every
// tune to the tune recorder, both at the index of the ping that produced them.
//
// The record replay waits until the FFT can take a new record (`ready`), so the chain
// never overruns internally; a ping arriving while the previous record is still being
// taken is counted in `overruns` and skipped. Per ping, after the last recorded turn,
// the result appears after about N (replay) + LOG2(N)*N/2 (FFT) + N/2 (output) + ~70
// clocks, i.e. about 7.8k clocks (67 us) for N = 1024.
// The phase of each bin is computed but not used: only the magnitude enters the peak
// search and the waterfall.
// As in the original: the processing chain and its recorders, two such channels (one
// per plane). The ordering of recorders relative to the chain follows the firmware
// block diagram; handshakes and latencies are this design's choices.
module tune_channel
  import tune_pkg::*;
#(
  parameter int N      = N_FFT,
  parameter int NPINGS = N_PINGS
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic signed [ADC_W-1:0]             adc,
  input  logic                                p0,
  input  chan_cfg_t                           cfg,
  input  logic [TUNE_W-1:0]                   start_tune,
  input  logic [TUNE_W-1:0]                   end_tune,
  input  logic                                ping_strobe,
  input  logic [$clog2(NPINGS)-1:0]           ping_idx,
  output logic                                sample_instant,
  output logic                                tune_valid,
  output logic                                tune_found,
  output logic [TUNE_W-1:0]                   tune,
  output logic [$clog2(N)-2:0]                peak_bin,
  output logic [MAG_W-1:0]                    peak_mag,
  output logic                                tbt_busy,
  output logic [15:0]                         overruns,
  output logic [15:0]                         tune_count,
  output logic [TUNE_W-1:0]                   last_tune,
  output logic [15:0]                         wf_records,
  input  logic [$clog2(N)-1:0]                tbt_rd_addr,
  output logic signed [SAMP_W-1:0]            tbt_rd_data,
  input  logic [$clog2(NPINGS)-1:0]           tune_rd_addr,
  output logic [31:0]                         tune_rd_data,
  input  logic [$clog2(NPINGS)+$clog2(N)-2:0] wf_rd_addr,
  output logic [15:0]                         wf_rd_data
);

  localparam int LN = $clog2(N);
  localparam int RW = $clog2(NPINGS);

  // per-turn samples
  logic                     t_valid;
  logic signed [SAMP_W-1:0] t_sample;
  // record replay
  logic                     r_valid, r_last;
  logic [LN-1:0]            r_idx;
  logic signed [SAMP_W-1:0] r_data, r_mean;
  logic [RW-1:0]            r_rec, fft_rec;
  // windowed
  logic                     w_valid, w_last;
  logic [LN-1:0]            w_idx;
  logic signed [WIN_W-1:0]  w_data;
  // spectrum
  logic                     f_ready, f_valid, f_last;
  logic [LN-2:0]            f_idx;
  logic signed [FFT_W-1:0]  f_re, f_im;
  // magnitude
  logic                     m_valid, m_last;
  logic [LN-2:0]            m_idx;
  logic [MAG_W-1:0]         m_mag;
  logic signed [PH_W-1:0]   m_phase;

  turn_sampler u_samp (
    .clk, .rst, .adc, .p0,
    .extra_samples (cfg.extra_samples),
    .adc_delay     (cfg.adc_delay),
    .sample_instant,
    .turn_valid    (t_valid),
    .turn_sample   (t_sample)
  );

  tbt_recorder #(.N(N), .NPINGS(NPINGS)) u_tbt (
    .clk, .rst,
    .turn_valid  (t_valid),
    .turn_sample (t_sample),
    .ping_strobe, .ping_idx,
    .ping_to_fft (cfg.ping_to_fft),
    .play_ready  (f_ready),
    .out_valid   (r_valid),
    .out_last    (r_last),
    .out_idx     (r_idx),
    .out_data    (r_data),
    .out_mean    (r_mean),
    .out_rec     (r_rec),
    .busy        (tbt_busy),
    .overruns,
    .rd_addr     (tbt_rd_addr),
    .rd_data     (tbt_rd_data)
  );

  // the record index travels with the spectrum
  always_ff @(posedge clk) begin
    if (rst)                          fft_rec <= '0;
    else if (r_valid && r_idx == '0)  fft_rec <= r_rec;
  end

  dc_window #(.N(N)) u_win (
    .clk, .rst,
    .in_valid (r_valid), .in_last (r_last), .in_idx (r_idx),
    .in_data  (r_data),  .in_mean (r_mean),
    .out_valid(w_valid), .out_last(w_last), .out_idx(w_idx), .out_data(w_data)
  );

  fft_core #(.N(N)) u_fft (
    .clk, .rst,
    .in_valid (w_valid), .in_last (w_last), .in_idx (w_idx), .in_data (w_data),
    .ready    (f_ready),
    .out_valid(f_valid), .out_last(f_last), .out_idx(f_idx),
    .out_re   (f_re),    .out_im  (f_im)
  );

  cordic_magphase #(.IDX_W(LN-1)) u_mag (
    .clk, .rst,
    .in_valid (f_valid), .in_last (f_last), .in_idx (f_idx),
    .in_re    (f_re),    .in_im   (f_im),
    .out_valid(m_valid), .out_last(m_last), .out_idx(m_idx),
    .out_mag  (m_mag),   .out_phase(m_phase)
  );

  peak_detect #(.N(N)) u_peak (
    .clk, .rst,
    .in_valid (m_valid), .in_last (m_last), .in_idx (m_idx), .in_mag (m_mag),
    .start_tune, .end_tune,
    .tune_valid, .found (tune_found), .tune,
    .peak_bin, .peak_mag
  );

  waterfall_recorder #(.N(N), .NPINGS(NPINGS)) u_wf (
    .clk, .rst,
    .in_valid (m_valid), .in_last (m_last), .in_idx (m_idx), .in_mag (m_mag),
    .rec      (fft_rec),
    .rd_addr  (wf_rd_addr),
    .rd_data  (wf_rd_data),
    .records  (wf_records)
  );

  tune_recorder #(.NPINGS(NPINGS)) u_tune (
    .clk, .rst,
    .in_valid (tune_valid), .in_found (tune_found), .in_tune (tune),
    .rec      (fft_rec),
    .rd_addr  (tune_rd_addr),
    .rd_data  (tune_rd_data),
    .count    (tune_count),
    .last_tune
  );

endmodule
