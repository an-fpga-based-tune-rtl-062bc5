// tune_pkg: constants and types shared by the booster tune-measurement firmware.
//
// The firmware runs on one sample clock. The ADC clock is taken as one third of the
// 352 MHz RF (117.3 MHz), which gives 144 ADC samples per booster turn (the booster
// harmonic number is 432) and lets the per-turn sampling delay be given in RF buckets,
// as the operator screen does. The FFT length of 1024 turns is the largest power of two
// that fits between pings spaced by the shortest interval (1.5 ms, about 1220 turns)
// after the 50-turn ping-to-FFT delay. Tune values are unsigned fractions of the
// revolution frequency with 16 fraction bits (tune = value / 65536).
package tune_pkg;

  // Sample clock and machine timing
  localparam int unsigned CLK_HZ          = 117_310_000; // RF / 3
  localparam int unsigned BUCKETS_PER_CLK = 3;           // RF buckets per sample clock
  localparam int unsigned CLKS_PER_TURN   = 144;         // 432 buckets / 3

  // Data widths
  localparam int ADC_W  = 14;   // ADC sample word (two's complement)
  localparam int SAMP_W = 16;   // averaged per-turn sample: ADC value x 4
  localparam int WIN_W  = 18;   // windowed sample entering the FFT
  localparam int FFT_W  = 32;   // FFT working width (no scaling between stages)
  localparam int MAG_W  = 32;   // magnitude out of the CORDIC
  localparam int PH_W   = 16;   // phase: full circle = 2^16
  localparam int TUNE_W = 16;   // tune fraction bits

  // Record sizes
  localparam int N_FFT   = 1024; // turns per FFT record
  localparam int N_PINGS = 128;  // pings (records) per booster ramp
  localparam int ADC_REC_DEPTH = 1024; // raw ADC samples per capture

  // Coded timing events (event numbers on the control screen)
  localparam logic [7:0] EV_LINAC_TRIG   = 8'd2;
  localparam logic [7:0] EV_BOOSTER_INJ  = 8'd46;
  localparam logic [7:0] EV_SR_INJ       = 8'd47;

  // ADC recorder trigger sources (soft / event / ping)
  typedef enum logic [1:0] {
    TRIG_SOFT  = 2'd0,
    TRIG_EVENT = 2'd1,
    TRIG_PING  = 2'd2
  } trig_src_e;

  // Settings shared by both tune channels
  typedef struct packed {
    logic [3:0]  extra_samples;   // additional ADC samples averaged per turn (0..15)
    logic [15:0] adc_delay;       // sampling delay after the turn marker, in RF buckets
    logic [15:0] ping_to_fft;     // turns from a ping to the first turn of the FFT record
  } chan_cfg_t;

  // Settings written by the host (ColdFire) into the register file
  typedef struct packed {
    logic        pinger_enable;   // pinger pulses on/off
    logic        adc_auto_restart;
    trig_src_e   adc_trig_src;
    logic        xpt_sel_a;       // channel A' takes ADC B when set
    logic        xpt_sel_b;       // channel B' takes ADC A when set
    chan_cfg_t   chan;
    logic [15:0] range_a_start, range_a_end;   // tune fractions, value / 2^16
    logic [15:0] range_b_start, range_b_end;
    logic [2:0]  ping_ev_en;      // linac trigger, booster inject, SR inject
    logic [2:0]  adc_ev_en;
    logic [15:0] ping_delay;      // 0.1 us units
    logic [15:0] adc_trig_delay;  // 0.1 us units
    logic [7:0]  npings;          // 0 = all table entries
  } host_cfg_t;

  // One-cycle commands from the host
  typedef struct packed {
    logic soft_ping;
    logic adc_arm;
    logic adc_disarm;
    logic adc_soft_trig;
  } host_cmd_t;

  // Status the host can read
  typedef struct packed {
    logic        pinger_busy;
    logic        adc_armed;
    logic        adc_recording;
    logic        adc_done;
    logic        tbt_busy_a;
    logic        tbt_busy_b;
    logic [15:0] adc_records;
    logic [15:0] overruns_a, overruns_b;
    logic [15:0] tune_count_a, tune_count_b;
    logic [15:0] last_tune_a, last_tune_b;
    logic [15:0] wf_records_a, wf_records_b;
  } host_status_t;

  // Host read bus regions (address bits [19:16])
  typedef enum logic [3:0] {
    RG_REGS   = 4'd0,
    RG_PTAB   = 4'd1,
    RG_ADCREC = 4'd2,
    RG_TBT_A  = 4'd3,
    RG_TBT_B  = 4'd4,
    RG_TUNE_A = 4'd5,
    RG_TUNE_B = 4'd6,
    RG_WF_A   = 4'd7,
    RG_WF_B   = 4'd8
  } region_e;

endpackage
