// coldfire_if: register file and read multiplexer for the embedded processor.
//
// The processor board that serves the control system reaches the firmware through a
// simple synchronous word bus: `cs` with `we` writes `wdata` at word address `addr`,
// `cs` without `we` reads, and the read word appears on `rdata` with `rvalid` on the
// next clock. Address bits [19:16] select a region (region_e): the registers, the
// ping table, the raw ADC record, the turn-by-turn records, tune records and spectra
// of channels A' and B'. The low address bits go straight to the memories
// (`mem_addr`), whose registered read ports supply the word a clock later.
//
// Registers (region 0, word addresses):
//   0x00 CTRL      [0] pinger on, [1] ADC auto restart, [3:2] ADC trigger source
//                  (0 soft, 1 event, 2 ping), [4] A' takes ADC B, [5] B' takes ADC A
//   0x01 CMD       write-only pulses: [0] soft ping, [1] ADC arm, [2] ADC disarm,
//                  [3] ADC soft trigger
//   0x02 EXTRA     [3:0] additional ADC samples averaged per turn   (reset 3)
//   0x03 ADC_DELAY [15:0] sampling delay in RF buckets               (reset 201)
//   0x04 PING_FFT  [15:0] turns from ping to FFT record               (reset 50)
//   0x05 RANGE_A   [15:0] start, [31:16] end tune of A'  (reset 0.33 .. 0.40)
//   0x06 RANGE_B   [15:0] start, [31:16] end tune of B'  (reset 0.1271 .. 0.30)
//   0x07 EVENTS    [2:0] start-pinger enables, [6:4] ADC-recorder enables
//                  (bit 0 linac trigger, 1 booster inject, 2 storage-ring inject)
//   0x08 PING_DLY  [15:0] pinger start delay, 0.1 us                  (reset 3000)
//   0x09 ADC_DLY   [15:0] ADC recorder trigger delay, 0.1 us          (reset 3000)
//   0x0A NPINGS    [7:0] pings per sequence, 0 = all                  (reset 0)
//   0x10 STATUS    [0] pinger busy, [1] ADC armed, [2] recording, [3] ADC done,
//                  [4] A' record busy, [5] B' record busy
//   0x11 ADC_RECS  completed raw ADC records
//   0x12 OVERRUNS  [15:0] A', [31:16] B'   skipped pings
//   0x13 TUNES     [15:0] A', [31:16] B'   stored tunes
//   0x14 LAST_TUNE [15:0] A', [31:16] B'
//   0x15 SPECTRA   [15:0] A', [31:16] B'   stored spectra
// Reset values of the settings are those shown on the operator screens of the
// original system; the bus, the address map and the encodings are this design's own
// (the original description names the interface but does not describe it).
module coldfire_if
  import tune_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // processor bus
  input  logic         cs,
  input  logic         we,
  input  logic [19:0]  addr,
  input  logic [31:0]  wdata,
  output logic [31:0]  rdata,
  output logic         rvalid,
  // settings, commands, status
  output host_cfg_t    cfg,
  output host_cmd_t    cmd,
  input  host_status_t status,
  // ping table write port
  output logic         ptab_we,
  // memories: shared address, registered read data
  output logic [15:0]  mem_addr,
  input  logic [31:0]  ptab_rdata,
  input  logic [31:0]  adc_rdata,
  input  logic [15:0]  tbt_a_rdata,
  input  logic [15:0]  tbt_b_rdata,
  input  logic [31:0]  tune_a_rdata,
  input  logic [31:0]  tune_b_rdata,
  input  logic [15:0]  wf_a_rdata,
  input  logic [15:0]  wf_b_rdata
);

  region_e     region, region_q;
  logic [31:0] reg_q;
  logic        wr, rd;

  assign region   = region_e'(addr[19:16]);
  assign mem_addr = addr[15:0];
  assign wr       = cs && we;
  assign rd       = cs && !we;
  assign ptab_we  = wr && (region == RG_PTAB);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg                  <= '0;
      cfg.chan.extra_samples <= 4'd3;
      cfg.chan.adc_delay   <= 16'd201;
      cfg.chan.ping_to_fft <= 16'd50;
      cfg.range_a_start    <= 16'd21627;   // 0.33
      cfg.range_a_end      <= 16'd26214;   // 0.40
      cfg.range_b_start    <= 16'd8330;    // 0.1271
      cfg.range_b_end      <= 16'd19661;   // 0.30
      cfg.ping_delay       <= 16'd3000;    // 300.0 us
      cfg.adc_trig_delay   <= 16'd3000;
      cfg.adc_trig_src     <= TRIG_SOFT;
      cmd                  <= '0;
    end else begin
      cmd <= '0;
      if (wr && region == RG_REGS) begin
        unique case (addr[7:0])
          8'h00: begin
                   cfg.pinger_enable    <= wdata[0];
                   cfg.adc_auto_restart <= wdata[1];
                   cfg.adc_trig_src     <= trig_src_e'(wdata[3:2]);
                   cfg.xpt_sel_a        <= wdata[4];
                   cfg.xpt_sel_b        <= wdata[5];
                 end
          8'h01: cmd <= host_cmd_t'({wdata[0], wdata[1], wdata[2], wdata[3]});
          8'h02: cfg.chan.extra_samples <= wdata[3:0];
          8'h03: cfg.chan.adc_delay     <= wdata[15:0];
          8'h04: cfg.chan.ping_to_fft   <= wdata[15:0];
          8'h05: {cfg.range_a_end, cfg.range_a_start} <= wdata;
          8'h06: {cfg.range_b_end, cfg.range_b_start} <= wdata;
          8'h07: begin
                   cfg.ping_ev_en <= wdata[2:0];
                   cfg.adc_ev_en  <= wdata[6:4];
                 end
          8'h08: cfg.ping_delay     <= wdata[15:0];
          8'h09: cfg.adc_trig_delay <= wdata[15:0];
          8'h0A: cfg.npings         <= wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  // register read-back, registered like the memories
  always_ff @(posedge clk) begin
    if (rst) begin
      reg_q    <= '0;
      region_q <= RG_REGS;
      rvalid   <= 1'b0;
    end else begin
      rvalid   <= rd;
      region_q <= region;
      unique case (addr[7:0])
        8'h00: reg_q <= {26'd0, cfg.xpt_sel_b, cfg.xpt_sel_a, cfg.adc_trig_src,
                         cfg.adc_auto_restart, cfg.pinger_enable};
        8'h02: reg_q <= {28'd0, cfg.chan.extra_samples};
        8'h03: reg_q <= {16'd0, cfg.chan.adc_delay};
        8'h04: reg_q <= {16'd0, cfg.chan.ping_to_fft};
        8'h05: reg_q <= {cfg.range_a_end, cfg.range_a_start};
        8'h06: reg_q <= {cfg.range_b_end, cfg.range_b_start};
        8'h07: reg_q <= {25'd0, cfg.adc_ev_en, 1'b0, cfg.ping_ev_en};
        8'h08: reg_q <= {16'd0, cfg.ping_delay};
        8'h09: reg_q <= {16'd0, cfg.adc_trig_delay};
        8'h0A: reg_q <= {24'd0, cfg.npings};
        8'h10: reg_q <= {26'd0, status.tbt_busy_b, status.tbt_busy_a, status.adc_done,
                         status.adc_recording, status.adc_armed, status.pinger_busy};
        8'h11: reg_q <= {16'd0, status.adc_records};
        8'h12: reg_q <= {status.overruns_b, status.overruns_a};
        8'h13: reg_q <= {status.tune_count_b, status.tune_count_a};
        8'h14: reg_q <= {status.last_tune_b, status.last_tune_a};
        8'h15: reg_q <= {status.wf_records_b, status.wf_records_a};
        default: reg_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (region_q)
      RG_REGS:   rdata = reg_q;
      RG_PTAB:   rdata = ptab_rdata;
      RG_ADCREC: rdata = adc_rdata;
      RG_TBT_A:  rdata = {{16{tbt_a_rdata[15]}}, tbt_a_rdata};
      RG_TBT_B:  rdata = {{16{tbt_b_rdata[15]}}, tbt_b_rdata};
      RG_TUNE_A: rdata = tune_a_rdata;
      RG_TUNE_B: rdata = tune_b_rdata;
      RG_WF_A:   rdata = {16'd0, wf_a_rdata};
      RG_WF_B:   rdata = {16'd0, wf_b_rdata};
      default:   rdata = '0;
    endcase
  end

endmodule
