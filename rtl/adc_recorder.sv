// adc_recorder: captures a raw waveform of both ADC channels for timing set-up.
//
// Used to line up the per-turn sampling point with the beam signal: it stores DEPTH
// consecutive raw samples of ADC A and ADC B together with the sampling-instant flag of
// the per-turn sampler, so a display can show the pickup bursts and where in them the
// samples are taken. The host arms the recorder; the trigger comes from a soft trigger,
// a timing event or a ping (trig_src); after `trig_delay` ticks of the 0.1 us time
// base the recorder writes DEPTH samples and stops. With auto_restart set it re-arms
// itself after each record. Disarm returns it to idle at any time.
//
// States: IDLE -> ARMED -> DELAY -> RECORD -> DONE (-> ARMED if auto_restart).
// A trigger pulse is sampled only in ARMED. The first sample is the one present on the
// cycle after the delay count reaches zero. Host read port: rd_addr in, rd_data one
// cycle later, packed {flag, 3'b0, B[13:0], A[13:0]}; rec_count counts completed records.
// As in the original: raw waveforms of both channels, the sampling-point trace, arm /
// disarm, auto restart, soft/event/ping triggering and a trigger delay up to 6553.5 us
// in 0.1 us steps. The depth of 1024 is read off the display; the rest is this
// design's choice.
module adc_recorder
  import tune_pkg::*;
#(
  parameter int DEPTH = ADC_REC_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [ADC_W-1:0]  adc_a,
  input  logic signed [ADC_W-1:0]  adc_b,
  input  logic                     sample_flag,
  input  logic                     arm,
  input  logic                     disarm,
  input  logic                     auto_restart,
  input  trig_src_e                trig_src,
  input  logic                     soft_trig,
  input  logic                     event_trig,
  input  logic                     ping_trig,
  input  logic [15:0]              trig_delay,   // 0.1 us units
  input  logic                     tick_100ns,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [31:0]              rd_data,
  output logic                     armed,
  output logic                     recording,
  output logic                     done,
  output logic [15:0]              rec_count
);

  localparam int AW = $clog2(DEPTH);

  typedef enum logic [2:0] {R_IDLE, R_ARMED, R_DELAY, R_RECORD, R_DONE} rstate_e;

  rstate_e        st;
  logic [15:0]    dcnt;
  logic [AW-1:0]  waddr;
  logic           trig;
  logic [31:0]    mem [DEPTH];

  always_comb begin
    unique case (trig_src)
      TRIG_SOFT:  trig = soft_trig;
      TRIG_EVENT: trig = event_trig;
      TRIG_PING:  trig = ping_trig;
      default:    trig = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (st == R_RECORD)
      mem[waddr] <= {sample_flag, 3'b000, ADC_W'(adc_b), ADC_W'(adc_a)};
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= R_IDLE;
      dcnt      <= '0;
      waddr     <= '0;
      rec_count <= '0;
    end else if (disarm) begin
      st <= R_IDLE;
    end else begin
      unique case (st)
        R_IDLE:  if (arm) st <= R_ARMED;
        R_ARMED: if (trig) begin
                   dcnt <= trig_delay;
                   st   <= R_DELAY;
                 end
        R_DELAY: if (dcnt == '0) begin
                   waddr <= '0;
                   st    <= R_RECORD;
                 end else if (tick_100ns) begin
                   dcnt <= dcnt - 16'd1;
                 end
        R_RECORD: begin
                   waddr <= waddr + 1'b1;
                   if (waddr == AW'(DEPTH - 1)) begin
                     rec_count <= rec_count + 16'd1;
                     st        <= auto_restart ? R_ARMED : R_DONE;
                   end
                 end
        R_DONE:  if (arm) st <= R_ARMED;
        default: st <= R_IDLE;
      endcase
    end
  end

  assign armed     = (st == R_ARMED) || (st == R_DELAY);
  assign recording = (st == R_RECORD);
  assign done      = (st == R_DONE);

endmodule
