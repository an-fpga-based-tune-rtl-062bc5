// event_receiver: picks the machine timing events that start a measurement.
//
// The accelerator distributes injection and ring events as event codes. The firmware
// can serve the particle accumulator ring, the booster or the storage ring, so three
// events are recognised: linac trigger (2), booster inject (46) and storage-ring inject
// (47). For each of them the operator enables, separately, "start pinger" and "ADC
// recorder". An enabled pinger event starts the ping sequence after a programmable delay
// in 0.1 us steps (16 bits, 0 to 6553.5 us); an enabled ADC-recorder event is passed on
// at once, the ADC recorder applying its own trigger delay.
//
// The event link itself is decoded outside this block: ev_valid marks one sample-clock
// cycle on which ev_code holds a received event number. The 0.1 us time base is a
// 32-bit phase accumulator stepping by 2^32 * 10 MHz / CLK_HZ per clock, so its ticks
// are 0.1 us apart on average; the delay is therefore exact to within one tick. An
// event arriving while a delay is running restarts it.
//
// Timing: pinger_start and adc_event are one-cycle pulses. pinger_start comes when the
// delay count has run out: with a delay of 0 it follows the event by two cycles.
// The event numbers and the delay units follow the events/trigger control screen; the
// link decoding, the tick generator and the restart rule are this design's choices.
module event_receiver
  import tune_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = CLK_HZ,
  parameter logic [7:0]  EV_CODE0    = EV_LINAC_TRIG,
  parameter logic [7:0]  EV_CODE1    = EV_BOOSTER_INJ,
  parameter logic [7:0]  EV_CODE2    = EV_SR_INJ
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ev_valid,
  input  logic [7:0]  ev_code,
  input  logic [2:0]  ping_ev_en,   // bit i: event i starts the pinger
  input  logic [2:0]  adc_ev_en,    // bit i: event i triggers the ADC recorder
  input  logic [15:0] ping_delay,   // pinger start delay, 0.1 us units
  output logic        tick_100ns,   // 10 MHz time base, one-cycle pulses
  output logic        pinger_start,
  output logic        adc_event,
  output logic        delay_busy
);

  localparam logic [31:0] TICK_INC =
      32'((longint'(1) << 32) * 64'd10_000_000 / longint'(CLK_FREQ_HZ));

  logic [31:0] phase;
  logic [2:0]  hit;
  logic [15:0] dcnt;

  always_comb begin
    hit[0] = ev_valid && (ev_code == EV_CODE0);
    hit[1] = ev_valid && (ev_code == EV_CODE1);
    hit[2] = ev_valid && (ev_code == EV_CODE2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= '0;
      tick_100ns <= 1'b0;
    end else begin
      {tick_100ns, phase} <= {1'b0, phase} + {1'b0, TICK_INC};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt         <= '0;
      delay_busy   <= 1'b0;
      pinger_start <= 1'b0;
      adc_event    <= 1'b0;
    end else begin
      pinger_start <= 1'b0;
      adc_event    <= |(hit & adc_ev_en);
      if (|(hit & ping_ev_en)) begin
        dcnt       <= ping_delay;
        delay_busy <= 1'b1;
      end else if (delay_busy) begin
        if (dcnt == '0) begin
          pinger_start <= 1'b1;
          delay_busy   <= 1'b0;
        end else if (tick_100ns) begin
          dcnt <= dcnt - 16'd1;
        end
      end
    end
  end

endmodule
