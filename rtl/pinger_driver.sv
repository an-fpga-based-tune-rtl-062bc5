// pinger_driver: issues the ping triggers of one booster ramp.
//
// The pinger (a pulse generator driving two-channel half-sine pulsers into the
// striplines) kicks the beam once per ping. The ping times are held in a table written
// by the host: entry i gives the interval, in turns, from the previous ping (or from
// the sequence start for i = 0) and a timing offset, in sample clocks, from the
// revolution marker of that turn. The offset sets the kick strength: the pulser's
// half-sine output is shifted against the bunch, so a later or earlier ping sees a
// different part of the waveform. A sequence of npings pings (1..N_PINGS, 0 meaning
// N_PINGS) runs after `start`; `soft_ping` instead fires a single ping, on the next turn,
// with the offset of entry 0.
//
// Sequence: IDLE -> WAIT_TURNS (count turn markers) -> WAIT_OFFSET (count clocks after
// the marker) -> fire -> next entry or IDLE. A ping fires offset+1 clocks after the
// turn marker that ends its interval. `ping_strobe` is a one-cycle pulse carrying the
// ping's index in `ping_idx`; `ping_out`, the trigger to the external pulse generator,
// is PULSE_CLKS cycles wide and is suppressed while `enable` is low (pinger off), the
// sequence and its strobes running on so that unkicked records can still be taken.
// A start or soft ping while a sequence runs is ignored.
//
// As in the original: pings at programmable, variable intervals written as an array, a
// pinger on/off switch, a soft trigger, and strength set by timing relative to the beam.
// The table layout, units, pulse width and on/off behaviour are this design's choices.
module pinger_driver
  import tune_pkg::*;
#(
  parameter int NPINGS     = N_PINGS,
  parameter int PULSE_CLKS = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      enable,
  input  logic                      start,
  input  logic                      soft_ping,
  input  logic                      p0,          // revolution marker, one cycle per turn
  input  logic [$clog2(NPINGS):0]   npings,
  // ping table write / read port (host)
  input  logic                      tab_we,
  input  logic [$clog2(NPINGS)-1:0] tab_addr,
  input  logic [31:0]               tab_wdata,   // {offset_clks[15:0], interval_turns[15:0]}
  output logic [31:0]               tab_rdata,   // registered, one cycle after tab_addr
  // outputs
  output logic                      ping_out,
  output logic                      ping_strobe,
  output logic [$clog2(NPINGS)-1:0] ping_idx,
  output logic                      seq_busy
);

  localparam int IW = $clog2(NPINGS);

  typedef enum logic [1:0] {S_IDLE, S_TURNS, S_OFFSET} state_e;

  logic [31:0] ptab [NPINGS];
  state_e      state;
  logic [IW-1:0] idx;
  logic [15:0] tcnt, ocnt;
  logic        single;
  logic [$clog2(PULSE_CLKS+1)-1:0] pw;
  logic [IW:0] last;
  logic [15:0] cur_off, nxt_int;

  assign last = (npings == '0) ? (IW+1)'(NPINGS - 1) : npings - 1'b1;
  assign cur_off = ptab[idx][31:16];
  assign nxt_int = ptab[idx + 1'b1][15:0];

  always_ff @(posedge clk) begin
    if (tab_we) ptab[tab_addr] <= tab_wdata;
    tab_rdata <= ptab[tab_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      idx         <= '0;
      tcnt        <= '0;
      ocnt        <= '0;
      single      <= 1'b0;
      ping_strobe <= 1'b0;
      ping_idx    <= '0;
    end else begin
      ping_strobe <= 1'b0;
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (start) begin
            single <= 1'b0;
            tcnt   <= ptab[0][15:0];
            state  <= S_TURNS;
          end else if (soft_ping) begin
            single <= 1'b1;
            tcnt   <= 16'd1;
            state  <= S_TURNS;
          end
        end
        S_TURNS: begin
          if (p0) begin
            if (tcnt <= 16'd1) begin
              ocnt  <= cur_off;
              state <= S_OFFSET;
            end else begin
              tcnt <= tcnt - 16'd1;
            end
          end
        end
        S_OFFSET: begin
          if (ocnt != '0) begin
            ocnt <= ocnt - 16'd1;
          end else begin
            ping_strobe <= 1'b1;
            ping_idx    <= idx;
            if (single || ({1'b0, idx} == last)) begin
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              tcnt  <= nxt_int;
              state <= S_TURNS;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Output pulse to the external pulse generator
  always_ff @(posedge clk) begin
    if (rst) begin
      pw       <= '0;
      ping_out <= 1'b0;
    end else if (ping_strobe && enable) begin
      pw       <= ($clog2(PULSE_CLKS+1))'(PULSE_CLKS - 1);
      ping_out <= 1'b1;
    end else if (pw != '0) begin
      pw <= pw - 1'b1;
    end else begin
      ping_out <= 1'b0;
    end
  end

  assign seq_busy = (state != S_IDLE);

endmodule
