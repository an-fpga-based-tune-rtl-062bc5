// tbt_recorder: turn-by-turn record of one channel, the input of the FFT.
//
// After a ping the beam oscillates at its betatron tune. The recorder waits
// `ping_to_fft` turns after the ping (letting the kick settle), stores the next N
// per-turn samples, and sums them on the way in. It then replays the N samples, in
// order, as a stream to the DC-removal / window stage, together with their mean
// (sum / N, N a power of two) and the index of the ping the record belongs to. The
// stored record stays readable by the host until the next capture starts, for
// troubleshooting and offline analysis.
//
// States: IDLE -> DELAY -> CAPTURE -> (wait for play_ready) -> PLAY -> IDLE.
// A ping that arrives while the recorder is not idle is not recorded; `overruns`
// counts such pings. Playback sends one sample per clock: out_valid / out_idx /
// out_data, with out_mean and out_rec held constant during the stream; out_last marks
// sample N-1. Host read port: rd_addr in, rd_data one cycle later.
// As in the original: turn histories are recorded, and FFT records start a programmed
// number of turns after the ping. The record length, the stream interface and the
// handling of early pings are this design's choices.
module tbt_recorder
  import tune_pkg::*;
#(
  parameter int N      = N_FFT,
  parameter int NPINGS = N_PINGS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      turn_valid,
  input  logic signed [SAMP_W-1:0]  turn_sample,
  input  logic                      ping_strobe,
  input  logic [$clog2(NPINGS)-1:0] ping_idx,
  input  logic [15:0]               ping_to_fft,
  input  logic                      play_ready,
  output logic                      out_valid,
  output logic                      out_last,
  output logic [$clog2(N)-1:0]      out_idx,
  output logic signed [SAMP_W-1:0]  out_data,
  output logic signed [SAMP_W-1:0]  out_mean,
  output logic [$clog2(NPINGS)-1:0] out_rec,
  output logic                      busy,
  output logic [15:0]               overruns,
  input  logic [$clog2(N)-1:0]      rd_addr,
  output logic signed [SAMP_W-1:0]  rd_data
);

  localparam int LN = $clog2(N);
  localparam int SUM_W = SAMP_W + LN;

  typedef enum logic [2:0] {T_IDLE, T_DELAY, T_CAPTURE, T_WAIT, T_PLAY} tstate_e;

  tstate_e                  st;
  logic [15:0]              dcnt;
  logic [LN-1:0]            widx, pidx;
  logic signed [SUM_W-1:0]  sum;
  logic signed [SAMP_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (st == T_CAPTURE && turn_valid) mem[widx] <= turn_sample;
    rd_data  <= mem[rd_addr];
    out_data <= mem[pidx];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= T_IDLE;
      dcnt      <= '0;
      widx      <= '0;
      pidx      <= '0;
      sum       <= '0;
      out_mean  <= '0;
      out_rec   <= '0;
      overruns  <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (ping_strobe && st != T_IDLE) overruns <= overruns + 16'd1;
      unique case (st)
        T_IDLE: if (ping_strobe) begin
                  out_rec <= ping_idx;
                  dcnt    <= ping_to_fft;
                  st      <= T_DELAY;
                end
        T_DELAY: begin
                  widx <= '0;
                  sum  <= '0;
                  if (dcnt == '0)      st   <= T_CAPTURE;
                  else if (turn_valid) dcnt <= dcnt - 16'd1;
                end
        T_CAPTURE: if (turn_valid) begin
                  sum  <= sum + SUM_W'(turn_sample);
                  widx <= widx + 1'b1;
                  if (widx == LN'(N - 1)) st <= T_WAIT;
                end
        T_WAIT: if (play_ready) begin
                  out_mean <= SAMP_W'(sum >>> LN);
                  pidx     <= '0;
                  st       <= T_PLAY;
                end
        T_PLAY: begin
                  out_valid <= 1'b1;
                  out_idx   <= pidx;
                  out_last  <= (pidx == LN'(N - 1));
                  pidx      <= pidx + 1'b1;
                  if (pidx == LN'(N - 1)) st <= T_IDLE;
                end
        default: st <= T_IDLE;
      endcase
    end
  end

  assign busy = (st != T_IDLE);

endmodule
