// tune_recorder: keeps the detected tune of every ping of a ramp.
//
// Each result of the peak detector is stored at the index of the ping it came from,
// so after a ramp the memory holds the tune against time along the ramp (one
// waveform per plane). Word format: bit 31 = a peak was found in the search range,
// bits 15..0 = tune (fraction of the revolution frequency, value / 2^16).
//
// Timing: written on the clock `in_valid` is seen; `count` counts stored results;
// `last_tune` holds the latest result for a direct readout. Host read port: rd_addr
// in, rd_data one cycle later.
// As in the original: a recorder of detected tunes, read as a waveform per plane. The
// word format is this design's choice.
module tune_recorder
  import tune_pkg::*;
#(
  parameter int NPINGS = N_PINGS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic                      in_found,
  input  logic [TUNE_W-1:0]         in_tune,
  input  logic [$clog2(NPINGS)-1:0] rec,
  input  logic [$clog2(NPINGS)-1:0] rd_addr,
  output logic [31:0]               rd_data,
  output logic [15:0]               count,
  output logic [TUNE_W-1:0]         last_tune
);

  logic [31:0] mem [NPINGS];

  always_ff @(posedge clk) begin
    if (in_valid) mem[rec] <= {in_found, 15'd0, 16'(in_tune)};
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      last_tune <= '0;
    end else if (in_valid) begin
      count     <= count + 16'd1;
      last_tune <= in_tune;
    end
  end

endmodule
