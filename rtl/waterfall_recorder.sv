// waterfall_recorder: keeps the magnitude spectrum of every ping of a ramp.
//
// One record per ping: the N/2 bin magnitudes of that ping's FFT, stored at
// address {record, bin}. Read out after the ramp, the records stacked by ping number
// form the tune "waterfall": tune fraction 0..0.5 across, time along the ramp down,
// magnitude as colour, showing how the tune line moves during the ramp.
// Magnitudes are stored in 16 bits as min(mag >> WF_SHIFT, 65535), which halves the
// memory (2 * 128 * 512 words for two channels); with WF_SHIFT = 8 a full-scale
// sine just reaches the top of the range.
//
// Timing: one bin per clock, written on the clock its in_valid is seen; `rec` must be
// stable during a record. `records` counts completed records (in_last). Host read
// port: rd_addr = {record, bin} in, rd_data one cycle later.
// As in the original: a recorder of FFT spectra for the waterfall display, with 128
// pings per ramp as displayed. The storage format is this design's choice.
module waterfall_recorder
  import tune_pkg::*;
#(
  parameter int N        = N_FFT,
  parameter int NPINGS   = N_PINGS,
  parameter int WF_SHIFT = 8
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  in_valid,
  input  logic                                  in_last,
  input  logic [$clog2(N)-2:0]                  in_idx,
  input  logic [MAG_W-1:0]                      in_mag,
  input  logic [$clog2(NPINGS)-1:0]             rec,
  input  logic [$clog2(NPINGS)+$clog2(N)-2:0]   rd_addr,
  output logic [15:0]                           rd_data,
  output logic [15:0]                           records
);

  localparam int AW = $clog2(NPINGS) + $clog2(N) - 1;

  logic [15:0]      mem [NPINGS * N / 2];
  logic [MAG_W-1:0] shifted;
  logic [15:0]      sat;

  assign shifted = in_mag >> WF_SHIFT;
  assign sat     = (shifted > MAG_W'(16'hFFFF)) ? 16'hFFFF : shifted[15:0];

  always_ff @(posedge clk) begin
    if (in_valid) mem[AW'({rec, in_idx})] <= sat;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst)                      records <= '0;
    else if (in_valid && in_last) records <= records + 16'd1;
  end

endmodule
