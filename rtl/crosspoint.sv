// crosspoint: routes the two ADC streams to the two tune channels.
//
// Each tune channel (A' and B') can take either ADC channel (A or B): with both
// selects low the routing is straight (A->A', B->B'), with both high it is crossed,
// and with equal selects both tune channels look at the same ADC, for instance to use
// two different search ranges on one plane. Outputs are registered: one cycle latency.
// The free choice per output follows the original system; registering the outputs is this
// design's choice.
module crosspoint
  import tune_pkg::*;
#(
  parameter int W = ADC_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] in_a,
  input  logic signed [W-1:0] in_b,
  input  logic                sel_a,   // source of output A': 0 = A, 1 = B
  input  logic                sel_b,   // source of output B': 0 = B, 1 = A
  output logic signed [W-1:0] out_a,
  output logic signed [W-1:0] out_b
);

  always_ff @(posedge clk) begin
    out_a <= sel_a ? in_b : in_a;
    out_b <= sel_b ? in_a : in_b;
  end

endmodule
