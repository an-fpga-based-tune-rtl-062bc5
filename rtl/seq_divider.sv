// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Used by the peak detector for the interpolation fraction. `start` loads dividend and
// divisor; NW clocks later `done` pulses for one cycle with `quotient` =
// floor(dividend / divisor) and `remainder`. A zero divisor gives an all-ones
// quotient. `busy` is high while a division runs; `start` is ignored then.
module seq_divider #(
  parameter int NW = 48,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);

  logic [DW-1:0]           rem;
  logic [DW:0]             trial;
  logic [DW-1:0]           dvs;
  logic [$clog2(NW+1)-1:0] cnt;

  assign trial = {rem[DW-1:0], quotient[NW-1]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      rem      <= '0;
      dvs      <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          quotient <= dividend;
          dvs      <= divisor;
          rem      <= '0;
          cnt      <= ($clog2(NW+1))'(NW);
          busy     <= 1'b1;
        end
      end else begin
        // shift the next dividend bit into the partial remainder, subtract if it fits
        if (!trial[DW]) begin
          rem      <= trial[DW-1:0];
          quotient <= {quotient[NW-2:0], 1'b1};
        end else begin
          rem      <= {rem[DW-2:0], quotient[NW-1]};  // top bit is 0 here
          quotient <= {quotient[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign remainder = rem;

endmodule
