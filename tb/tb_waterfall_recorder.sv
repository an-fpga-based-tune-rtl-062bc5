// tb_waterfall_recorder: writes four spectra of 16 bins (N = 32) with random
// magnitudes, some above the 16-bit range, and reads every word back, checking the
// shift, the saturation, the {record, bin} addressing and the record count.
module tb_waterfall_recorder;
  import tune_pkg::*;
  localparam int N = 32, NP = 4, NB = N / 2;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 0, in_last = 0;
  logic [3:0] in_idx = '0;
  logic [MAG_W-1:0] in_mag = '0;
  logic [1:0] rec = '0;
  logic [5:0] rd_addr = '0;
  logic [15:0] rd_data, records;
  longint mags [NP][NB];
  int checks = 0, failures = 0;

  waterfall_recorder #(.N(N), .NPINGS(NP), .WF_SHIFT(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < NP; r++) begin
      int order;
      order = (r + 1) % NP;          // records written out of order
      for (int k = 0; k < NB; k++) begin
        @(negedge clk);
        mags[order][k] = (k % 5 == 0) ? longint'($urandom) : longint'($urandom_range(0, 1 << 23));
        in_valid = 1; in_idx = 4'(k); in_mag = MAG_W'(mags[order][k]); rec = 2'(order);
        in_last = (k == NB - 1);
      end
      @(negedge clk) in_valid = 0; in_last = 0;
    end
    checks++;
    if (records != 16'(NP)) begin failures++; $display("records %0d", records); end
    for (int r = 0; r < NP; r++)
      for (int k = 0; k < NB; k++) begin
        longint e;
        e = mags[r][k] >> 8;
        if (e > 65535) e = 65535;
        @(negedge clk) rd_addr = 6'(r * NB + k);
        @(negedge clk);
        checks++;
        if (longint'(rd_data) != e) begin
          failures++;
          $display("rec %0d bin %0d: %0d expected %0d", r, k, rd_data, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
