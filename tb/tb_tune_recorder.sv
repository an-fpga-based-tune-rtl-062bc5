// tb_tune_recorder: stores tunes at scattered record indices and reads them back,
// checking word format, result count and the latest-tune register.
module tb_tune_recorder;
  import tune_pkg::*;
  localparam int NP = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 0, in_found = 0;
  logic [TUNE_W-1:0] in_tune = '0, last_tune;
  logic [3:0] rec = '0, rd_addr = '0;
  logic [31:0] rd_data;
  logic [15:0] count;
  logic [31:0] model [NP];
  int checks = 0, failures = 0;

  tune_recorder #(.NPINGS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < NP; i++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      rec      <= 4'((i * 5) % NP);
      in_tune  <= 16'($urandom);
      in_found <= 1'(i % 3 != 0);
      @(posedge clk);
      model[rec] = {in_found, 15'd0, in_tune};
      in_valid <= 1'b0;
      @(posedge clk);
      checks++;
      if (last_tune !== in_tune) begin failures++; $display("last_tune wrong"); end
    end
    checks++;
    if (count != 16'(NP)) begin failures++; $display("count %0d", count); end
    for (int i = 0; i < NP; i++) begin
      rd_addr <= 4'(i);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("rec %0d: got %h expected %h", i, rd_data, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
