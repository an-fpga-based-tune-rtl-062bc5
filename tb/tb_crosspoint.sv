// tb_crosspoint: checks all four routings of the ADC crosspoint and its one-clock
// latency with random ADC words.
module tb_crosspoint;
  import tune_pkg::*;
  logic clk = 1'b0;
  logic signed [ADC_W-1:0] in_a, in_b, out_a, out_b, ea, eb;
  logic sel_a, sel_b;
  int checks = 0, failures = 0;

  crosspoint dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_a = '0; in_b = '0; sel_a = 0; sel_b = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_a  = ADC_W'($urandom);
      in_b  = ADC_W'($urandom);
      sel_a = 1'($urandom);
      sel_b = 1'($urandom);
      ea = sel_a ? in_b : in_a;
      eb = sel_b ? in_a : in_b;
      @(negedge clk);
      checks++;
      if (out_a !== ea || out_b !== eb) begin
        failures++;
        $display("mismatch sel=%0d%0d a=%0d b=%0d out=%0d,%0d", sel_a, sel_b, in_a, in_b, out_a, out_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
