// tb_lfsr_stage - checks one LFSR stage: seed load, shift with result XOR,
// clock enable, and the coefficient-gated mod-2 sum, with random stimulus.
module tb_lfsr_stage;
  logic clk = 0, reset, enable, seed, coefficient, result, prev, sum_in, q, sum_out;
  int checks = 0, failures = 0;
  logic exp_q;

  lfsr_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; enable = 1; seed = 0; coefficient = 0; result = 0; prev = 0; sum_in = 0;
    @(posedge clk); #1;
    exp_q = 0;
    for (int i = 0; i < 400; i++) begin
      {reset, enable, seed, coefficient, result, prev, sum_in} = 7'($urandom);
      #1;
      checks++;
      if (sum_out !== (sum_in ^ (exp_q & coefficient))) begin
        failures++; $display("sum_out mismatch at %0d", i);
      end
      if (enable) exp_q = reset ? seed : (prev ^ result);
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("q mismatch at %0d: %b vs %b", i, q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
