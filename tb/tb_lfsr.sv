// tb_lfsr - checks the loadable LFSR as a 4-bit generator (period 15 for
// x^4 + x^3 + 1, every non-zero state once per period) and as an 8-bit
// signature analyser with random responses, against a reference model.
module tb_lfsr;
  import s27_ref_pkg::*;
  logic clk = 0;
  logic g_reset, g_enable;
  logic [3:0] g_seed, g_poly, g_q;
  logic a_reset, a_enable;
  logic [7:0] a_seed, a_poly, a_res, a_q;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(4)) gen (.clk, .reset(g_reset), .enable(g_enable), .seed(g_seed),
                         .poly(g_poly), .result(4'b0), .q(g_q));
  lfsr #(.WIDTH(8)) ana (.clk, .reset(a_reset), .enable(a_enable), .seed(a_seed),
                         .poly(a_poly), .result(a_res), .q(a_q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] exp4;
    logic [7:0] exp8;
    bit seen[16];
    int period;
    // Generator: load seed, then step.
    g_seed = 4'b0001; g_poly = 4'b1001; g_reset = 1; g_enable = 1;
    a_reset = 1; a_enable = 1; a_seed = 8'hA5; a_poly = 8'b1000_1110; a_res = '0;
    @(posedge clk); #1;
    check(g_q == 4'b0001, "generator seed load");
    check(a_q == 8'hA5, "analyser seed load");
    g_reset = 0; a_reset = 0;
    exp4 = g_q; period = 0;
    foreach (seen[i]) seen[i] = 0;
    do begin
      seen[exp4] = 1;
      exp4 = 4'(lfsr_next(32'(exp4), 32'(g_poly), 0, 4));
      a_res = 8'($urandom);
      exp8 = 8'(lfsr_next(32'(a_q), 32'(a_poly), 32'(a_res), 8));
      @(posedge clk); #1;
      period++;
      check(g_q == exp4, $sformatf("generator step %0d: %h vs %h", period, g_q, exp4));
      check(a_q == exp8, $sformatf("analyser step %0d", period));
    end while (g_q != 4'b0001 && period < 20);
    check(period == 15, $sformatf("generator period %0d, expected 15", period));
    for (int s = 1; s < 16; s++) check(seen[s], $sformatf("state %0d not visited", s));
    // Enable low holds the state.
    g_enable = 0; a_enable = 0; exp4 = g_q; exp8 = a_q; a_res = 8'hFF;
    repeat (3) @(posedge clk); #1;
    check(g_q == exp4 && a_q == exp8, "hold with enable low");
    // Reset without enable does not load.
    g_reset = 1; g_seed = 4'b1010;
    @(posedge clk); #1;
    check(g_q == exp4, "no load without enable");
    g_enable = 1;
    @(posedge clk); #1;
    check(g_q == 4'b1010, "reload with new seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
