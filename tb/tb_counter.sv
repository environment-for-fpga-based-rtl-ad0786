// tb_counter - checks clear, increment, clear priority, wrap-free counting
// and the `last` flag for several limits including 0 and 1.
module tb_counter;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0, last;
  logic [7:0] limit = 8'd5, count;
  int checks = 0, failures = 0;

  counter #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp;
    #12 rst_n = 1;
    @(posedge clk); #1;
    check(count == 0, "reset value");
    for (int t = 0; t < 5; t++) begin
      limit = (t == 0) ? 8'd0 : (t == 1) ? 8'd1 : (t == 2) ? 8'd2 : (t == 3) ? 8'd5 : 8'd200;
      clear = 1; @(posedge clk); #1; clear = 0;
      check(count == 0, "clear");
      exp = 0;
      for (int i = 0; i < 260; i++) begin
        inc = $urandom_range(0, 3) != 0;
        check(last == ((limit == 0) ? (exp == 0) : (exp == limit - 1)),
              $sformatf("last flag limit=%0d count=%0d", limit, exp));
        if (inc) exp = (exp + 1) % 256;
        @(posedge clk); #1;
        check(count == 8'(exp), $sformatf("count %0d vs %0d", count, exp));
      end
      inc = 0;
    end
    // Clear has priority over increment.
    inc = 1; clear = 1; @(posedge clk); #1;
    check(count == 0, "clear priority");
    clear = 0; inc = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
