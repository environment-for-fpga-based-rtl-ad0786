// tb_s27_gold - runs random test sequences through the golden s27 netlist
// and compares its output every cycle with the reference model; also checks
// the synchronous reset and that nothing changes while `en` is low.
module tb_s27_gold;
  import s27_ref_pkg::*;
  logic clk = 0, rst, en;
  logic [3:0] pi;
  logic [0:0] po;
  int checks = 0, failures = 0;

  s27_gold dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] st;
    s27_res_t r;
    for (int s = 0; s < 20; s++) begin
      rst = 1; en = 1; pi = 4'($urandom);
      @(posedge clk); #1;
      st = 3'b000;
      rst = 0;
      for (int v = 0; v < 30; v++) begin
        pi = 4'($urandom);
        en = $urandom_range(0, 4) != 0;
        #1;
        r = s27_step(st, pi, -1, 1'b0);
        checks++;
        if (po[0] !== r.po) begin failures++; $display("FAIL seq %0d vec %0d", s, v); end
        @(posedge clk); #1;
        if (en) st = r.next;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
