// tb_s27_gold_tv - runs random sequences through the three-valued golden
// s27 and compares its dual-rail output every cycle with the three-valued
// reference model. Checks that the output starts unknown after reset and
// becomes known once the inputs initialise the circuit.
module tb_s27_gold_tv;
  import s27_ref_pkg::*;
  import tv_pkg::*;
  logic clk = 0, rst, en;
  logic [3:0] pi;
  tv_t [0:0] po;
  int checks = 0, failures = 0, n_x = 0, n_known = 0;

  s27_gold_tv dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st[3];
    s27_tv_res_t r;
    for (int s = 0; s < 20; s++) begin
      rst = 1; en = 1; pi = 4'($urandom);
      @(posedge clk); #1;
      st = '{2, 2, 2};
      rst = 0;
      for (int v = 0; v < 30; v++) begin
        pi = 4'($urandom);
        en = $urandom_range(0, 4) != 0;
        #1;
        r = s27_step_tv(st, pi, -1, 1'b0);
        if (r.po == 2) n_x++; else n_known++;
        checks++;
        if (po[0] !== t_code(r.po)) begin
          failures++; $display("FAIL seq %0d vec %0d: %b vs %0d", s, v, po[0], r.po);
        end
        @(posedge clk); #1;
        if (en) st = r.next;
      end
    end
    checks++;
    if (n_x == 0 || n_known == 0) begin failures++; $display("FAIL X=%0d known=%0d", n_x, n_known); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
