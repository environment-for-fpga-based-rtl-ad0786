// tb_s27_cut_tv - for the fault-free circuit and each of the 34 stuck-at
// faults, compares the three-valued fault-injected s27 every cycle with the
// three-valued reference model carrying the same fault.
module tb_s27_cut_tv;
  import s27_ref_pkg::*;
  import tv_pkg::*;
  logic clk = 0, rst, en, fault_en, stuck;
  logic [3:0] pi;
  tv_t [0:0] po;
  logic [4:0] fault_code;
  int checks = 0, failures = 0;

  s27_cut_tv dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st[3];
    s27_tv_res_t r;
    for (int f = -1; f < 34; f++) begin
      fault_en   = (f >= 0);
      fault_code = (f >= 0) ? 5'(f / 2) : 5'($urandom);
      stuck      = (f >= 0) ? f[0] : 1'($urandom);
      for (int s = 0; s < 6; s++) begin
        rst = 1; en = 1; pi = 4'($urandom);
        @(posedge clk); #1;
        st = '{2, 2, 2};
        rst = 0;
        for (int v = 0; v < 20; v++) begin
          pi = 4'($urandom);
          #1;
          r = s27_step_tv(st, pi, (f >= 0) ? f / 2 : -1, f[0]);
          checks++;
          if (po[0] !== t_code(r.po)) begin failures++; $display("FAIL fault %0d seq %0d vec %0d", f, s, v); end
          @(posedge clk); #1;
          st = r.next;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
