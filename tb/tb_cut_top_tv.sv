// tb_cut_top_tv - checks the three-valued CUT wrapper: fault number to
// fault point and polarity mapping, fault-free behaviour for out-of-range
// numbers or fault_valid low, and the golden output, against the
// three-valued reference model.
module tb_cut_top_tv;
  import s27_ref_pkg::*;
  import fe_pkg::*;
  import tv_pkg::*;
  logic clk = 0, rst, en, fault_valid;
  logic [3:0] pi;
  cnt_t fault_num;
  tv_t [0:0] cut_po, gold_po;
  int checks = 0, failures = 0;

  cut_top_tv dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st[3], gst[3];
    s27_tv_res_t r, g;
    int fidx;
    for (int f = 0; f < 40; f++) begin
      fault_num   = cnt_t'(f);
      fault_valid = (f % 7) != 3;
      fidx        = (fault_valid && f < 34) ? f / 2 : -1;
      for (int s = 0; s < 4; s++) begin
        rst = 1; en = 1; pi = 4'($urandom);
        @(posedge clk); #1;
        st = '{2, 2, 2}; gst = '{2, 2, 2};
        rst = 0;
        for (int v = 0; v < 16; v++) begin
          pi = 4'($urandom);
          #1;
          r = s27_step_tv(st, pi, fidx, f[0]);
          g = s27_step_tv(gst, pi, -1, 1'b0);
          checks += 2;
          if (cut_po[0] !== t_code(r.po))  begin failures++; $display("FAIL cut fault %0d", f); end
          if (gold_po[0] !== t_code(g.po)) begin failures++; $display("FAIL gold fault %0d", f); end
          @(posedge clk); #1;
          st = r.next; gst = g.next;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
