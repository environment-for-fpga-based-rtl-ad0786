// tb_cut_top - checks the CUT wrapper: the fault number maps to fault point
// fault_num >> 1 with stuck value fault_num[0], out-of-range numbers and
// fault_valid low give the fault-free circuit, and the golden output always
// follows the fault-free reference.
module tb_cut_top;
  import s27_ref_pkg::*;
  import fe_pkg::*;
  logic clk = 0, rst, en, fault_valid;
  logic [3:0] pi;
  cnt_t fault_num;
  logic [0:0] cut_po, gold_po;
  int checks = 0, failures = 0;

  cut_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] st, gst;
    s27_res_t r, g;
    int fidx;
    for (int f = 0; f < 40; f++) begin
      fault_num   = cnt_t'(f);
      fault_valid = (f % 7) != 3;
      fidx        = (fault_valid && f < 34) ? f / 2 : -1;
      for (int s = 0; s < 4; s++) begin
        rst = 1; en = 1; pi = 4'($urandom);
        @(posedge clk); #1;
        st = 3'b000; gst = 3'b000;
        rst = 0;
        for (int v = 0; v < 16; v++) begin
          pi = 4'($urandom);
          #1;
          r = s27_step(st, pi, fidx, f[0]);
          g = s27_step(gst, pi, -1, 1'b0);
          checks += 2;
          if (cut_po[0] !== r.po)  begin failures++; $display("FAIL cut fault %0d", f); end
          if (gold_po[0] !== g.po) begin failures++; $display("FAIL gold fault %0d", f); end
          @(posedge clk); #1;
          st = r.next; gst = g.next;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
