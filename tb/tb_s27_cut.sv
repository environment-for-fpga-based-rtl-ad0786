// tb_s27_cut - for the fault-free circuit and for each of the 34 stuck-at
// faults, runs random test sequences through the fault-injected s27 and
// compares its output every cycle with the reference model carrying the
// same fault. Also counts how many faults the stimulus exposed, so a
// fault point that had no effect would show.
module tb_s27_cut;
  import s27_ref_pkg::*;
  logic clk = 0, rst, en, fault_en, stuck;
  logic [3:0] pi;
  logic [0:0] po;
  logic [4:0] fault_code;
  int checks = 0, failures = 0, exposed = 0;

  s27_cut dut (.*);

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
    bit diff;
    for (int f = -1; f < 34; f++) begin
      fault_en   = (f >= 0);
      fault_code = (f >= 0) ? 5'(f / 2) : 5'($urandom);
      stuck      = (f >= 0) ? f[0] : 1'($urandom);
      diff = 0;
      for (int s = 0; s < 6; s++) begin
        rst = 1; en = 1; pi = 4'($urandom);
        @(posedge clk); #1;
        st = 3'b000; gst = 3'b000;
        rst = 0;
        for (int v = 0; v < 20; v++) begin
          pi = 4'($urandom);
          en = 1;
          #1;
          r = s27_step(st, pi, (f >= 0) ? f / 2 : -1, f[0]);
          g = s27_step(gst, pi, -1, 1'b0);
          if (r.po != g.po) diff = 1;
          checks++;
          if (po[0] !== r.po) begin failures++; $display("FAIL fault %0d seq %0d vec %0d", f, s, v); end
          @(posedge clk); #1;
          st = r.next; gst = g.next;
        end
      end
      if (diff) exposed++;
    end
    // Most s27 stuck-at faults are visible with random sequences.
    checks++;
    if (exposed < 20) begin failures++; $display("FAIL only %0d faults exposed", exposed); end
    $display("faults exposed by random stimulus: %0d of 34", exposed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
