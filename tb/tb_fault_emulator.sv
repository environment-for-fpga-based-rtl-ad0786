// tb_fault_emulator - end-to-end test of the fault emulation environment at
// its default parameters.
//
// A host model programs seed, polynomial and run size over the register
// port, starts a run and collects one report per fault while randomly
// holding off the report stream. An independent model (LFSR reference plus
// s27 reference with and without the fault) predicts, for every fault,
// whether and where it is first detected. The testbench checks every
// report, the clock count of every fault (one vector per clock, the test
// of a detected fault ends at the detecting vector), the emulated-cycle
// counter and the status register. Three runs cover: faults dropped on
// detection, faults that survive the whole test, detection in a later
// sequence (after a CUT reset), fault numbers beyond the fault list,
// report back-pressure, and configuration writes refused while busy. Each
// of these must happen at least once.
module tb_fault_emulator;
  import fe_pkg::*;
  import cut_pkg::*;
  import s27_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [2:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic rep_valid, rep_ready = 0;
  report_t rep_data;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_dropped = 0, n_undetected = 0, n_later_seq = 0, n_beyond = 0, n_backpressure = 0, n_refused = 0;

  fault_emulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input int a, input int d);
    @(negedge clk);
    wr_en = 1; wr_addr = 3'(a); wr_data = 32'(d);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic read(input int a, output logic [31:0] d);
    @(negedge clk);
    rd_addr = 3'(a);
    #1 d = rd_data;
  endtask

  // Reference: first detection of fault f, or -1.
  task automatic predict(input int f, input logic [3:0] seed, input logic [3:0] poly,
                         input int ns, input int nv, output int ds, output int dv);
    logic [3:0] q;
    logic [2:0] st, gst;
    s27_res_t r, g;
    int fidx;
    fidx = (f < int'(NUM_FAULTS)) ? f / 2 : -1;
    q = seed; ds = -1; dv = -1;
    for (int s = 0; s < ns && ds < 0; s++) begin
      st = 0; gst = 0;
      for (int v = 0; v < nv; v++) begin
        r = s27_step(st, q, fidx, f[0]);
        g = s27_step(gst, q, -1, 1'b0);
        if (r.po != g.po) begin ds = s; dv = v; break; end
        st = r.next; gst = g.next;
        q = 4'(lfsr_next(32'(q), 32'(poly), 0, 4));
      end
    end
  endtask

  // Clocks per fault, counted from the end of the previous report.
  int work = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.busy && !rep_valid) work++;
    if (rep_valid && !rep_ready) n_backpressure++;
  end

  always @(posedge clk) rep_ready <= ($urandom_range(0, 3) != 0);

  task automatic run(input logic [3:0] seed, input logic [3:0] poly, input int nf, input int ns, input int nv);
    int ds, dv, exp_work;
    longint exp_cycles;
    logic [31:0] d;
    write(0, seed); write(1, poly); write(2, nf); write(3, ns); write(4, nv);
    write(5, 1);
    work = 0;
    @(negedge clk);
    // A configuration write during the run must be refused.
    write(3, ns + 5);
    read(3, d);
    if (d == 32'(ns)) n_refused++;
    check(d == 32'(ns), "configuration write refused while busy");
    exp_cycles = 0;
    for (int f = 0; f < nf; f++) begin
      @(posedge clk iff (rep_valid && rep_ready));
      predict(f, seed, poly, ns, nv, ds, dv);
      check(rep_data.fault == cnt_t'(f), $sformatf("report for fault %0d has number %0d", f, rep_data.fault));
      if (ds >= 0) begin
        check(rep_data.detected && rep_data.seq == cnt_t'(ds) && rep_data.vec == cnt_t'(dv),
              $sformatf("fault %0d: expected detection at seq %0d vec %0d, got det=%0d seq %0d vec %0d",
                        f, ds, dv, rep_data.detected, rep_data.seq, rep_data.vec));
        exp_work = 1 + ds * (1 + nv) + 1 + dv + 1;
        exp_cycles += ds * nv + dv + 1;
        n_dropped++;
        if (ds > 0) n_later_seq++;
      end else begin
        check(!rep_data.detected, $sformatf("fault %0d should be undetected", f));
        exp_work = 1 + ns * (1 + nv);
        exp_cycles += ns * nv;
        n_undetected++;
      end
      if (f >= int'(NUM_FAULTS)) n_beyond++;
      check(work == exp_work, $sformatf("fault %0d took %0d clocks, expected %0d", f, work, exp_work));
      work = 0;
    end
    repeat (3) @(posedge clk);
    read(5, d);
    check(d[1:0] == 2'b10, "status: done, not busy");
    read(6, d);
    check(d == 32'(exp_cycles), $sformatf("emulated cycles %0d, expected %0d", d, exp_cycles));
  endtask

  initial begin
    #22 rst_n = 1;
    run(4'b0001, 4'b1001, NUM_FAULTS, 3, 6);     // full fault list, three sequences
    run(4'b0110, 4'b1001, NUM_FAULTS + 4, 1, 2); // short test: many faults survive
    run(4'b1011, 4'b1100, NUM_FAULTS, 4, 3);     // other polynomial
    check(n_dropped > 0,      "mechanism: fault dropped on detection");
    check(n_undetected > 0,   "mechanism: fault survives the whole test");
    check(n_later_seq > 0,    "mechanism: detection after a CUT reset (later sequence)");
    check(n_beyond > 0,       "mechanism: fault number beyond the fault list");
    check(n_backpressure > 0, "mechanism: report held for the host");
    check(n_refused > 0,      "mechanism: configuration write refused while busy");
    $display("dropped=%0d undetected=%0d later_seq=%0d beyond=%0d backpressure=%0d refused=%0d",
             n_dropped, n_undetected, n_later_seq, n_beyond, n_backpressure, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
