// tb_emu_fsm - drives the controller, with its three counters, from a
// scripted comparator: each fault is either "detected" at a chosen
// (sequence, vector) or never. Checks the report contents, the number of
// clocks each fault takes (fault dropping cuts the test short), the
// emulated-cycle count, the number of CUT and LFSR steps, and that reports
// wait for a slow host.
module tb_emu_fsm;
  import fe_pkg::*;
  localparam int NF = 8, NS = 3, NV = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [CYCLE_W-1:0] cycles;
  logic vec_clr, vec_inc, seq_clr, seq_inc, flt_clr, flt_inc;
  cnt_t vec_cnt, seq_cnt, flt_cnt;
  logic vec_last, seq_last, flt_last;
  logic lfsr_reset, lfsr_en, cut_rst, cut_en, fault_valid, differ;
  logic rep_valid, rep_ready;
  report_t rep_data;
  int checks = 0, failures = 0;

  // detection point per fault: -1 = never
  int det_s[NF] = '{0, -1, 2, 1, -1, 0, 2, 1};
  int det_v[NF] = '{0, -1, 4, 2, -1, 3, 0, 4};

  emu_fsm dut (.*);
  counter #(.WIDTH(CNT_W)) u_v (.clk, .rst_n, .clear(vec_clr), .inc(vec_inc), .limit(cnt_t'(NV)), .count(vec_cnt), .last(vec_last));
  counter #(.WIDTH(CNT_W)) u_s (.clk, .rst_n, .clear(seq_clr), .inc(seq_inc), .limit(cnt_t'(NS)), .count(seq_cnt), .last(seq_last));
  counter #(.WIDTH(CNT_W)) u_f (.clk, .rst_n, .clear(flt_clr), .inc(flt_inc), .limit(cnt_t'(NF)), .count(flt_cnt), .last(flt_last));

  always_comb differ = fault_valid && flt_cnt < NF && det_s[flt_cnt] >= 0 &&
                       seq_cnt == cnt_t'(det_s[flt_cnt]) && vec_cnt == cnt_t'(det_v[flt_cnt]);

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

  int work = 0, cut_steps = 0, lfsr_steps = 0, reports = 0, waited = 0, exp_cycles = 0;

  always @(posedge clk) begin
    rep_ready <= ($urandom_range(0, 2) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (busy && !rep_valid) work++;
    if (cut_en && !cut_rst) cut_steps++;
    if (lfsr_en && !lfsr_reset) lfsr_steps++;
    if (rep_valid && !rep_ready) waited++;
    if (rep_valid && rep_ready) begin
      int f, exp_work, exp_steps;
      f = reports;
      check(rep_data.fault == cnt_t'(f), $sformatf("report order %0d vs %0d", rep_data.fault, f));
      if (det_s[f] >= 0) begin
        check(rep_data.detected && rep_data.seq == cnt_t'(det_s[f]) && rep_data.vec == cnt_t'(det_v[f]),
              $sformatf("fault %0d detection point", f));
        exp_work  = 1 + det_s[f] * (1 + NV) + 1 + det_v[f] + 1;
        exp_steps = det_s[f] * NV + det_v[f];
        exp_cycles += det_s[f] * NV + det_v[f] + 1;
      end else begin
        check(!rep_data.detected, $sformatf("fault %0d must be undetected", f));
        exp_work  = 1 + NS * (1 + NV);
        exp_steps = NS * NV;
        exp_cycles += NS * NV;
      end
      check(work == exp_work, $sformatf("fault %0d took %0d cycles, expected %0d", f, work, exp_work));
      check(cut_steps == exp_steps && lfsr_steps == exp_steps,
            $sformatf("fault %0d: %0d CUT / %0d LFSR steps, expected %0d", f, cut_steps, lfsr_steps, exp_steps));
      work = 0; cut_steps = 0; lfsr_steps = 0;
      reports++;
    end
  end

  initial begin
    #12 rst_n = 1;
    @(posedge clk); #1;
    check(!busy, "idle after reset");
    start = 1; @(posedge clk); #1; start = 0;
    wait (done);
    @(posedge clk); #1;
    check(reports == NF, $sformatf("%0d reports", reports));
    check(cycles == CYCLE_W'(exp_cycles), $sformatf("emulated cycles %0d vs %0d", cycles, exp_cycles));
    check(waited > 0, "host back-pressure exercised");
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
