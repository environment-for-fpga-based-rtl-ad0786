// fault_emulator - FPGA fault emulation environment with hardware fault
// dropping (top level).
//
// Fault simulation of a synchronous circuit is replaced by running the
// circuit itself: a copy of the circuit under test with a multiplexer on
// every net (cut_top/s27_cut) runs next to an unmodified golden copy
// (s27_gold). For every modelled stuck-at fault the controller (emu_fsm)
// reloads the stimulus LFSR with its seed and applies num_seq test
// sequences of seq_len pseudo-random vectors, resetting both circuits at the
// start of each sequence. A parallel comparator (cmp) checks the outputs in
// every clock; the first mismatch marks the fault detected and ends its test
// at once (fault dropping). Three counters (counter) hold the vector,
// sequence and fault indices. A host programs seed, polynomial and run size
// through host_if and reads one report per fault.
//
// With THREE_VALUED = 1 the circuits run in three-valued logic
// (cut_top_tv, tv_cmp): their flip-flops start unknown after reset_CUT
// instead of at 0, and only known, different outputs count as a detection.
//
// Interface: host register port and report stream as described in host_if.
// Timing: one test vector per clock; see emu_fsm for cycle counts. The LFSR
// is as wide as the CUT has inputs. All resets are asynchronous active-low
// for the environment and synchronous (reset_CUT) for the circuits.
// The block structure follows the environment with fault dropping; the
// example circuit (ISCAS'89 s27), the widths and the host protocol are this
// design's choice.
module fault_emulator
  import cut_pkg::*;
  import fe_pkg::*;
  import tv_pkg::*;
#(
  parameter bit THREE_VALUED = 1'b0   // 1: encoded don't-care (three-valued) CUT and GOLD
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register port
  input  logic        wr_en,
  input  logic [2:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic [2:0]  rd_addr,
  output logic [31:0] rd_data,
  // list of detected / undetected faults
  output logic        rep_valid,
  input  logic        rep_ready,
  output report_t     rep_data
);
  logic [NUM_IN-1:0]  seed, poly, vector;
  run_cfg_t           cfg;
  logic               start, busy, done, differ;
  logic [CYCLE_W-1:0] cycles;
  logic               vec_clr, vec_inc, seq_clr, seq_inc, flt_clr, flt_inc;
  cnt_t               vec_cnt, seq_cnt, flt_cnt;
  logic               vec_last, seq_last, flt_last;
  logic               lfsr_reset, lfsr_en, cut_rst, cut_en, fault_valid;
  logic               fsm_rep_valid, fsm_rep_ready;
  report_t            fsm_rep_data;

  host_if #(.WIDTH(NUM_IN)) u_if (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data,
    .host_rep_valid(rep_valid), .host_rep_ready(rep_ready), .host_rep_data(rep_data),
    .seed, .poly, .cfg, .start, .busy, .done, .cycles,
    .rep_valid(fsm_rep_valid), .rep_ready(fsm_rep_ready), .rep_data(fsm_rep_data)
  );

  emu_fsm u_fsm (
    .clk, .rst_n, .start, .busy, .done, .cycles,
    .vec_clr, .vec_inc, .seq_clr, .seq_inc, .flt_clr, .flt_inc,
    .vec_cnt, .seq_cnt, .flt_cnt, .vec_last, .seq_last, .flt_last,
    .lfsr_reset, .lfsr_en, .cut_rst, .cut_en, .fault_valid, .differ,
    .rep_valid(fsm_rep_valid), .rep_ready(fsm_rep_ready), .rep_data(fsm_rep_data)
  );

  counter #(.WIDTH(CNT_W)) u_vec_cnt (
    .clk, .rst_n, .clear(vec_clr), .inc(vec_inc), .limit(cfg.seq_len),
    .count(vec_cnt), .last(vec_last)
  );
  counter #(.WIDTH(CNT_W)) u_seq_cnt (
    .clk, .rst_n, .clear(seq_clr), .inc(seq_inc), .limit(cfg.num_seq),
    .count(seq_cnt), .last(seq_last)
  );
  counter #(.WIDTH(CNT_W)) u_flt_cnt (
    .clk, .rst_n, .clear(flt_clr), .inc(flt_inc), .limit(cfg.num_faults),
    .count(flt_cnt), .last(flt_last)
  );

  // Input vector generator: result inputs tied to zero.
  lfsr #(.WIDTH(NUM_IN)) u_lfsr (
    .clk, .reset(lfsr_reset), .enable(lfsr_en),
    .seed, .poly, .result('0), .q(vector)
  );

  if (THREE_VALUED) begin : g_tv
    tv_t [NUM_OUT-1:0] cut_po, gold_po;

    cut_top_tv u_cut_top (
      .clk, .rst(cut_rst), .en(cut_en), .pi(vector),
      .fault_valid, .fault_num(flt_cnt),
      .cut_po, .gold_po
    );

    tv_cmp #(.WIDTH(NUM_OUT)) u_cmp (
      .cut_po, .gold_po, .differ
    );
  end else begin : g_2v
    logic [NUM_OUT-1:0] cut_po, gold_po;

    cut_top u_cut_top (
      .clk, .rst(cut_rst), .en(cut_en), .pi(vector),
      .fault_valid, .fault_num(flt_cnt),
      .cut_po, .gold_po
    );

    cmp #(.WIDTH(NUM_OUT)) u_cmp (
      .cut_po, .gold_po, .differ
    );
  end
endmodule
