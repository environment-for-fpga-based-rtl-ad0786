// fe_pkg - types and constants shared by the fault emulation environment.
//
// Holds the widths of the three counters (test vectors, test sequences,
// modelled faults), the run configuration written by the host, the report
// sent back for each modelled fault, and the controller's state encoding.
// The counter widths are this design's choice: 16 bits cover every test
// length and fault count of the benchmark experiments the environment was
// evaluated with (at most 20k sequences, 400 vectors per sequence and 12 314
// faults), and 32 bits count emulated clock cycles.
package fe_pkg;
  localparam int unsigned CNT_W   = 16;  // vector, sequence and fault counters
  localparam int unsigned CYCLE_W = 32;  // emulated-cycle counter

  typedef logic [CNT_W-1:0] cnt_t;

  // Run configuration. Counts are numbers of items (1 = one item); a zero
  // count is treated like one.
  typedef struct packed {
    cnt_t num_faults;   // faults to model, numbers 0 .. num_faults-1
    cnt_t num_seq;      // test sequences per fault
    cnt_t seq_len;      // test vectors per sequence
  } run_cfg_t;

  // One report per modelled fault.
  typedef struct packed {
    cnt_t fault;        // fault number
    logic detected;     // outputs of CUT and GOLD differed
    cnt_t seq;          // sequence in which it was detected (0 if undetected)
    cnt_t vec;          // vector within that sequence (0 if undetected)
  } report_t;

  typedef enum logic [2:0] {
    ST_IDLE,        // wait for start
    ST_RESET_LFSR,  // load the seed into the generator, select the fault
    ST_RESET_CUT,   // reset CUT and GOLD state at the start of a sequence
    ST_EMULATE,     // one test vector per clock, outputs compared on the fly
    ST_REPORT,      // hand the result of this fault to the host interface
    ST_DONE         // all faults modelled (one cycle)
  } state_t;
endpackage
