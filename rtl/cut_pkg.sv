// cut_pkg - parameters of the circuit under test (CUT).
//
// In the emulation environment the package is produced together with the
// CUT-top wrapper, so that the generic test bench (controller, counters,
// LFSR, comparator) can be sized for the circuit at hand. The values below
// describe the example circuit shipped with this RTL, the ISCAS'89 benchmark
// s27: 4 primary inputs, 1 primary output, 3 flip-flops and 17 nets. Every
// net carries one fault point, and every fault point models a stuck-at-0 and
// a stuck-at-1 fault, giving 34 faults.
//
// Fault numbering (this design's choice): fault number f selects fault point
// f >> 1 with stuck value f[0] (0 = stuck-at-0, 1 = stuck-at-1).
package cut_pkg;
  localparam int unsigned NUM_IN     = 4;               // primary inputs
  localparam int unsigned NUM_OUT    = 1;               // primary outputs
  localparam int unsigned NUM_FF     = 3;               // state flip-flops
  localparam int unsigned NUM_FP     = 17;              // fault points (one per net)
  localparam int unsigned NUM_FAULTS = 2 * NUM_FP;      // stuck-at-0 and stuck-at-1 per point
  localparam int unsigned FP_W       = $clog2(NUM_FP);  // width of a fault point index
endpackage
