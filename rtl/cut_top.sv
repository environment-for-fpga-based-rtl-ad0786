// cut_top - wrapper that fits the circuit under test into the generic
// emulation environment.
//
// It holds the fault-injected CUT (s27_cut) and its golden copy (s27_gold),
// drives both with the same test vector, resets and steps both together, and
// turns the environment's fault number into the CUT's fault controls: fault
// point fault_num >> 1, stuck value fault_num[0]. Fault numbers of
// cut_pkg::NUM_FAULTS or more, or `fault_valid` low, leave the CUT fault-free.
// Sizes come from cut_pkg. Timing is that of the two netlists: `rst` and
// `en` act on the rising edge, the outputs are combinational.
// In the environment this wrapper and cut_pkg are generated for each circuit;
// the port list and the fault numbering are this design's choice.
module cut_top
  import cut_pkg::*;
  import fe_pkg::*;
(
  input  logic               clk,
  input  logic               rst,          // reset_CUT and reset_GOLD
  input  logic               en,           // emulate_CUT and emulate_GOLD
  input  logic [NUM_IN-1:0]  pi,           // test vector
  input  logic               fault_valid,  // inject the fault named by fault_num
  input  cnt_t               fault_num,
  output logic [NUM_OUT-1:0] cut_po,
  output logic [NUM_OUT-1:0] gold_po
);
  logic            fault_en;
  logic [FP_W-1:0] fault_code;
  logic            stuck;

  always_comb begin
    fault_en   = fault_valid && (fault_num < cnt_t'(NUM_FAULTS));
    fault_code = FP_W'(fault_num >> 1);
    stuck      = fault_num[0];
  end

  s27_cut u_cut (
    .clk       (clk),
    .rst       (rst),
    .en        (en),
    .pi        (pi),
    .po        (cut_po),
    .fault_en  (fault_en),
    .fault_code(fault_code),
    .stuck     (stuck)
  );

  s27_gold u_gold (
    .clk(clk),
    .rst(rst),
    .en (en),
    .pi (pi),
    .po (gold_po)
  );
endmodule
