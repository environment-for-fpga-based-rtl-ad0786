// cmp - parallel comparator of the faulty CUT and the golden device.
//
// `differ` is high in any cycle in which at least one output bit of the CUT
// differs from the same bit of GOLD. It is combinational, so the controller
// sees the verdict for the test vector being applied in the same cycle and
// can drop the fault at once. Comparing all outputs in parallel on the fly
// follows the fault-dropping environment; WIDTH is the CUT's output count.
module cmp #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] cut_po,
  input  logic [WIDTH-1:0] gold_po,
  output logic             differ
);
  always_comb differ = |(cut_po ^ gold_po);
endmodule
