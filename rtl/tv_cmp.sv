// tv_cmp - parallel comparator for three-valued CUT and GOLD outputs.
//
// A fault counts as detected only where both outputs are known and differ:
// an X on either side can be 0 or 1 in the real circuit, so it proves
// nothing. `differ` is combinational, as in cmp. The rule for X is this
// design's choice; comparing in three-valued logic follows the environment.
module tv_cmp
  import tv_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  tv_t [WIDTH-1:0] cut_po,
  input  tv_t [WIDTH-1:0] gold_po,
  output logic            differ
);
  always_comb begin
    differ = 1'b0;
    for (int i = 0; i < WIDTH; i++)
      if (tv_known(cut_po[i]) && tv_known(gold_po[i]) && (cut_po[i] != gold_po[i]))
        differ = 1'b1;
  end
endmodule
