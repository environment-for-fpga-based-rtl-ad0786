// cut_top_tv - CUT wrapper for the three-valued (encoded don't-care) option.
//
// Same role and fault numbering as cut_top (fault point fault_num >> 1,
// stuck value fault_num[0]; numbers of cut_pkg::NUM_FAULTS or more, or
// `fault_valid` low, leave the CUT fault-free), but it holds the
// three-valued netlists s27_cut_tv and s27_gold_tv and returns dual-rail
// outputs (tv_pkg encoding) for tv_cmp. The rest of the environment is
// unchanged: test vectors stay two-valued. `rst` puts both circuits into the
// unknown state X.
module cut_top_tv
  import cut_pkg::*;
  import fe_pkg::*;
  import tv_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [NUM_IN-1:0]  pi,
  input  logic               fault_valid,
  input  cnt_t               fault_num,
  output tv_t  [NUM_OUT-1:0] cut_po,
  output tv_t  [NUM_OUT-1:0] gold_po
);
  logic            fault_en;
  logic [FP_W-1:0] fault_code;
  logic            stuck;

  always_comb begin
    fault_en   = fault_valid && (fault_num < cnt_t'(NUM_FAULTS));
    fault_code = FP_W'(fault_num >> 1);
    stuck      = fault_num[0];
  end

  s27_cut_tv u_cut (
    .clk, .rst, .en, .pi, .po(cut_po),
    .fault_en, .fault_code, .stuck
  );

  s27_gold_tv u_gold (
    .clk, .rst, .en, .pi, .po(gold_po)
  );
endmodule
