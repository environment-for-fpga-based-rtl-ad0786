// s27_cut_tv - three-valued example CUT with fault points on every net.
//
// The three-valued counterpart of s27_cut: the ISCAS'89 s27 netlist in
// tv_pkg logic, each of its 17 nets passing through a tv_fault_point, one
// of which the fault_decoder activates. Fault point indices are those of
// s27_cut (0 G0 .. 3 G3, 4 G5, 5 G6, 6 G7, 7 G8 .. 16 G17). `rst` with `en`
// puts the flip-flops into X (unknown power-up state); `en` alone advances
// one vector. Output is combinational, tv_pkg encoded.
module s27_cut_tv
  import cut_pkg::*;
  import tv_pkg::*;
(
  input  logic            clk,
  input  logic            rst,         // reset_CUT: state becomes X
  input  logic            en,          // emulation step
  input  logic [3:0]      pi,          // {G3, G2, G1, G0}
  output tv_t  [0:0]      po,          // G17
  input  logic            fault_en,    // activate a fault
  input  logic [FP_W-1:0] fault_code,  // fault point index
  input  logic            stuck        // stuck-at value
);
  logic [NUM_FP-1:0] sel;   // one select line per fault point
  tv_t  G5q, G6q, G7q;      // flip-flop outputs
  // <net>_r is the fault-free value, <net> the value after the fault point.
  tv_t G0_r, G1_r, G2_r, G3_r, G5_r, G6_r, G7_r, G8_r, G9_r, G10_r, G11_r, G12_r, G13_r, G14_r, G15_r, G16_r, G17_r;
  tv_t G0, G1, G2, G3, G5, G6, G7, G8, G9, G10, G11, G12, G13, G14, G15, G16, G17;

  fault_decoder #(.NUM(NUM_FP)) u_dec (
    .en  (fault_en),
    .code(fault_code),
    .sel (sel)
  );

  // Gates and sources of the fault-free net values.
  assign G0_r   = tv_bit(pi[0]);
  assign G1_r   = tv_bit(pi[1]);
  assign G2_r   = tv_bit(pi[2]);
  assign G3_r   = tv_bit(pi[3]);
  assign G5_r   = G5q;
  assign G6_r   = G6q;
  assign G7_r   = G7q;
  assign G14_r  = tv_not(G0);
  assign G12_r  = tv_nor(G1, G7);
  assign G8_r   = tv_and(G14, G6);
  assign G15_r  = tv_or(G12, G8);
  assign G16_r  = tv_or(G3, G8);
  assign G9_r   = tv_nand(G16, G15);
  assign G11_r  = tv_nor(G5, G9);
  assign G10_r  = tv_nor(G14, G11);
  assign G13_r  = tv_nor(G2, G12);
  assign G17_r  = tv_not(G11);

  // Fault points.
  tv_fault_point u_fp_G0 (.net_in(G0_r), .select(sel[0]), .stuck(stuck), .net_out(G0));
  tv_fault_point u_fp_G1 (.net_in(G1_r), .select(sel[1]), .stuck(stuck), .net_out(G1));
  tv_fault_point u_fp_G2 (.net_in(G2_r), .select(sel[2]), .stuck(stuck), .net_out(G2));
  tv_fault_point u_fp_G3 (.net_in(G3_r), .select(sel[3]), .stuck(stuck), .net_out(G3));
  tv_fault_point u_fp_G5 (.net_in(G5_r), .select(sel[4]), .stuck(stuck), .net_out(G5));
  tv_fault_point u_fp_G6 (.net_in(G6_r), .select(sel[5]), .stuck(stuck), .net_out(G6));
  tv_fault_point u_fp_G7 (.net_in(G7_r), .select(sel[6]), .stuck(stuck), .net_out(G7));
  tv_fault_point u_fp_G8 (.net_in(G8_r), .select(sel[7]), .stuck(stuck), .net_out(G8));
  tv_fault_point u_fp_G9 (.net_in(G9_r), .select(sel[8]), .stuck(stuck), .net_out(G9));
  tv_fault_point u_fp_G10 (.net_in(G10_r), .select(sel[9]), .stuck(stuck), .net_out(G10));
  tv_fault_point u_fp_G11 (.net_in(G11_r), .select(sel[10]), .stuck(stuck), .net_out(G11));
  tv_fault_point u_fp_G12 (.net_in(G12_r), .select(sel[11]), .stuck(stuck), .net_out(G12));
  tv_fault_point u_fp_G13 (.net_in(G13_r), .select(sel[12]), .stuck(stuck), .net_out(G13));
  tv_fault_point u_fp_G14 (.net_in(G14_r), .select(sel[13]), .stuck(stuck), .net_out(G14));
  tv_fault_point u_fp_G15 (.net_in(G15_r), .select(sel[14]), .stuck(stuck), .net_out(G15));
  tv_fault_point u_fp_G16 (.net_in(G16_r), .select(sel[15]), .stuck(stuck), .net_out(G16));
  tv_fault_point u_fp_G17 (.net_in(G17_r), .select(sel[16]), .stuck(stuck), .net_out(G17));

  assign po[0] = G17;

  always_ff @(posedge clk)
    if (en) begin
      if (rst) {G5q, G6q, G7q} <= {TV_X, TV_X, TV_X};
      else     {G5q, G6q, G7q} <= {G10, G11, G13};
    end
endmodule
