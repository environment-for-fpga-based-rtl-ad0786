// s27_cut - example circuit under test with fault points on every net.
//
// The netlist is the same as s27_gold (ISCAS'89 s27), but every one of its
// 17 nets passes through a fault_point multiplexer, and a fault_decoder turns
// the fault code into the select line of one of them. Fault point indices:
//   0 G0   1 G1   2 G2   3 G3   4 G5   5 G6   6 G7   7 G8   8 G9
//   9 G10 10 G11 11 G12 12 G13 13 G14 14 G15 15 G16 16 G17
// A fault point sits on the stem of its net (after the driving gate, input
// pin or flip-flop), so all loads of the net see the stuck value; fan-out
// branches carry no separate fault points. `fault_en` low gives the
// fault-free circuit. With `stuck` shared by all points, any single stuck-at
// fault is chosen in one cycle by (fault_en, fault_code, stuck).
//
// Clock and reset as in s27_gold: `rst` with `en` clears the flip-flops,
// `en` alone advances one vector; the output is combinational.
// Multiplexer insertion with decoder activation follows the environment's
// fault insertion scheme; the example netlist and the stem-only fault list
// are this design's choice.
module s27_cut
  import cut_pkg::*;
(
  input  logic            clk,
  input  logic            rst,         // reset_CUT
  input  logic            en,          // emulation step
  input  logic [3:0]      pi,          // {G3, G2, G1, G0}
  output logic [0:0]      po,          // G17
  input  logic            fault_en,    // activate a fault
  input  logic [FP_W-1:0] fault_code,  // fault point index
  input  logic            stuck        // stuck-at value
);
  logic [NUM_FP-1:0] sel;   // one select line per fault point
  logic G5q, G6q, G7q;      // flip-flop outputs
  // <net>_r is the fault-free value, <net> the value after the fault point.
  logic G0_r, G1_r, G2_r, G3_r, G5_r, G6_r, G7_r, G8_r, G9_r, G10_r, G11_r, G12_r, G13_r, G14_r, G15_r, G16_r, G17_r;
  logic G0, G1, G2, G3, G5, G6, G7, G8, G9, G10, G11, G12, G13, G14, G15, G16, G17;

  fault_decoder #(.NUM(NUM_FP)) u_dec (
    .en  (fault_en),
    .code(fault_code),
    .sel (sel)
  );

  // Gates and sources of the fault-free net values.
  assign G0_r   = pi[0];
  assign G1_r   = pi[1];
  assign G2_r   = pi[2];
  assign G3_r   = pi[3];
  assign G5_r   = G5q;
  assign G6_r   = G6q;
  assign G7_r   = G7q;
  assign G14_r  = ~G0;
  assign G12_r  = ~(G1 | G7);
  assign G8_r   = G14 & G6;
  assign G15_r  = G12 | G8;
  assign G16_r  = G3 | G8;
  assign G9_r   = ~(G16 & G15);
  assign G11_r  = ~(G5 | G9);
  assign G10_r  = ~(G14 | G11);
  assign G13_r  = ~(G2 | G12);
  assign G17_r  = ~G11;

  // Fault points.
  fault_point u_fp_G0 (.net_in(G0_r), .select(sel[0]), .stuck(stuck), .net_out(G0));
  fault_point u_fp_G1 (.net_in(G1_r), .select(sel[1]), .stuck(stuck), .net_out(G1));
  fault_point u_fp_G2 (.net_in(G2_r), .select(sel[2]), .stuck(stuck), .net_out(G2));
  fault_point u_fp_G3 (.net_in(G3_r), .select(sel[3]), .stuck(stuck), .net_out(G3));
  fault_point u_fp_G5 (.net_in(G5_r), .select(sel[4]), .stuck(stuck), .net_out(G5));
  fault_point u_fp_G6 (.net_in(G6_r), .select(sel[5]), .stuck(stuck), .net_out(G6));
  fault_point u_fp_G7 (.net_in(G7_r), .select(sel[6]), .stuck(stuck), .net_out(G7));
  fault_point u_fp_G8 (.net_in(G8_r), .select(sel[7]), .stuck(stuck), .net_out(G8));
  fault_point u_fp_G9 (.net_in(G9_r), .select(sel[8]), .stuck(stuck), .net_out(G9));
  fault_point u_fp_G10 (.net_in(G10_r), .select(sel[9]), .stuck(stuck), .net_out(G10));
  fault_point u_fp_G11 (.net_in(G11_r), .select(sel[10]), .stuck(stuck), .net_out(G11));
  fault_point u_fp_G12 (.net_in(G12_r), .select(sel[11]), .stuck(stuck), .net_out(G12));
  fault_point u_fp_G13 (.net_in(G13_r), .select(sel[12]), .stuck(stuck), .net_out(G13));
  fault_point u_fp_G14 (.net_in(G14_r), .select(sel[13]), .stuck(stuck), .net_out(G14));
  fault_point u_fp_G15 (.net_in(G15_r), .select(sel[14]), .stuck(stuck), .net_out(G15));
  fault_point u_fp_G16 (.net_in(G16_r), .select(sel[15]), .stuck(stuck), .net_out(G16));
  fault_point u_fp_G17 (.net_in(G17_r), .select(sel[16]), .stuck(stuck), .net_out(G17));

  assign po[0] = G17;

  always_ff @(posedge clk)
    if (en) begin
      if (rst) {G5q, G6q, G7q} <= '0;
      else     {G5q, G6q, G7q} <= {G10, G11, G13};
    end
endmodule
