// s27_gold_tv - golden device of the example CUT in three-valued logic.
//
// The ISCAS'89 s27 netlist of s27_gold with every gate replaced by its
// tv_pkg function. Primary inputs come from the stimulus generator and are
// always known; the three flip-flops hold dual-rail values. `rst` (with
// `en`) puts the flip-flops into X, the unknown power-up state, so a test
// sequence has to initialise the circuit itself rather than rely on a reset
// the real circuit does not have. Output is combinational; one vector per
// enabled clock edge. Output encoding: tv_pkg (2'b01 = 0, 2'b10 = 1,
// 2'b00 = X).
module s27_gold_tv
  import tv_pkg::*;
(
  input  logic           clk,
  input  logic           rst,   // reset_GOLD: state becomes X
  input  logic           en,    // emulation step
  input  logic [3:0]     pi,    // {G3, G2, G1, G0}
  output tv_t  [0:0]     po     // G17
);
  tv_t G0, G1, G2, G3, G5, G6, G7;
  tv_t G8, G9, G10, G11, G12, G13, G14, G15, G16;

  always_comb begin
    G0  = tv_bit(pi[0]);
    G1  = tv_bit(pi[1]);
    G2  = tv_bit(pi[2]);
    G3  = tv_bit(pi[3]);
    G14 = tv_not(G0);
    G12 = tv_nor(G1, G7);
    G8  = tv_and(G14, G6);
    G15 = tv_or(G12, G8);
    G16 = tv_or(G3, G8);
    G9  = tv_nand(G16, G15);
    G11 = tv_nor(G5, G9);
    G10 = tv_nor(G14, G11);
    G13 = tv_nor(G2, G12);
    po[0] = tv_not(G11);
  end

  always_ff @(posedge clk)
    if (en) begin
      if (rst) {G5, G6, G7} <= {TV_X, TV_X, TV_X};
      else     {G5, G6, G7} <= {G10, G11, G13};
    end
endmodule
