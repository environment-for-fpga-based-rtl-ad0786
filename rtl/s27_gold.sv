// s27_gold - golden device: the unmodified netlist of the example CUT.
//
// ISCAS'89 benchmark s27: primary inputs G0..G3, output G17, three D
// flip-flops G5, G6, G7. The gates are
//   G14 = NOT G0          G8  = AND(G14, G6)     G12 = NOR(G1, G7)
//   G15 = OR(G12, G8)     G16 = OR(G3, G8)       G9  = NAND(G16, G15)
//   G11 = NOR(G5, G9)     G10 = NOR(G14, G11)    G13 = NOR(G2, G12)
//   G17 = NOT G11         G5 <= G10, G6 <= G11,  G7 <= G13.
// The fault-dropping environment runs this copy beside the faulty CUT and
// compares their outputs every clock. `rst` (synchronous, taken only with
// `en`) clears the flip-flops at the start of every test sequence; `en` is
// the emulation clock enable, one test vector per enabled edge. The output
// is combinational from the inputs and the state (Mealy). The choice of s27
// as the example circuit, and the reset of the flip-flops to 0, are this
// design's own.
module s27_gold (
  input  logic       clk,
  input  logic       rst,   // reset_GOLD: clear the state
  input  logic       en,    // emulation step
  input  logic [3:0] pi,    // {G3, G2, G1, G0}
  output logic [0:0] po     // G17
);
  logic G5, G6, G7;
  logic G8, G9, G10, G11, G12, G13, G14, G15, G16;

  always_comb begin
    G14 = ~pi[0];
    G12 = ~(pi[1] | G7);
    G8  = G14 & G6;
    G15 = G12 | G8;
    G16 = pi[3] | G8;
    G9  = ~(G16 & G15);
    G11 = ~(G5 | G9);
    G10 = ~(G14 | G11);
    G13 = ~(pi[2] | G12);
    po[0] = ~G11;
  end

  always_ff @(posedge clk)
    if (en) begin
      if (rst) {G5, G6, G7} <= '0;
      else     {G5, G6, G7} <= {G10, G11, G13};
    end
endmodule
