// lfsr - loadable, programmable LFSR built from lfsr_stage.
//
// WIDTH stages form a shift chain from stage 0 to stage WIDTH-1. The mod-2
// sum of every stage value ANDed with its feedback coefficient (`poly` bit i
// belongs to stage i) runs along the stages and is fed back into stage 0
// (Fibonacci form). With `result` tied to zero the register is a pattern
// generator whose state `q` is the test vector; with the circuit outputs on
// `result` every stage XORs in one output bit and the register compacts the
// responses into a signature (multiple-input signature register).
// Seed and polynomial are inputs, so a host can change them without
// re-synthesis.
//
// Interface and timing: when `enable` is high a rising edge loads `seed`
// (with `reset` high) or advances one step. The next state is
//   q'[0] = ^(q & poly) ^ result[0],   q'[i] = q[i-1] ^ result[i].
// With poly = 4'b1001 and WIDTH = 4 the generator has period 15
// (x^4 + x^3 + 1). The stage chain and the mod-2 sum follow the published
// generator and analyser drawings; WIDTH's default is this design's choice.
module lfsr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             reset,    // load seed
  input  logic             enable,   // advance / load
  input  logic [WIDTH-1:0] seed,
  input  logic [WIDTH-1:0] poly,     // feedback coefficients
  input  logic [WIDTH-1:0] result,   // analysed vector, zero for generation
  output logic [WIDTH-1:0] q         // register state (test vector or signature)
);
  logic [WIDTH:0]   sum;    // running mod-2 sum; sum[WIDTH] is the feedback bit
  logic [WIDTH-1:0] prev;   // shift-chain input of each stage

  assign sum[0] = 1'b0;

  always_comb begin
    prev[0] = sum[WIDTH];
    for (int i = 1; i < WIDTH; i++) prev[i] = q[i-1];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    lfsr_stage u_stage (
      .clk        (clk),
      .reset      (reset),
      .enable     (enable),
      .seed       (seed[i]),
      .coefficient(poly[i]),
      .result     (result[i]),
      .prev       (prev[i]),
      .sum_in     (sum[i]),
      .q          (q[i]),
      .sum_out    (sum[i+1])
    );
  end
endmodule
