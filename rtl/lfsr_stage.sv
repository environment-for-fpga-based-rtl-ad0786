// lfsr_stage - one stage of the loadable LFSR.
//
// The stage holds one flip-flop with a clock enable. Its D input comes from a
// two-way multiplexer: while `reset` is high the flip-flop loads its `seed`
// bit, otherwise it takes the bit from the previous stage XORed with
// `result`. Tying `result` to 0 makes the stage part of a pattern generator;
// feeding it a circuit output makes it part of a signature analyser.
// At the output side the flip-flop value, ANDed with the feedback
// `coefficient`, is XORed into the running mod-2 sum that travels from stage
// to stage (`sum_in` -> `sum_out`). Nothing changes unless `enable` is high,
// so loading the seed needs both `reset` and `enable`.
//
// Timing: q updates on the rising clock edge; sum_out is combinational.
// The structure follows the published stage schematic; the names are this
// design's own.
module lfsr_stage (
  input  logic clk,
  input  logic reset,        // select the seed into the flip-flop
  input  logic enable,       // flip-flop clock enable
  input  logic seed,         // seed bit
  input  logic coefficient,  // feedback polynomial coefficient
  input  logic result,       // analysed bit (0 for generation)
  input  logic prev,         // bit from the previous stage
  input  logic sum_in,       // mod-2 sum from the previous stage
  output logic q,            // stage value, to the next stage
  output logic sum_out       // mod-2 sum to the next stage
);
  logic d;

  always_comb d = reset ? seed : (prev ^ result);

  always_ff @(posedge clk)
    if (enable) q <= d;

  always_comb sum_out = sum_in ^ (q & coefficient);
endmodule
