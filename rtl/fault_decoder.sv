// fault_decoder - distributed decoder that activates one fault point.
//
// The fault code `code` names a fault point; when `en` is high exactly that
// bit of `sel` is set, otherwise `sel` is zero. The decoder is built in two
// levels, as the environment distributes its decoders over the circuit: a
// first level decodes the upper code bits into one enable per group of
// GROUP fault points, and one small second-level decoder per group decodes
// the lower bits. Codes of NUM or more select nothing. Combinational.
// The two-level split and GROUP = 4 are this design's choice.
module fault_decoder #(
  parameter int unsigned NUM   = 17,   // fault points
  parameter int unsigned GROUP = 4,    // fault points per second-level decoder (power of two)
  localparam int unsigned CODE_W = (NUM > 1) ? $clog2(NUM) : 1
) (
  input  logic              en,
  input  logic [CODE_W-1:0] code,
  output logic [NUM-1:0]    sel
);
  localparam int unsigned NGRP  = (NUM + GROUP - 1) / GROUP;

  logic [NGRP-1:0] grp_en;

  // First level: group enables.
  always_comb begin
    for (int g = 0; g < NGRP; g++)
      grp_en[g] = en && ((int'(code) / GROUP) == g);
  end

  // Second level: one decoder per group.
  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    for (genvar k = 0; k < GROUP; k++) begin : g_pt
      if (g * GROUP + k < NUM) begin : g_valid
        assign sel[g*GROUP + k] = grp_en[g] && ((int'(code) % GROUP) == k);
      end
    end
  end

  // Single-fault model: never more than one active fault point.
  always_comb assert ($onehot0(sel)) else $error("fault_decoder: several fault points selected");
endmodule
