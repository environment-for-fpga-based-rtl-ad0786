// fault_point - fault injection multiplexer placed on one net of the CUT.
//
// While `select` is high the net is replaced by the shared stuck-at value
// (`stuck` = 1 models stuck-at-1, 0 models stuck-at-0); otherwise the net
// passes unchanged. Purely combinational. Any fault can be activated within
// a single clock cycle because `select` comes straight from the fault
// decoder. This follows the multiplexer fault-point scheme of the
// environment.
module fault_point (
  input  logic net_in,   // fault-free value of the net
  input  logic select,   // this fault point is active
  input  logic stuck,    // stuck-at value
  output logic net_out   // value seen by the net's loads
);
  always_comb net_out = select ? stuck : net_in;
endmodule
