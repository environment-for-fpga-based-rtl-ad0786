// tv_fault_point - fault injection multiplexer for a three-valued net.
//
// Same job as fault_point, on a dual-rail (tv_pkg) net: while `select` is
// high the net is forced to the known value `stuck` (stuck-at-0 or
// stuck-at-1), otherwise the three-valued value passes. Combinational.
module tv_fault_point
  import tv_pkg::*;
(
  input  tv_t  net_in,
  input  logic select,
  input  logic stuck,
  output tv_t  net_out
);
  always_comb net_out = select ? tv_bit(stuck) : net_in;
endmodule
