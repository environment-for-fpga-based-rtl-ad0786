// counter - generic up counter used three times by the emulation controller
// (test vectors, test sequences, modelled faults).
//
// `clear` sets the count to zero, `inc` adds one; clear wins. `last` is high
// while the count equals `limit - 1`, i.e. the item now being handled is the
// final one of the loop (a limit of 0 is treated like 1). Both are
// synchronous to the rising clock edge; `count` and `last` are registered and
// combinational from the register respectively. The environment names a
// generic counter module; its ports and the `last` flag are this design's
// choice.
module counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,   // asynchronous reset, active low
  input  logic             clear,
  input  logic             inc,
  input  logic [WIDTH-1:0] limit,
  output logic [WIDTH-1:0] count,
  output logic             last
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      count <= '0;
    else if (clear)  count <= '0;
    else if (inc)    count <= count + 1'b1;

  always_comb last = (limit == '0) ? (count == '0) : (count == limit - 1'b1);
endmodule
