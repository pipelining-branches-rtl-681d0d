// pipe_reg: one pipeline register bank with built-in stall and bubble muxes.
//
// Every clock edge the bank does one of three things:
//   normal  (stall=0, bubble=0): q <= d             (take the new value)
//   stall   (stall=1)          : q <= q             (keep the old value, so the
//                                                    stage repeats next cycle)
//   bubble  (bubble=1)         : q <= DEFAULT       (load the default value, a
//                                                    no-op in pipeline terms)
// Synchronous active-high reset also loads DEFAULT. Asserting stall and bubble
// in the same cycle is a control error and is flagged by an assertion; the
// register then stalls.
//
// The stall/bubble behaviour follows the register-bank semantics of the
// pipeline description; the reset, the priority between the two controls and
// the parameter defaults (an 8-bit bank whose default is 0xFF, as in the worked
// stall/bubble example) are this design's choices. T may be any packed type,
// such as one of the stage structs of y86_pkg.
module pipe_reg #(
  parameter type T       = logic [7:0],
  parameter T    DEFAULT = T'('1)
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)         q <= DEFAULT;
    else if (stall)  q <= q;
    else if (bubble) q <= DEFAULT;
    else             q <= d;
  end

  a_not_stall_and_bubble: assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule
