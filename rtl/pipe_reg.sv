// pipe_reg: one pipeline register between two stages.
//
// On each rising clock edge the register normally loads the values the
// earlier stage sends (d). Two controls change that, as the stalling logic
// needs: "stall" keeps the current value (for instance, the PC is not
// changed), and "bubble" loads the do-nothing value BUBBLE instead of d, so
// that the next stage sees a nop. Reset also loads BUBBLE: the reset value of
// every pipeline register is its bubble value (REG_NONE for register
// numbers, 0 for data, NOP for icode). Asserting stall and bubble together is
// an error of the controller and is flagged by an assertion.
//
// Interface: clk, rst (synchronous, active high), stall, bubble, d -> q.
// Timing: q changes only at a rising clock edge; one cycle of latency.
module pipe_reg #(
  parameter type T      = logic [7:0],
  parameter T    BUBBLE = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst || bubble) q <= BUBBLE;
    else if (!stall)   q <= d;
  end

  stall_xor_bubble: assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule
