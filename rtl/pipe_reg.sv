// pipe_reg: one pipeline register bank with built-in stall and bubble MUXes.
//
// Every clock edge the bank normally loads its input. With stall=1 it keeps its old
// value (input MUX selects its own output), so the stage behind it repeats the same
// instruction next cycle. With bubble=1 it loads its default value, the no-operation
// contents, so the stage behind it does nothing next cycle. Both behaviours and the
// exercise table used in the testbench follow the slides; the slides leave open what
// happens if both are asserted, this design gives bubble priority and flags the case
// with an assertion. A synchronous reset loads the default value (own choice).
//
// Parameters: T, the type held (a packed struct for the CPU), and DEFAULT, its
// bubble value. Defaults are the 8-bit register with default 0xFF from the slides.
// Timing: one cycle, out follows in (or holds, or becomes DEFAULT) at the rising edge.
module pipe_reg #(
  parameter type T       = logic [7:0],
  parameter T    DEFAULT = T'(8'hFF)
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst || bubble) q <= DEFAULT;
    else if (!stall)   q <= d;
  end

  a_not_both : assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule
