// pipe_reg: one bank of pipeline registers between two stages.
//
// Captures the sending stage's values d on every rising clock edge and
// presents them to the receiving stage as q for the whole next cycle. Two
// controls from the stall logic change this: stall keeps the old contents
// (used for the PC register while an instruction waits in fetch), and bubble
// loads the do-nothing value BUBBLE_VAL instead of d (used to put a no-op
// into the fetch-to-decode register). The same do-nothing value is the
// contents after reset, as in the register declarations of the pipeline
// description language the design is written from ("rA : 4 = REG_NONE").
// If stall and bubble are both set, stall wins. rst is synchronous,
// active high.
module pipe_reg #(
  parameter type T          = logic [7:0],
  parameter T    BUBBLE_VAL = T'(0)
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)         q <= BUBBLE_VAL;
    else if (stall)  q <= q;
    else if (bubble) q <= BUBBLE_VAL;
    else             q <= d;
  end

endmodule
