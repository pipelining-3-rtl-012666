// y86_pipe_reg: one pipeline register with stall and bubble controls.
//
// Values that cross from one stage to the next wait here for one cycle.
// At each rising edge: reset or bubble loads BUBBLE (the "nothing" that a
// squashed or stalled slot carries), stall keeps the old contents,
// otherwise the register takes d. Bubble wins over stall. The lecture
// describes pipeline registers and forgetting their contents to undo an
// instruction; the priority and the use of one type parameter for all five
// registers are this design's choices.
module y86_pipe_reg #(
  parameter type T      = logic [7:0],
  parameter T    BUBBLE = T'(0)
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

endmodule
