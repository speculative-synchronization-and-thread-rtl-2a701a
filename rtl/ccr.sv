// ccr: Committed Conditions Register. Holds the committed value of the binary
// semaphores (condition registers). The CIQ computes, from the instructions it
// retires in a cycle, which conditions become set and which become cleared; the
// register applies them at the next rising edge (a condition named in both masks
// ends up set, since the CIQ has already resolved the order). Reset clears all
// conditions. Read combinationally through q. The reset value is this design's
// choice.
module ccr
  import inth_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cmask_t set_mask,
  input  cmask_t clr_mask,
  output cmask_t q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= (q & ~clr_mask) | set_mask;
  end
endmodule
