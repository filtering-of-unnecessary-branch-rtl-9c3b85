// nbdc: next branch distance counter (NBDC).
//
// An NBD_W-bit saturating counter in the EX stage. For each executed
// instruction (step high) it clears itself if the instruction is a branch and
// otherwise increments, stopping at its all-ones maximum. While a branch
// executes, count therefore holds the number of non-branch instructions
// executed since the previous branch: that branch's next branch distance. A
// distance longer than the counter can hold is reported as the maximum,
// which under-estimates it and so is always safe to use.
// Behaviour and width follow the described design; the step qualifier and
// the reset value are this design's own.
module nbdc #(
  parameter int unsigned NBD_W = nbd_pkg::DEF_NBD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             is_branch,
  output logic [NBD_W-1:0] count,
  output logic             saturated
);

  assign saturated = &count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (step) begin
      if (is_branch)       count <= '0;
      else if (!saturated) count <= count + 1'b1;
    end
  end

endmodule
