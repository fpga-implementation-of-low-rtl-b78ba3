// sqrt_psc: Partial Square Root Calculator of the modified non-restoring
// square root algorithm.
//
// It holds the root side of the calculation. It keeps the partial root found
// so far in a register, forms from it the trial value {Q,01} that sqrt_prc
// subtracts, and from the sign of that subtraction decides the next root
// bit: 1 when the difference was not negative, 0 when it was. The bit is
// shifted into the partial root from the right; after the last step the
// complete root is written to the output register, where it stays until the
// next result.
//
// Interface: step_i marks a cycle in which one iteration happens; first_i
// marks the first iteration (the partial root is then taken as zero, not
// read from the register); last_i marks the last one. neg_i is the sign from
// sqrt_prc. trial_o is the M+1 bit trial value, root_o the last full root.
// Timing: trial_o is combinational from the register and first_i; the
// partial root and root_o change on the rising clock edge that ends a step.
// rst_n is an asynchronous active-low reset clearing both registers.
// The path first_i/partial root -> trial_o -> sqrt_prc -> neg_i -> register
// forms no combinational loop, because trial_o does not depend on neg_i.
//
// The function follows the published PRC/PSC split; the ports and the
// registers' placement in this block are this design's own choices.
// The partial-root register is M-1 bits wide: before the last step at most
// M-1 root bits are known, and the last bit goes straight to root_o.
// M must be at least 2 (a radicand of at least 4 bits).
module sqrt_psc #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step_i,
  input  logic         first_i,
  input  logic         last_i,
  input  logic         neg_i,
  output logic [M:0]   trial_o,
  output logic [M-1:0] root_o
);

  logic [M-2:0] part_q;    // partial root
  logic [M-2:0] part_cur;  // partial root used by this step
  logic [M-1:0] part_nxt;  // partial root with the new bit appended

  always_comb begin
    part_cur = first_i ? '0 : part_q;
    trial_o  = {part_cur, 2'b01};
    part_nxt = {part_cur, ~neg_i};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_q <= '0;
      root_o <= '0;
    end else if (step_i) begin
      part_q <= part_nxt[M-2:0];
      if (last_i) root_o <= part_nxt;
    end
  end

  initial assert (M >= 2) else $error("sqrt_psc: M must be at least 2");

endmodule
