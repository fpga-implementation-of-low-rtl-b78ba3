// sqrt_prc: Partial Remainder Calculator of the modified non-restoring
// square root algorithm (combinational).
//
// One iteration of the digit-by-digit square root: the current remainder is
// shifted left by two and the next radicand bit pair is appended; the trial
// value {Q,01} (partial root with 01 appended, supplied by sqrt_psc) is
// subtracted. If the difference is not negative it becomes the new
// remainder; if it is negative the subtraction is simply not kept and the
// shifted remainder carries on. Unlike classic non-restoring square root
// there is never an addition, which is the point of the modified algorithm.
//
// Interface: rem_i, trial_i and rem_o are RW bits wide, RW = M+1 for an
// M-bit root; pair_i is the next radicand bit pair; neg_o is 1 when the
// trial difference was negative (the new root bit is then 0).
// Timing: purely combinational; the registers live in sqrt_lowarea.
//
// The algorithm and the PRC/PSC split follow the published design; the port
// list and widths are this design's own choices. The shifted remainder is
// formed on RW+2 bits and the difference on RW+3 bits (with a sign bit), so
// no carry is lost; the kept remainder always fits back into RW bits because
// a remainder is at most twice the partial root.
module sqrt_prc #(
  parameter int unsigned RW = 5
) (
  input  logic [RW-1:0] rem_i,
  input  logic [1:0]    pair_i,
  input  logic [RW-1:0] trial_i,
  output logic [RW-1:0] rem_o,
  output logic          neg_o
);

  logic [RW+1:0] shifted;  // {remainder, pair}
  logic [RW+2:0] diff;     // shifted - trial, MSB is the sign

  always_comb begin
    shifted = {rem_i, pair_i};
    diff    = {1'b0, shifted} - {3'b000, trial_i};
    neg_o   = diff[RW+2];
    rem_o   = neg_o ? shifted[RW-1:0] : diff[RW-1:0];
  end

endmodule
