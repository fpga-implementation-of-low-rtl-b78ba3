// sqrt_lowarea: area-optimized integer square root calculator (top level).
//
// Computes root = floor(sqrt(radicand)) for an N-bit unsigned radicand, giving
// an M = N/2 bit root, with the modified non-restoring digit-by-digit
// algorithm: for each radicand bit pair, most significant pair first, the
// pair is appended to the shifted remainder and {root so far, 01} is
// subtracted; a non-negative difference replaces the remainder and yields a
// root bit of 1, a negative one is discarded and yields a 0. Only
// subtraction is ever needed.
//
// Instead of one remainder/root calculator pair per root bit, a single
// shared pair (sqrt_prc and sqrt_psc) is reused on M consecutive clock
// cycles, one root bit per cycle. The not-yet-used radicand pairs and the
// partial remainder sit in registers here, the partial and final root in
// sqrt_psc; sqrt_ctrl sequences the steps. On the first step the datapath
// reads the radicand input directly (with a zero remainder and root), so
// the result takes exactly M cycles.
//
// Interface: in_valid/in_ready take a radicand (in_ready is 1 whenever the
// unit is idle); out_valid pulses for one cycle when root holds a new
// result; root keeps its value until the next result. rst_n is an
// asynchronous active-low reset.
// Timing: radicand accepted in cycle c -> out_valid and root in cycle c+M;
// a new radicand may be offered in that same cycle (one result per M cycles).
//
// Follows the published design: the algorithm, the PRC/PSC split, one shared
// pair, one root bit per clock and the n/2-cycle latency, and an 8-bit
// radicand by default. The handshake, the registering of the radicand and
// the result, and the reset style are this design's own choices.
module sqrt_lowarea #(
  parameter int unsigned N = 8   // radicand width in bits, even, >= 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   radicand,
  output logic           out_valid,
  output logic [N/2-1:0] root
);

  localparam int unsigned M  = N / 2;
  localparam int unsigned RW = sqrt_pkg::rem_width(M);

  // sequencer
  logic step, first, last;

  sqrt_ctrl #(.M(M)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (in_valid),
    .ready_o (in_ready),
    .step_o  (step),
    .first_o (first),
    .last_o  (last),
    .done_o  (out_valid)
  );

  // radicand pairs not yet used and the partial remainder
  logic [N-1:0]  rad_q;
  logic [RW-1:0] rem_q;

  // operands of the current step: the input itself on the first step
  logic [N-1:0]  rad_cur;
  logic [RW-1:0] rem_cur;

  always_comb begin
    rad_cur = first ? radicand : rad_q;
    rem_cur = first ? '0       : rem_q;
  end

  // shared datapath pair; the PSC keeps the partial and final root
  logic [RW-1:0] trial, rem_nxt;
  logic          neg;

  sqrt_psc #(.M(M)) u_psc (
    .clk     (clk),
    .rst_n   (rst_n),
    .step_i  (step),
    .first_i (first),
    .last_i  (last),
    .neg_i   (neg),
    .trial_o (trial),
    .root_o  (root)
  );

  sqrt_prc #(.RW(RW)) u_prc (
    .rem_i   (rem_cur),
    .pair_i  (rad_cur[N-1 -: 2]),
    .trial_i (trial),
    .rem_o   (rem_nxt),
    .neg_o   (neg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q <= '0;
      rem_q <= '0;
    end else if (step) begin
      rad_q <= {rad_cur[N-3:0], 2'b00};
      rem_q <= rem_nxt;
    end
  end

  initial assert (N >= 4 && N % 2 == 0)
    else $error("sqrt_lowarea: N must be even and at least 4");

endmodule
