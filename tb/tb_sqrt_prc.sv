// tb_sqrt_prc: exhaustive self-checking test of the partial remainder
// calculator at RW = 5 (a 4-bit root). Every remainder, bit pair and trial
// value is applied; the expected remainder and sign come from plain integer
// arithmetic: s = 4*rem + pair, kept as s - trial when s >= trial, else s.
module tb_sqrt_prc;
  localparam int unsigned RW = 5;

  logic [RW-1:0] rem_i, trial_i, rem_o;
  logic [1:0]    pair_i;
  logic          neg_o;
  int checks = 0, failures = 0;

  sqrt_prc #(.RW(RW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, exp_rem;
    bit exp_neg;
    for (int r = 0; r < 2**RW; r++)
      for (int p = 0; p < 4; p++)
        for (int t = 0; t < 2**RW; t++) begin
          rem_i = RW'(r); pair_i = 2'(p); trial_i = RW'(t);
          #1;
          s       = 4 * r + p;
          exp_neg = (s < t);
          exp_rem = exp_neg ? s : s - t;
          exp_rem = exp_rem % (2**RW);
          checks++;
          if (neg_o !== exp_neg || rem_o !== RW'(exp_rem)) begin
            failures++;
            if (failures < 10)
              $display("FAIL rem=%0d pair=%0d trial=%0d: got rem=%0d neg=%0b, want rem=%0d neg=%0b",
                       r, p, t, rem_o, neg_o, exp_rem, exp_neg);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
