// tb_sqrt_psc: self-checking test of the partial square root calculator at
// M = 4. Every one of the 16 sequences of subtraction signs is run as one
// operation (a first step, M-2 middle steps, a last step), several times,
// with random idle cycles between and inside operations. A reference partial
// root q in the testbench starts at 0 and becomes 2q+1 after a kept
// subtraction and 2q after a negative one; at each step the trial value must
// be 4q+1, and after the last step root_o must equal q and then hold until
// the next operation ends. A reset must clear root_o.
module tb_sqrt_psc;
  localparam int unsigned M = 4;

  logic         clk = 0, rst_n = 0;
  logic         step_i = 0, first_i = 0, last_i = 0, neg_i = 0;
  logic [M:0]   trial_o;
  logic [M-1:0] root_o;
  int checks = 0, failures = 0;

  sqrt_psc #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_val(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL t=%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  // one operation with the given sign sequence (bit k = sign of step k)
  task automatic run_op(logic [M-1:0] negs, int prev_root);
    int q;
    q = 0;
    for (int k = 0; k < int'(M); k++) begin
      step_i  = 1;
      first_i = (k == 0);
      last_i  = (k == int'(M) - 1);
      neg_i   = negs[k];
      #1;
      expect_val("trial", int'(trial_o), 4 * q + 1);
      expect_val("root held", int'(root_o), prev_root);
      @(negedge clk);
      q = 2 * q + (negs[k] ? 0 : 1);
      step_i = 0; first_i = 0; last_i = 0;
      // idle cycles inside the operation must not disturb it
      if ($urandom_range(0, 3) == 0) begin
        neg_i = 1'($urandom);
        @(negedge clk);
      end
    end
    expect_val("root", int'(root_o), q);
  endtask

  initial begin
    int prev, q;
    logic [M-1:0] negs;
    prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_val("root after reset", int'(root_o), 0);
    repeat (3) begin
      for (int s = 0; s < 2**M; s++) begin
        negs = M'(s ^ 'h5);
        q    = 0;
        run_op(negs, prev);
        for (int k = 0; k < int'(M); k++) q = 2 * q + (negs[k] ? 0 : 1);
        prev = q;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    rst_n = 0;
    #1 expect_val("root cleared by reset", int'(root_o), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
