// tb_sqrt_ctrl: self-checking test of the iteration sequencer at M = 4.
// Checks, cycle by cycle, that an accepted start yields exactly M steps on
// consecutive cycles with first on the start cycle and last on the M-th,
// that done pulses in the cycle after the last step, that starts are ignored
// while busy, that back-to-back starts are taken every M cycles, and that
// reset in the middle of an operation returns the sequencer to idle.
module tb_sqrt_ctrl;
  localparam int unsigned M = 4;

  logic clk = 0, rst_n = 0, start_i = 0;
  logic ready_o, step_o, first_o, last_o, done_o;
  int checks = 0, failures = 0;

  sqrt_ctrl #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL t=%0t %s: got %0b want %0b", $time, what, got, want);
    end
  endtask

  // Sample just before the rising edge the values of the cycle now ending.
  task automatic check_cycle(logic ready, logic step, logic first, logic last, logic done);
    expect_sig("ready", ready_o, ready);
    expect_sig("step",  step_o,  step);
    expect_sig("first", first_o, first);
    expect_sig("last",  last_o,  last);
    expect_sig("done",  done_o,  done);
  endtask

  // One operation started in the current cycle, start held as given after.
  task automatic run_op(logic hold_start, logic prev_done);
    start_i = 1;
    #1 check_cycle(1, 1, 1, 0, prev_done);
    @(negedge clk);
    start_i = hold_start;
    for (int k = 1; k < M; k++) begin
      #1 check_cycle(0, 1, 0, (k == M - 1), 0);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    #1 check_cycle(1, 0, 0, 0, 0);
    @(negedge clk);

    // single operation, start dropped after one cycle
    run_op(0, 0);
    #1 check_cycle(1, 0, 0, 0, 1);
    @(negedge clk);
    #1 check_cycle(1, 0, 0, 0, 0);
    @(negedge clk);

    // start held high while busy: ignored until idle, then back to back
    run_op(1, 0);
    run_op(1, 1);
    run_op(0, 1);
    #1 check_cycle(1, 0, 0, 0, 1);
    @(negedge clk);

    // reset in the middle of an operation
    start_i = 1;
    @(negedge clk);
    start_i = 0;
    @(negedge clk);
    rst_n = 0;
    #1 check_cycle(1, 0, 0, 0, 0);
    @(negedge clk);
    rst_n = 1;
    repeat (M + 1) begin
      #1 check_cycle(1, 0, 0, 0, 0);
      @(negedge clk);
    end
    run_op(0, 0);
    #1 check_cycle(1, 0, 0, 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
