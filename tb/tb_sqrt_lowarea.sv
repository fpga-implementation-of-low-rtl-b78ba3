// tb_sqrt_lowarea: end-to-end self-checking test of the square root
// calculator at its default size (8-bit radicand, 4-bit root).
//
// Every radicand 0..255 is sent, first with idle gaps and random valid
// patterns, then back to back, then again in random order. Each result is
// checked against the definition of the integer square root,
// r*r <= d < (r+1)*(r+1), and must arrive exactly M = N/2 cycles after its
// radicand was accepted. The root output must hold between results.
// Mechanisms counted, each of which must occur: steps whose trial
// subtraction was kept, steps where it was negative and discarded, a new
// radicand accepted in the same cycle a result is delivered (back to back),
// a valid radicand held off while busy, and a reset in mid-operation.
module tb_sqrt_lowarea;
  localparam int unsigned N = 8;
  localparam int unsigned M = N / 2;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_ready, out_valid;
  logic [N-1:0] radicand = '0;
  logic [M-1:0] root;

  int checks = 0, failures = 0;
  int n_sub_kept = 0, n_sub_neg = 0, n_back2back = 0, n_held_off = 0, n_reset_mid = 0;
  longint cycle = 0;

  sqrt_lowarea dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted radicands awaiting their result
  typedef struct { logic [N-1:0] d; longint at; } pend_t;
  pend_t pending[$];
  logic [M-1:0] last_root;
  bit           have_root = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_held_off++;
      if (in_valid && in_ready && out_valid) n_back2back++;

      if (out_valid) begin
        pend_t p;
        checks++;
        if (pending.size() == 0) begin
          failures++;
          $display("FAIL unexpected result %0d", root);
        end else begin
          logic [2*M+1:0] r, r1;
          p  = pending.pop_front();
          r  = (2*M+2)'(root);
          r1 = r + 1;
          if (!(r * r <= (2*M+2)'(p.d) && (2*M+2)'(p.d) < r1 * r1)) begin
            failures++;
            $display("FAIL sqrt(%0d): got %0d", p.d, root);
          end
          checks++;
          if (cycle - p.at != longint'(M)) begin
            failures++;
            $display("FAIL latency for %0d: %0d cycles, want %0d", p.d, cycle - p.at, M);
          end
        end
        // each root bit is one step: 1 = subtraction kept, 0 = negative trial
        for (int b = 0; b < int'(M); b++)
          if (root[b]) n_sub_kept++; else n_sub_neg++;
        last_root = root;
        have_root = 1;
      end else if (have_root) begin
        checks++;
        if (root !== last_root) begin
          failures++;
          $display("FAIL root changed without out_valid");
        end
      end
      if (in_valid && in_ready) pending.push_back('{radicand, cycle});
    end
  end

  task automatic send(logic [N-1:0] d);
    radicand = d;
    in_valid = 1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
    radicand = N'($urandom);
  endtask

  task automatic drain();
    while (pending.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int order[256];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1) all radicands, random idle gaps
    for (int d = 0; d < 2**N; d++) begin
      send(N'(d));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    drain();

    // 2) all radicands back to back, valid held high throughout
    for (int d = 2**N - 1; d >= 0; d--) begin
      radicand = N'(d);
      in_valid = 1;
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 0;
    drain();

    // 3) reset in the middle of an operation: the result is dropped
    radicand = N'(200);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    rst_n = 0;
    pending.delete();
    have_root = 0;
    n_reset_mid++;
    @(negedge clk);
    checks++;
    if (root !== '0 || out_valid !== 1'b0 || in_ready !== 1'b1) begin
      failures++;
      $display("FAIL state after reset");
    end
    rst_n = 1;
    repeat (2 * M) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL result after reset"); end
    end

    // 4) all radicands in random order, random valid pattern
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      radicand = N'(order[i]);
      in_valid = 1;
      do begin
        @(posedge clk);
      end while (!in_ready);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    drain();

    $display("mechanisms: kept=%0d negative=%0d back_to_back=%0d held_off=%0d reset_mid=%0d",
             n_sub_kept, n_sub_neg, n_back2back, n_held_off, n_reset_mid);
    checks += 5;
    if (n_sub_kept == 0)  begin failures++; $display("FAIL no kept subtraction"); end
    if (n_sub_neg == 0)   begin failures++; $display("FAIL no negative trial"); end
    if (n_back2back == 0) begin failures++; $display("FAIL no back-to-back operation"); end
    if (n_held_off == 0)  begin failures++; $display("FAIL no radicand held off while busy"); end
    if (n_reset_mid == 0) begin failures++; $display("FAIL no reset mid-operation"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
