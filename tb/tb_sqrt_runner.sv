// tb_sqrt_runner: drives one sqrt_lowarea instance of radicand width N with a
// list of directed radicands followed by NRAND random ones (including 0 and
// 2^N-1), all sent back to back, and checks each root against the definition
// r*r <= d < (r+1)*(r+1) computed on 130 bits, and each latency against N/2
// cycles. Reports its counts through checks/failures and raises done.
// Used by tb_sqrt_workloads for the radicand widths evaluated for the design.
module tb_sqrt_runner #(
  parameter int unsigned N     = 8,
  parameter int unsigned NDIR  = 0,
  parameter logic [63:0] DIR [8] = '{default: 64'd0},
  parameter logic [63:0] WANT [8] = '{default: 64'd0},
  parameter int unsigned NRAND = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned M = N / 2;

  logic         in_valid = 0, in_ready, out_valid;
  logic [N-1:0] radicand = '0;
  logic [M-1:0] root;

  sqrt_lowarea #(.N(N)) dut (.*);

  typedef struct { logic [N-1:0] d; longint at; int idx; } pend_t;
  pend_t  pending[$];
  longint cycle = 0;
  int     sent = 0;

  initial begin checks = 0; failures = 0; done = 0; end

  function automatic logic [N-1:0] rand_radicand(int k);
    logic [63:0] v;
    if (k == 0) return '0;
    if (k == 1) return '1;
    v = {$urandom, $urandom};
    // vary the magnitude so small and large roots both occur
    v = v >> $urandom_range(0, 63 - (N - 1));
    return N'(v);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      pend_t p;
      logic [129:0] r, r1, dd;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("N=%0d FAIL unexpected result", N);
      end else begin
        p  = pending.pop_front();
        r  = 130'(root);
        r1 = r + 1;
        dd = 130'(p.d);
        if (!(r * r <= dd && dd < r1 * r1)) begin
          failures++;
          $display("N=%0d FAIL sqrt(%0d): got %0d", N, p.d, root);
        end
        if (p.idx < int'(NDIR)) begin
          checks++;
          if (64'(root) != WANT[p.idx]) begin
            failures++;
            $display("N=%0d FAIL directed sqrt(%0d): got %0d want %0d", N, p.d, root, WANT[p.idx]);
          end
        end
        checks++;
        if (cycle - p.at != longint'(M)) begin
          failures++;
          $display("N=%0d FAIL latency %0d, want %0d", N, cycle - p.at, M);
        end
      end
    end
    if (rst_n && in_valid && in_ready) pending.push_back('{radicand, cycle, sent - 1});
  end

  initial begin
    @(posedge rst_n);
    @(negedge clk);
    for (int k = 0; k < int'(NDIR + NRAND); k++) begin
      radicand = (k < int'(NDIR)) ? N'(DIR[k]) : rand_radicand(k - int'(NDIR));
      in_valid = 1;
      sent     = k + 1;
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 0;
    while (pending.size() != 0) @(negedge clk);
    done = 1;
  end
endmodule
