// tb_sqrt_workloads: runs the calculator at each radicand width evaluated for
// this design: 8 bits (the value sequence captured on the FPGA board:
// 196, 225, 121, 36, 9, 4, 25), 12 bits (the simulation sequence 4, 16, 81,
// 225, 900, 1600, 400, 49), and 16, 32 and 64 bits with random radicands.
// Each width checks every root and a latency of N/2 cycles.
module tb_sqrt_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int unsigned W = 5;
  localparam int WIDTHS[W] = '{8, 12, 16, 32, 64};
  int   c[W], f[W];
  logic d[W];
  int   checks, failures;

  tb_sqrt_runner #(.N(8), .NDIR(7),
    .DIR ('{64'd196, 64'd225, 64'd121, 64'd36, 64'd9, 64'd4, 64'd25, 64'd0}),
    .WANT('{64'd14,  64'd15,  64'd11,  64'd6,  64'd3, 64'd2, 64'd5,  64'd0}),
    .NRAND(300)) r8 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));

  tb_sqrt_runner #(.N(12), .NDIR(8),
    .DIR ('{64'd4, 64'd16, 64'd81, 64'd225, 64'd900, 64'd1600, 64'd400, 64'd49}),
    .WANT('{64'd2, 64'd4,  64'd9,  64'd15,  64'd30,  64'd40,   64'd20,  64'd7}),
    .NRAND(500)) r12 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));

  tb_sqrt_runner #(.N(16), .NRAND(1000)) r16 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  tb_sqrt_runner #(.N(32), .NRAND(1000)) r32 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));
  tb_sqrt_runner #(.N(64), .NRAND(1000)) r64 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    foreach (c[i]) begin
      $display("width %0d: checks=%0d failures=%0d", WIDTHS[i], c[i], f[i]);
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
