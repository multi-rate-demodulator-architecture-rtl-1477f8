// tb_rs_coef_rom: every word of the 512 x 8 coefficient table against a
// square-root-raised-cosine computed here from its closed form, to within
// one step of rounding; also the registered one-cycle read, the peak (127
// at offset 0, tap 8) and the mirror symmetry c(mu,k) ~ c(32-mu,15-k).
`timescale 1ns/1ps
module tb_rs_coef_rom;
  import mrd_pkg::*;
  localparam real PI = 3.14159265358979, A = 0.40625, SPS = 1.40625;
  logic clk = 0;
  logic [4:0] mu = 0;
  logic [3:0] tap = 0;
  logic signed [7:0] coef;
  int checks = 0, failures = 0;
  logic signed [7:0] got [32][16];

  rs_coef_rom dut (.*);
  always #5 clk = ~clk;

  // Closed-form SRRC (unit-energy form), time in symbols.
  function automatic real h(input real x);
    real d;
    if (x == 0.0) return (1.0 - A + 4.0*A/PI);
    d = 1.0 - 16.0*A*A*x*x;
    if (d < 1e-9 && d > -1e-9)
      return A/$sqrt(2.0)*((1.0+2.0/PI)*$sin(PI/(4.0*A)) + (1.0-2.0/PI)*$cos(PI/(4.0*A)));
    return ($sin(PI*x*(1.0-A)) + 4.0*A*x*$cos(PI*x*(1.0+A))) / (PI*x*d);
  endfunction

  initial begin
    real r; int e;
    for (int m = 0; m < 32; m++)
      for (int k = 0; k < 16; k++) begin
        @(negedge clk); mu = 5'(m); tap = 4'(k);
        @(negedge clk);
        got[m][k] = coef;
        r = 127.0 * h((real'(k) - 8.0 + real'(m)/32.0) / SPS) / h(0.0);
        e = int'(coef) - $rtoi(r + (r >= 0 ? 0.5 : -0.5));
        checks++;
        if (e > 1 || e < -1) begin
          failures++; $display("FAIL mu%0d tap%0d: %0d expected %f", m, k, coef, r);
        end
      end
    checks++;
    if (got[0][8] != 127) begin failures++; $display("FAIL peak %0d", got[0][8]); end
    for (int m = 1; m < 32; m++)
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (got[m][k] - got[32-m][15-k] > 1 || got[m][k] - got[32-m][15-k] < -1) begin
          failures++; $display("FAIL symmetry mu%0d tap%0d", m, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
