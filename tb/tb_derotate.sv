// tb_derotate: random samples and rotations. The result must equal
// x * exp(-j*theta) computed here in floating point to within one step,
// one cycle after in_valid; and a sample rotated by a known angle must come
// back to the original point.
`timescale 1ns/1ps
module tb_derotate;
  import mrd_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cplx_t x = '0, y;
  logic signed [7:0] cos_i = 0, sin_i = 0;
  int checks = 0, failures = 0;

  derotate dut (.*);
  always #5 clk = ~clk;

  function automatic int clip(input real v);
    int r; r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    return r > 127 ? 127 : (r < -128 ? -128 : r);
  endfunction

  initial begin
    real th, ei, eq, xi, xq;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      th = 2.0 * PI * real'($urandom_range(0, 255)) / 256.0;
      @(negedge clk);
      in_valid = 1;
      x = '{i: sample_t'($urandom_range(0, 160) - 80), q: sample_t'($urandom_range(0, 160) - 80)};
      cos_i = 8'(clip(127.0 * $cos(th))); sin_i = 8'(clip(127.0 * $sin(th)));
      xi = real'(x.i); xq = real'(x.q);
      ei = (xi * real'(cos_i) + xq * real'(sin_i)) / 128.0;
      eq = (xq * real'(cos_i) - xi * real'(sin_i)) / 128.0;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || int'(y.i) - clip(ei) > 1 || int'(y.i) - clip(ei) < -1 ||
          int'(y.q) - clip(eq) > 1 || int'(y.q) - clip(eq) < -1) begin
        failures++; $display("FAIL x=(%0d,%0d) th=%f: y=(%0d,%0d) expected (%f,%f)", x.i, x.q, th, y.i, y.q, ei, eq);
      end
    end
    // 60 at +30 degrees comes back to about (60, 0)
    @(negedge clk); in_valid = 1;
    x = '{i: sample_t'(52), q: sample_t'(30)};
    cos_i = 8'(110); sin_i = 8'(64);
    @(negedge clk); in_valid = 0;
    checks++;
    if (y.i < 58 || y.i > 61 || y.q < -1 || y.q > 1) begin failures++; $display("FAIL back-rotation (%0d,%0d)", y.i, y.q); end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid without in_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
