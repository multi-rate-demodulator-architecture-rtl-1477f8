// tb_sincos_rom: all 256 phases against cos and sin computed here (127 *
// cos/sin of 2*pi*a/256, within one step), with the one-cycle read.
`timescale 1ns/1ps
module tb_sincos_rom;
  import mrd_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  logic [7:0] phase = 0;
  logic signed [7:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  sincos_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    real c, s;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); phase = 8'(a);
      @(negedge clk);
      c = 127.0 * $cos(2.0*PI*real'(a)/256.0);
      s = 127.0 * $sin(2.0*PI*real'(a)/256.0);
      checks += 2;
      if (real'(cos_o) - c > 1.0 || real'(cos_o) - c < -1.0) begin failures++; $display("FAIL cos %0d: %0d vs %f", a, cos_o, c); end
      if (real'(sin_o) - s > 1.0 || real'(sin_o) - s < -1.0) begin failures++; $display("FAIL sin %0d: %0d vs %f", a, sin_o, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
