// tb_phase_error_rom: every one of the 1024 cells against atan2 minus the
// quadrant's ideal phase (pi/4, 3pi/4, -3pi/4, -pi/4), in units of pi/128,
// computed here from a sample inside the cell; and symbols rotated by a known
// angle in each quadrant must give that angle.
`timescale 1ns/1ps
module tb_phase_error_rom;
  import mrd_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  sample_t i_mp = 0, q_mp = 0;
  logic signed [7:0] err;
  int checks = 0, failures = 0;

  phase_error_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    real x, y, opt, e;
    for (int a = -16; a < 16; a++)
      for (int b = -16; b < 16; b++) begin
        @(negedge clk);
        i_mp = sample_t'(a * 8 + 3 + $urandom_range(0, 1));
        q_mp = sample_t'(b * 8 + 3 + $urandom_range(0, 1));
        @(negedge clk);
        x = real'(a) + 0.5; y = real'(b) + 0.5;
        if (x > 0) opt = (y > 0) ? PI/4 : -PI/4; else opt = (y > 0) ? 3*PI/4 : -3*PI/4;
        e = ($atan2(y, x) - opt) * 128.0 / PI;
        checks++;
        if (real'(err) - e > 0.51 || real'(err) - e < -0.51) begin
          failures++; $display("FAIL cell (%0d,%0d): %0d vs %f", a, b, err, e);
        end
      end
    // 100-magnitude symbols at each ideal point rotated by +20 degrees
    for (int k = 0; k < 4; k++) begin
      real ang;
      ang = PI/4 + real'(k) * PI/2 + 20.0 * PI / 180.0;
      @(negedge clk);
      i_mp = sample_t'($rtoi(100.0 * $cos(ang))); q_mp = sample_t'($rtoi(100.0 * $sin(ang)));
      @(negedge clk);
      checks++;
      if (err < 12 || err > 16) begin failures++; $display("FAIL rotated quadrant %0d: %0d", k + 1, err); end
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
