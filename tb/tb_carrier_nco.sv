// tb_carrier_nco: per-channel phase accumulators against a model written
// here: acc += fine >>> kt modulo 2^24, phase = top 8 bits. Also a constant
// input must make the phase wrap through +-pi, and flush clears all.
`timescale 1ns/1ps
module tb_carrier_nco;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, update = 0;
  logic [4:0] ch = 0, rch = 0, kt = 0;
  logic signed [23:0] fine = 0;
  logic [7:0] phase;
  int checks = 0, failures = 0;
  longint acc [32];

  carrier_nco dut (.*);
  always #5 clk = ~clk;

  task automatic upd(input int c, input int f, input int k);
    @(negedge clk); update = 1; ch = 5'(c); fine = 24'(f); kt = 5'(k);
    acc[c] = (acc[c] + (longint'(f) >>> k)) & 64'hFF_FFFF;
    @(negedge clk); update = 0;
  endtask

  task automatic chk_all();
    for (int c = 0; c < 32; c++) begin
      rch = 5'(c); #1;
      checks++;
      if (phase != 8'(acc[c] >> 16)) begin
        failures++; $display("FAIL ch%0d: %0d expected %0d", c, phase, acc[c] >> 16);
      end
    end
  endtask

  initial begin
    bit wrapped;
    for (int c = 0; c < 32; c++) acc[c] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    wrapped = 0;
    for (int n = 0; n < 300; n++) begin
      upd(9, 65536 * 3, 0);       // 3 phase steps per update
      rch = 9; #1;
      if (phase == 8'h7F || phase == 8'h80 || phase == 8'h81) wrapped = 1;
    end
    checks++;
    if (!wrapped) begin failures++; $display("FAIL: phase never reached +-pi"); end
    for (int n = 0; n < 3000; n++) begin
      upd($urandom_range(0, 31), int'($signed(24'($urandom))), $urandom_range(0, 15));
      if (n % 100 == 0) chk_all();
    end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int c = 0; c < 32; c++) acc[c] = 0;
    chk_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
