// tb_loop_filter: proportional-plus-integral filter against a model written
// here: per-channel integrator, power-of-two gains as shifts, saturation to
// 24 bits, zero-order hold of each channel's output, and flush. A constant
// error must make the output grow by err*2^(14-ki) per update (type-2 loop).
`timescale 1ns/1ps
module tb_loop_filter;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, update = 0;
  logic [4:0] ch = 0, rch = 0, kl = 0, ki = 0;
  logic signed [9:0] err = 0;
  logic signed [23:0] out;
  int checks = 0, failures = 0;
  longint integ [32], outm [32];

  loop_filter #(.EW (10)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint sat(input longint v);
    return v > 8388607 ? 8388607 : (v < -8388608 ? -8388608 : v);
  endfunction

  task automatic upd(input int c, input int e, input int l, input int i);
    longint e24;
    @(negedge clk); update = 1; ch = 5'(c); err = 10'(e); kl = 5'(l); ki = 5'(i);
    e24 = longint'(e) * 16384;
    integ[c] = sat(integ[c] + (e24 >>> i));
    outm[c]  = sat(integ[c] + (e24 >>> l));
    @(negedge clk); update = 0;
  endtask

  task automatic chk_all();
    for (int c = 0; c < 32; c++) begin
      rch = 5'(c); #1;
      checks++;
      if (longint'(out) != outm[c]) begin
        failures++; $display("FAIL ch%0d: %0d expected %0d", c, out, outm[c]);
      end
    end
  endtask

  initial begin
    longint prev;
    for (int c = 0; c < 32; c++) begin integ[c] = 0; outm[c] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // constant error: ramp of the integrator
    prev = 0;
    for (int n = 0; n < 20; n++) begin
      upd(3, 100, 4, 10);
      rch = 3; #1;
      if (n > 0) begin
        checks++;
        if (longint'(out) - prev != 100 * 16) begin failures++; $display("FAIL ramp step %0d", longint'(out) - prev); end
      end
      prev = longint'(out);
    end
    for (int n = 0; n < 3000; n++) begin
      upd($urandom_range(0, 31), int'($signed(10'($urandom))), $urandom_range(0, 20), $urandom_range(0, 23));
      if (n % 100 == 0) chk_all();
    end
    // saturation: large error with no shift
    for (int n = 0; n < 700; n++) upd(7, 511, 0, 0);
    chk_all();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int c = 0; c < 32; c++) begin integ[c] = 0; outm[c] = 0; end
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
