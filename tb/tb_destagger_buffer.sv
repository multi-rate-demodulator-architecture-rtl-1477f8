// tb_destagger_buffer: random appends to random channels; reads of random
// ages compared with a per-channel history kept here, the fill count
// (saturating at 8) checked each time, and flush emptying every channel.
`timescale 1ns/1ps
module tb_destagger_buffer;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, we = 0;
  logic [4:0] wch = 0, rch = 0;
  logic [2:0] rage = 0;
  logic [3:0] fill;
  cplx_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  cplx_t hist [32][$];

  destagger_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic read_chk(input int c, input int a);
    int exp_fill;
    @(negedge clk); we = 0; rch = 5'(c); rage = 3'(a);
    exp_fill = hist[c].size() > 8 ? 8 : hist[c].size();
    #1;
    checks++;
    if (int'(fill) != exp_fill) begin failures++; $display("FAIL fill ch%0d %0d vs %0d", c, fill, exp_fill); end
    @(negedge clk);
    if (a < hist[c].size()) begin
      checks++;
      if (rdata != hist[c][a]) begin failures++; $display("FAIL ch%0d age%0d", c, a); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1; wch = 5'($urandom_range(0, 7));
      wdata = '{i: sample_t'($urandom), q: sample_t'($urandom)};
      hist[wch].push_front(wdata);
      if (n % 2 == 0) read_chk($urandom_range(0, 7), $urandom_range(0, 7));
    end
    @(negedge clk); we = 0; flush = 1; @(negedge clk); flush = 0;
    for (int c = 0; c < 32; c++) hist[c].delete();
    for (int c = 0; c < 8; c++) read_chk(c, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
