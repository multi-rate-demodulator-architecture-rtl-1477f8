// tb_epoch_sequencer: checks epoch count, channel index and mode switching.
// Strobes come every 16 clocks. In wideband mode every epoch is channel 0;
// in narrowband mode channels run 0..31 with in_sof on channel 0. The mode
// request is raised in the middle of a frame and must take effect only at
// the next channel-0 epoch, with flush for that one epoch.
`timescale 1ns/1ps
module tb_epoch_sequencer;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, in_strobe = 0, in_sof = 0, nbc_mode = 0;
  logic [3:0] t;
  logic epoch_start, nbc, flush;
  logic [CHW-1:0] ch;
  int checks = 0, failures = 0;

  epoch_sequencer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One epoch: strobe, then verify t runs 0..15 with the expected channel.
  task automatic epoch(input bit sof, input int exp_ch, input bit exp_nbc, input bit exp_flush);
    @(negedge clk); in_strobe = 1; in_sof = sof;
    @(negedge clk); in_strobe = 0; in_sof = 0;
    chk(epoch_start && t == 0, "epoch_start with t=0");
    chk(ch == CHW'(exp_ch), $sformatf("channel %0d expected %0d", ch, exp_ch));
    chk(nbc == exp_nbc, "mode");
    chk(flush == exp_flush, $sformatf("flush %0d expected %0d", flush, exp_flush));
    for (int k = 1; k < 15; k++) begin
      @(negedge clk);
      chk(!epoch_start && t == 4'(k) && !flush, "mid-epoch count");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5; n++) epoch(1, 0, 0, 0);
    // Request NBC mode: takes effect at once (every WBC epoch is a frame).
    nbc_mode = 1;
    epoch(1, 0, 1, 1);
    for (int c = 1; c < 32; c++) epoch(0, c, 1, 0);
    for (int c = 0; c < 10; c++) epoch(c == 0, c, 1, 0);
    // Request WBC in mid frame: channels 10..31 stay NBC.
    nbc_mode = 0;
    for (int c = 10; c < 32; c++) epoch(0, c, 1, 0);
    epoch(1, 0, 0, 1);
    epoch(0, 0, 0, 0);
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
