// tb_sym_sync_nco: the NCO against a model written here. Random channels,
// loop outputs and K_T shifts; each update is checked for the one-or-two
// decision and both timing offsets one cycle later. With no fine tune the
// NCO must give 1/0.703125 interpolants per epoch on average (2 per symbol
// at 1.44/1.024 input samples per symbol), and a large fine tune must be
// clamped so that one or two interpolants still suffice. flush clears all.
`timescale 1ns/1ps
module tb_sym_sync_nco;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, update = 0, valid, two;
  logic [4:0] ch = 0, mu_a, mu_b;
  logic [23:0] ratio = RATIO_NOM;
  logic signed [23:0] fine = 0;
  logic [4:0] kt = 0;
  int checks = 0, failures = 0;
  longint acc [32];

  sym_sync_nco dut (.*);
  always #5 clk = ~clk;

  task automatic step_model(input int c, output int ea, output int eb, output bit etwo);
    longint st, p1;
    st = longint'(ratio) - (longint'(fine) >>> kt);
    if (st < 64'sd8388608) st = 8388608;
    if (st > 64'sd16777215) st = 16777215;
    ea = int'(acc[c] >> 19);
    p1 = acc[c] + st;
    eb = int'((p1 % 16777216) >> 19);
    etwo = (p1 < 16777216);
    acc[c] = etwo ? (p1 + st) % 16777216 : p1 - 16777216;
  endtask

  task automatic one_update(input int c);
    int ea, eb; bit et;
    @(negedge clk); update = 1; ch = 5'(c);
    step_model(c, ea, eb, et);
    @(negedge clk); update = 0;
    checks++;
    if (!valid || two != et || mu_a != 5'(ea) || (et && mu_b != 5'(eb))) begin
      failures++;
      $display("FAIL ch%0d: two %0d/%0d mu_a %0d/%0d mu_b %0d/%0d", c, two, et, mu_a, ea, mu_b, eb);
    end
  endtask

  initial begin
    int n1, n2;
    for (int c = 0; c < 32; c++) acc[c] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // nominal rate, channel 5 only
    n1 = 0; n2 = 0;
    for (int n = 0; n < 1024; n++) begin
      one_update(5);
      if (two) n2++; else n1++;
    end
    checks++;
    // 1024 epochs at 0.703125 -> 1456.35 interpolants
    if (n1 + 2*n2 < 1455 || n1 + 2*n2 > 1458) begin
      failures++; $display("FAIL rate: %0d interpolants in 1024 epochs", n1 + 2*n2);
    end
    // random channels, fine tune and shifts (some large enough to clamp)
    for (int n = 0; n < 3000; n++) begin
      fine = 24'($urandom);
      kt = 5'($urandom_range(0, 12));
      one_update($urandom_range(0, 31));
    end
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int c = 0; c < 32; c++) acc[c] = 0;
    fine = 0; kt = 0;
    for (int c = 0; c < 32; c++) one_update(c);
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
