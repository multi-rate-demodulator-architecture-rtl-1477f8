// tb_symbol_decision: random midpoint sign bits from random channels. Each
// decision must give the XOR of each arm's two sign bits, the I bit on the
// TDM line in the cycle after dec_valid and the Q bit in the next, each with a
// one-cycle strobe and the channel index, and the same bits on that
// channel's own data/strobe line and on no other strobe line.
`timescale 1ns/1ps
module tb_symbol_decision;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, dec_valid = 0;
  logic [4:0] ch = 0, dout_ch;
  logic msb_i_cur = 0, msb_i_prev = 0, msb_q_cur = 0, msb_q_prev = 0;
  logic dout, dclk;
  logic [31:0] nbc_data, nbc_clk;
  int checks = 0, failures = 0;

  symbol_decision dut (.*);
  always #5 clk = ~clk;

  initial begin
    bit bi, bq; int c;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      dec_valid = 1; c = $urandom_range(0, 31); ch = 5'(c);
      {msb_i_cur, msb_i_prev, msb_q_cur, msb_q_prev} = 4'($urandom);
      bi = msb_i_cur ^ msb_i_prev; bq = msb_q_cur ^ msb_q_prev;
      @(negedge clk); dec_valid = 0;
      checks++;
      if (!dclk || dout != bi || dout_ch != 5'(c) || nbc_clk != (32'd1 << c) || nbc_data[c] != bi) begin
        failures++; $display("FAIL I bit ch%0d", c);
      end
      @(negedge clk);
      checks++;
      if (!dclk || dout != bq || dout_ch != 5'(c) || nbc_clk != (32'd1 << c) || nbc_data[c] != bq) begin
        failures++; $display("FAIL Q bit ch%0d", c);
      end
      if ($urandom_range(0, 1)) begin
        @(negedge clk);
        checks++;
        if (dclk || nbc_clk != 0) begin failures++; $display("FAIL strobe when idle"); end
      end
    end
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
