// tb_input_buffer: random writes to random channels, each followed by a read
// of a random tap of a random channel, compared with a per-channel history kept by the
// testbench. Read data must appear one cycle after the address.
`timescale 1ns/1ps
module tb_input_buffer;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] wch = 0, rch = 0;
  logic [3:0] rtap = 0;
  cplx_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  cplx_t hist [32][$];

  input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1; wch = 5'($urandom_range(0, 31));
      wdata = '{i: sample_t'($urandom), q: sample_t'($urandom)};
      hist[wch].push_front(wdata);
      // then read a random tap of a random channel that holds 16 samples
      @(negedge clk); we = 0;
      rch = 5'($urandom_range(0, 31)); rtap = 4'($urandom);
      @(negedge clk);
      if (hist[rch].size() >= 16) begin
        checks++;
        if (rdata != hist[rch][rtap]) begin
          failures++;
          $display("FAIL ch%0d tap%0d: got %h expected %h", rch, rtap, rdata, hist[rch][rtap]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
