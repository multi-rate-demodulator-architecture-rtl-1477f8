// tb_resample_fir: sets of 16 random samples and coefficients run back to
// back, one tap per cycle. The four outputs are compared with dot products
// computed here, rounded (+64, >>7) and saturated; done must come exactly one
// cycle after the last tap of each set. Some sets use large values to reach
// saturation.
`timescale 1ns/1ps
module tb_resample_fir;
  import mrd_pkg::*;
  logic clk = 0, rst_n = 0, tap_valid = 0, first = 0, done;
  cplx_t x = '0, ya, yb;
  logic signed [7:0] ca = 0, cb = 0;
  int checks = 0, failures = 0;
  int exp_ai [$], exp_aq [$], exp_bi [$], exp_bq [$];
  int last_tap_cyc [$];
  int cyc = 0;

  resample_fir dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic int sat(input int v);
    v = (v + 64) >>> 7;
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  always @(negedge clk) if (rst_n && done) begin
    int e;
    checks += 5;
    e = last_tap_cyc.pop_front();
    if (cyc != e + 1) begin failures++; $display("FAIL done at %0d, last tap %0d", cyc, e); end
    if (int'(ya.i) != exp_ai.pop_front()) begin failures++; $display("FAIL A.I"); end
    if (int'(ya.q) != exp_aq.pop_front()) begin failures++; $display("FAIL A.Q"); end
    if (int'(yb.i) != exp_bi.pop_front()) begin failures++; $display("FAIL B.I"); end
    if (int'(yb.q) != exp_bq.pop_front()) begin failures++; $display("FAIL B.Q"); end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      int ai, aq, bi, bq;
      bit big;
      ai = 0; aq = 0; bi = 0; bq = 0;
      big = (s % 10 == 9);
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        tap_valid = 1; first = (k == 0);
        x  = '{i: sample_t'(big ? 100 + $urandom_range(0, 27) : $urandom),
               q: sample_t'(big ? -100 - $urandom_range(0, 28) : $urandom)};
        ca = 8'(big ? 127 : $urandom); cb = 8'($urandom);
        ai += int'(x.i) * int'(ca); aq += int'(x.q) * int'(ca);
        bi += int'(x.i) * int'(cb); bq += int'(x.q) * int'(cb);
      end
      exp_ai.push_back(sat(ai)); exp_aq.push_back(sat(aq));
      exp_bi.push_back(sat(bi)); exp_bq.push_back(sat(bq));
      last_tap_cyc.push_back(cyc);
      // occasionally leave a gap between sets
      if (s % 3 == 0) begin @(negedge clk); tap_valid = 0; first = 0; end
    end
    @(negedge clk); tap_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_ai.size() != 0) begin failures++; $display("FAIL: %0d sets without done", exp_ai.size()); end
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
