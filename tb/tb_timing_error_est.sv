// tb_timing_error_est: random midpoints and transitions against the
// transition-polarity table: no sign change -> 0, rising (negative to
// positive) -> +T, falling -> -T, summed over I and Q; plus the two cases of
// a late and an early rising edge.
`timescale 1ns/1ps
module tb_timing_error_est;
  import mrd_pkg::*;
  sample_t mp_prev_i, tr_i, mp_cur_i, mp_prev_q, tr_q, mp_cur_q;
  logic signed [9:0] err;
  int checks = 0, failures = 0;

  timing_error_est dut (.*);

  function automatic int arm(input int p, input int t, input int c);
    if (p < 0 && c >= 0) return t;
    if (p >= 0 && c < 0) return -t;
    return 0;
  endfunction

  initial begin
    int e;
    for (int n = 0; n < 5000; n++) begin
      mp_prev_i = sample_t'($urandom); tr_i = sample_t'($urandom); mp_cur_i = sample_t'($urandom);
      mp_prev_q = sample_t'($urandom); tr_q = sample_t'($urandom); mp_cur_q = sample_t'($urandom);
      #1;
      e = arm(mp_prev_i, tr_i, mp_cur_i) + arm(mp_prev_q, tr_q, mp_cur_q);
      checks++;
      if (int'(err) != e) begin failures++; $display("FAIL %0d vs %0d", err, e); end
    end
    // late rising edge: transition sample already positive -> positive
    mp_prev_i = -50; tr_i = 12; mp_cur_i = 50; mp_prev_q = 40; tr_q = 45; mp_cur_q = 40; #1;
    checks++; if (err != 12) begin failures++; $display("FAIL late %0d", err); end
    // early rising edge -> negative
    tr_i = -9; #1;
    checks++; if (err != -9) begin failures++; $display("FAIL early %0d", err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
