// tb_mrd_top: end-to-end test of the multi-rate demodulator.
//
// A generator plays the channelizer: it builds differentially encoded OQPSK
// baseband with square-root-raised-cosine pulses (roll-off 0.40625), Q
// delayed by half a symbol, sampled at 1.44/1.024 samples per symbol with a
// per-channel symbol-rate offset, timing phase, carrier phase and carrier
// frequency offset. The test runs the wideband mode, switches on line to 32
// narrowband channels, and then back to wideband. For every channel the
// decoded I and Q bits are aligned with the transmitted ones (the decoder's
// symbol numbering is unknown) after an acquisition time and must then all
// match. It also counts the mechanisms of the design: epochs with one and
// with two interpolants, bypassed and processed epochs, the mode switches,
// and data on the TDM line and on the per-channel lines; each must happen.
// All sizes are the design's defaults.
`timescale 1ns/1ps
module tb_mrd_top;
  import mrd_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam real ALPHA = 0.40625;
  localparam real SPS   = 1.40625;          // input samples per symbol
  localparam int  NSYM  = 1100;             // symbols per channel per phase
  localparam int  MAXB  = 1300;
  localparam int  SKIP  = 600;              // acquisition, symbols

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_strobe = 1'b0, in_sof = 1'b0, nbc_mode = 1'b0;
  sample_t in_i = '0, in_q = '0;
  logic dout, dclk;
  logic [CHW-1:0] dout_ch;
  logic [NCH-1:0] nbc_data, nbc_clk;

  mrd_top u_dut (
    .clk, .rst_n, .in_strobe, .in_sof, .in_i, .in_q, .nbc_mode,
    .ratio (RATIO_NOM),
    .ss_kl (5'd2), .ss_ki (5'd9), .ss_kt (5'd0),
    .ct_kl (5'd2), .ct_ki (5'd8),  .ct_kt (5'd2),
    .dout, .dclk, .dout_ch, .nbc_data, .nbc_clk
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- generator
  bit  txi [NCH][MAXB];      // differential data bits
  bit  txq [NCH][MAXB];
  bit  lvi [NCH][MAXB];      // transmitted levels (1 = negative)
  bit  lvq [NCH][MAXB];
  real tphase [NCH], rate [NCH], cphase [NCH], cfreq [NCH];

  function automatic real srrc(input real ts);
    real num, den;
    if (ts < 1e-9 && ts > -1e-9) return 1.0 - ALPHA + 4.0 * ALPHA / PI;
    if ((4.0*ALPHA*ts - 1.0) < 1e-9 && (4.0*ALPHA*ts - 1.0) > -1e-9 ||
        (4.0*ALPHA*ts + 1.0) < 1e-9 && (4.0*ALPHA*ts + 1.0) > -1e-9)
      return ALPHA / $sqrt(2.0) * ((1.0 + 2.0/PI) * $sin(PI/(4.0*ALPHA)) +
                                   (1.0 - 2.0/PI) * $cos(PI/(4.0*ALPHA)));
    num = $sin(PI*ts*(1.0-ALPHA)) + 4.0*ALPHA*ts*$cos(PI*ts*(1.0+ALPHA));
    den = PI*ts*(1.0 - (4.0*ALPHA*ts)*(4.0*ALPHA*ts));
    return num / den;
  endfunction

  task automatic new_data(input int c);
    tphase[c] = real'($urandom_range(0, 999)) / 1000.0;
    rate[c]   = 1.0 + (real'($urandom_range(0, 400)) - 200.0) * 1e-6;
    cphase[c] = (real'($urandom_range(0, 600)) - 300.0) / 1000.0;  // rad
    cfreq[c]  = (real'($urandom_range(0, 200)) - 100.0) * 2e-5;    // rad/sample
    lvi[c][0] = 1'($urandom); lvq[c][0] = 1'($urandom);
    for (int k = 1; k < MAXB; k++) begin
      txi[c][k] = 1'($urandom); txq[c][k] = 1'($urandom);
      lvi[c][k] = lvi[c][k-1] ^ txi[c][k];
      lvq[c][k] = lvq[c][k-1] ^ txq[c][k];
    end
  endtask

  // Sample n of channel c; symbol k of I peaks at time k, of Q at k + 1/2.
  task automatic gen(input int c, input int n, output sample_t oi, output sample_t oq);
    real ts, si, sq, ri, rq, ph;
    int  k0;
    ts = real'(n) * rate[c] / SPS + tphase[c];
    k0 = $rtoi(ts);
    si = 0.0; sq = 0.0;
    for (int k = k0 - 7; k <= k0 + 8; k++) begin
      if (k >= 0 && k < MAXB) begin
        si += (lvi[c][k] ? -40.0 : 40.0) * srrc(ts - real'(k));
        sq += (lvq[c][k] ? -40.0 : 40.0) * srrc(ts - real'(k) - 0.5);
      end
    end
    si = si / srrc(0.0); sq = sq / srrc(0.0);
    ph = cphase[c] + cfreq[c] * real'(n);
    ri = si * $cos(ph) - sq * $sin(ph);
    rq = si * $sin(ph) + sq * $cos(ph);
    oi = sample_t'($rtoi(ri));
    oq = sample_t'($rtoi(rq));
  endtask

  // ---------------------------------------------------------- receiver log
  bit rxi [NCH][MAXB];
  bit rxq [NCH][MAXB];
  int nrx [NCH];
  bit half [NCH];
  int n_tdm = 0, n_lines = 0, n_swap = 0;

  always @(negedge clk) begin
    if (dclk) begin
      n_tdm++;
      if (!half[dout_ch]) rxi[dout_ch][nrx[dout_ch]] = dout;
      else begin
        rxq[dout_ch][nrx[dout_ch]] = dout;
        if (nrx[dout_ch] < MAXB - 1) nrx[dout_ch]++;
      end
      half[dout_ch] = !half[dout_ch];
      if (nbc_clk[dout_ch] && nbc_data[dout_ch] == dout) n_lines++;
    end
  end

  // ---------------------------------------------------------- mechanisms
  int n_one = 0, n_two = 0, n_bypass = 0, n_proc = 0, n_flush = 0, n_drop = 0;
  always @(negedge clk) if (rst_n) begin
    if (u_dut.nco_valid) begin
      if (u_dut.two) n_two++; else n_one++;
    end
    if (u_dut.bypass_ev) n_bypass++;
    if (u_dut.proc_ev)   n_proc++;
    if (u_dut.flush)     n_flush++;
    if (u_dut.fir_done && u_dut.drop_next) n_drop++;
  end

  // Align received with transmitted bits and count errors after SKIP symbols.
  task automatic check_channel(input int c, input int ntx, input string tag);
    int best_lag, best_err, err, nchk;
    bit best_swap;
    best_lag = 0; best_err = 1 << 30; best_swap = 0;
    // Direct mapping, or the one a 90 degree carrier lock gives: the I arm
    // then carries Q's bits and the Q arm the next symbol's I bits.
    for (int sw = 0; sw < 2; sw++) begin
      for (int lag = -6; lag <= 40; lag++) begin
        err = 0;
        for (int m = SKIP; m < nrx[c] - 1; m++) begin
          if (m + lag >= 1 && m + lag + 1 < ntx) begin
            if (sw == 0)
              err += int'(rxi[c][m] != txi[c][m+lag]) + int'(rxq[c][m] != txq[c][m+lag]);
            else
              err += int'(rxi[c][m] != txq[c][m+lag]) + int'(rxq[c][m] != txi[c][m+lag+1]);
          end
        end
        if (err < best_err) begin best_err = err; best_lag = lag; best_swap = sw[0]; end
      end
    end
    nchk = 0;
    for (int m = SKIP; m < nrx[c] - 1; m++) if (m + best_lag >= 1 && m + best_lag + 1 < ntx) nchk++;
    if (best_swap) n_swap++;
    checks++;
    if (best_err != 0 || nchk < (ntx - SKIP) / 2) begin
      failures++;
      $display("FAIL %s ch%0d: %0d bit errors in %0d symbols (lag %0d, swap %0d, %0d decoded)",
               tag, c, best_err, nchk, best_lag, best_swap, nrx[c]);
    end
  endtask

  task automatic clear_log();
    for (int c = 0; c < NCH; c++) begin nrx[c] = 0; half[c] = 0; end
  endtask

  // One input sample per 16 clocks.
  task automatic send(input sample_t si, input sample_t sq, input bit sof);
    @(negedge clk);
    in_strobe = 1'b1; in_i = si; in_q = sq; in_sof = sof;
    @(negedge clk);
    in_strobe = 1'b0; in_sof = 1'b0;
    repeat (14) @(negedge clk);
  endtask

  task automatic run_wbc(input string tag);
    int nsamp;
    sample_t si, sq;
    clear_log();
    new_data(0);
    nsamp = $rtoi(real'(NSYM) * SPS);
    nbc_mode = 1'b0;
    for (int n = 0; n < nsamp; n++) begin
      gen(0, n, si, sq);
      send(si, sq, 1'b1);
    end
    repeat (64) @(negedge clk);
    check_channel(0, NSYM, tag);
    $display("%s: %0d symbols decoded", tag, nrx[0]);
  endtask

  task automatic run_nbc();
    int nsamp;
    sample_t si, sq;
    clear_log();
    for (int c = 0; c < NCH; c++) new_data(c);
    nsamp = $rtoi(real'(NSYM) * SPS);
    nbc_mode = 1'b1;
    for (int n = 0; n < nsamp; n++)
      for (int c = 0; c < NCH; c++) begin
        gen(c, n, si, sq);
        send(si, sq, c == 0);
      end
    repeat (64) @(negedge clk);
    for (int c = 0; c < NCH; c++) check_channel(c, NSYM, "NBC");
    $display("NBC: channel 0 %0d, channel 31 %0d symbols decoded", nrx[0], nrx[NCH-1]);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    run_wbc("WBC");
    run_nbc();
    run_wbc("WBC again");
    $display("channels locked with I/Q exchanged (90 degree carrier ambiguity): %0d", n_swap);
    $display("events: one=%0d two=%0d bypass=%0d processed=%0d mode_switch=%0d dropped=%0d tdm_bits=%0d line_bits=%0d",
             n_one, n_two, n_bypass, n_proc, n_flush, n_drop, n_tdm, n_lines);
    checks += 7;
    if (n_one == 0)    begin failures++; $display("FAIL: no one-interpolant epoch"); end
    if (n_two == 0)    begin failures++; $display("FAIL: no two-interpolant epoch"); end
    if (n_bypass == 0) begin failures++; $display("FAIL: no bypassed epoch"); end
    if (n_proc == 0)   begin failures++; $display("FAIL: no processed symbol"); end
    if (n_flush < 2)   begin failures++; $display("FAIL: mode switches %0d", n_flush); end
    if (n_drop < 2)    begin failures++; $display("FAIL: in-flight sets dropped %0d", n_drop); end
    if (n_lines == 0 || n_lines != n_tdm) begin failures++; $display("FAIL: per-channel lines %0d vs TDM %0d", n_lines, n_tdm); end
    // Average interpolant rate: 2 per symbol = 1/0.703125 per epoch.
    checks++;
    if (real'(n_one + 2*n_two) / real'(n_one + n_two) < 1.40 ||
        real'(n_one + 2*n_two) / real'(n_one + n_two) > 1.445) begin
      failures++;
      $display("FAIL: interpolants per epoch %f", real'(n_one + 2*n_two) / real'(n_one + n_two));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
