// rs_coef_rom: re-sampling filter coefficient look-up (512 x 8).
//
// 32 coefficient sets of 16 taps, one set per 5-bit timing offset mu from
// the symbol sync NCO. Address = {mu, tap}; data is registered (one cycle).
// Set mu, tap k holds the combined interpolation/matched filter response
//   c(mu,k) = round(127 * g((k - 8 + mu/32) / SPS))
// where g is a square-root-raised-cosine pulse normalised to g(0) = 1, time
// in symbols, SPS = 1.44/1.024 = 1.40625 input samples per symbol and
// roll-off ALPHA. Tap 0 multiplies the newest input sample, so the filter
// output for offset mu is the matched-filtered signal 8 - mu/32 input
// samples before the newest one. The table size, 32 sets of 16 taps and the
// square-root-raised-cosine shaping follow the design description; the
// roll-off (0.40625, the largest one whose bandwidth fits the 1.44 MHz
// complex sample rate), the peak scaling and the tap-to-time mapping are this
// design's choices. Change the function to load a different pulse shape.
module rs_coef_rom
  import mrd_pkg::*;
#(
  parameter real ALPHA = 0.40625,
  parameter real SPS   = 1.40625
) (
  input  logic                 clk,
  input  logic [MUW-1:0]       mu,
  input  logic [3:0]           tap,
  output logic signed [CW-1:0] coef
);

  typedef logic signed [CW-1:0] rom_t [512];

  function automatic real srrc(input real ts, input real a);
    real pi, num, den;
    pi = 3.14159265358979;
    if (ts < 1.0e-9 && ts > -1.0e-9)
      return 1.0 - a + 4.0 * a / pi;
    if ((4.0 * a * ts - 1.0) < 1.0e-9 && (4.0 * a * ts - 1.0) > -1.0e-9 ||
        (4.0 * a * ts + 1.0) < 1.0e-9 && (4.0 * a * ts + 1.0) > -1.0e-9)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    num = $sin(pi * ts * (1.0 - a)) + 4.0 * a * ts * $cos(pi * ts * (1.0 + a));
    den = pi * ts * (1.0 - (4.0 * a * ts) * (4.0 * a * ts));
    return num / den;
  endfunction

  function automatic rom_t gen_table();
    rom_t r;
    real  g0, v;
    g0 = srrc(0.0, ALPHA);
    for (int m = 0; m < 32; m++) begin
      for (int k = 0; k < 16; k++) begin
        v = 127.0 * srrc((real'(k) - 8.0 + real'(m) / 32.0) / SPS, ALPHA) / g0;
        r[m*16 + k] = CW'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
      end
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_table();

  always_ff @(posedge clk) coef <= ROM[{mu, tap}];

endmodule
