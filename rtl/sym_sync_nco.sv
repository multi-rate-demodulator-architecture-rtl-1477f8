// sym_sync_nco: symbol sync NCO, one 24-bit phase accumulator per channel.
//
// The accumulator holds the position of the next interpolant inside the
// current input sample interval as a fraction of an input sample. Once per
// epoch (update) the channel's value p0 gives the timing offset of the first
// interpolant, mu_a = p0[23:19]. The NCO is then advanced by the step
//   step = ratio - (fine >>> kt)
// where ratio is the coarse re-sample ratio (interpolant period over input
// sample period, 0.703125 nominal) and fine the symbol sync loop filter
// output, scaled by K_T = 2^-kt. If this first update overflows, the current
// input samples support only one interpolant. Otherwise a second interpolant
// is made at mu_b = p1[23:19] and the NCO is updated again. The result is
// written back modulo 1. A positive loop output shortens the step, so the
// interpolants come sooner (the NCO speeds up).
//
// Timing: outputs are registered; valid pulses the cycle after update with
// mu_a, mu_b and two (two interpolants). flush clears every channel.
// The 24-bit word, the 5 MSB offset, the coarse/fine tuning and the one-or-two
// rule follow the design description. The sign convention of the fine term
// and the clamp of the step to [1/2, 1) of an input sample (so that never
// more than two or fewer than one interpolant are needed) are this design's
// choices.
module sym_sync_nco
  import mrd_pkg::*;
#(
  parameter int N_CH = NCH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic                    update,
  input  logic [$clog2(N_CH)-1:0] ch,
  input  logic [NCOW-1:0]         ratio,
  input  logic signed [NCOW-1:0]  fine,
  input  logic [SHW-1:0]          kt,
  output logic                    valid,
  output logic [MUW-1:0]          mu_a,
  output logic [MUW-1:0]          mu_b,
  output logic                    two
);

  logic [NCOW-1:0] acc [N_CH];
  logic [NCOW-1:0] p0, step;
  logic [NCOW:0]   s1;
  logic [NCOW-1:0] s2;
  logic signed [NCOW+1:0] step_w;

  always_comb begin
    p0     = acc[ch];
    step_w = $signed({2'b00, ratio}) - (NCOW+2)'(fine >>> kt);
    if (step_w < (NCOW+2)'(1 << (NCOW-1)))      step = NCOW'(1 << (NCOW-1));
    else if (step_w > (NCOW+2)'((1 << NCOW)-1)) step = '1;
    else                                        step = step_w[NCOW-1:0];
    s1 = {1'b0, p0} + {1'b0, step};
    s2 = s1[NCOW-1:0] + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) acc[c] <= '0;
      valid <= 1'b0;
      mu_a  <= '0;
      mu_b  <= '0;
      two   <= 1'b0;
    end else begin
      valid <= update;
      if (flush) begin
        for (int c = 0; c < N_CH; c++) acc[c] <= '0;
      end else if (update) begin
        mu_a <= p0[NCOW-1 -: MUW];
        mu_b <= s1[NCOW-1 -: MUW];
        two  <= !s1[NCOW];
        acc[ch] <= s1[NCOW] ? s1[NCOW-1:0] : s2;
      end
    end
  end

endmodule
