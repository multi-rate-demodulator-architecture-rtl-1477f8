// resample_fir: the four re-sampling (interpolation + matched) filters.
//
// One input sample per cycle (I and Q) is multiplied by two coefficients,
// ca for interpolant A and cb for interpolant B, so four multiply-accumulate
// units produce A.I, A.Q, B.I and B.Q together in TAPS cycles. tap_valid
// marks a cycle that carries a tap; first marks the first tap of a new set.
// On the cycle after the last tap, done pulses for one cycle and ya/yb hold
// the results until the next done: accumulator + 64, shifted right by 7 and
// saturated to 8 bits (coefficients are scaled by 127). A new set may start
// on the cycle right after the last tap, so sets run back to back, one per
// 16-cycle epoch. The 16 taps and two outputs per arm follow the design
// description; the word widths and scaling are this design's choices.
module resample_fir
  import mrd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tap_valid,
  input  logic                 first,
  input  cplx_t                x,
  input  logic signed [CW-1:0] ca,
  input  logic signed [CW-1:0] cb,
  output cplx_t                ya,
  output cplx_t                yb,
  output logic                 done
);

  localparam int AW = DW + CW + $clog2(TAPS);

  logic signed [AW-1:0] acc_ai, acc_aq, acc_bi, acc_bq;
  logic signed [AW-1:0] n_ai, n_aq, n_bi, n_bq;
  logic [3:0]           cnt;

  function automatic sample_t scale(input logic signed [AW-1:0] a);
    logic signed [31:0] w;
    w = 32'(a);
    return sat_sample((w + 32'sd64) >>> 7);
  endfunction

  always_comb begin
    n_ai = (first ? '0 : acc_ai) + AW'(x.i * ca);
    n_aq = (first ? '0 : acc_aq) + AW'(x.q * ca);
    n_bi = (first ? '0 : acc_bi) + AW'(x.i * cb);
    n_bq = (first ? '0 : acc_bq) + AW'(x.q * cb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {acc_ai, acc_aq, acc_bi, acc_bq} <= '0;
      cnt  <= '0;
      done <= 1'b0;
      ya   <= '0;
      yb   <= '0;
    end else begin
      done <= 1'b0;
      if (tap_valid) begin
        acc_ai <= n_ai;
        acc_aq <= n_aq;
        acc_bi <= n_bi;
        acc_bq <= n_bq;
        cnt    <= first ? 4'd1 : cnt + 1'b1;
        if (!first && cnt == 4'(TAPS - 1)) begin
          done <= 1'b1;
          ya   <= '{i: scale(n_ai), q: scale(n_aq)};
          yb   <= '{i: scale(n_bi), q: scale(n_bq)};
        end
      end
    end
  end

endmodule
