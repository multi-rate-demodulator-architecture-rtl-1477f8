// derotate: complex multiply that removes the estimated carrier phase.
//
// y = x * exp(-j*theta):
//   y.i = x.i*cos + x.q*sin,   y.q = x.q*cos - x.i*sin
// with cos/sin scaled by 127; products are summed, rounded (+64, >>7) and
// saturated to 8 bits. One cycle: y and out_valid are registered from x and
// in_valid. The equation follows the design description; widths and
// rounding are this design's choices.
module derotate
  import mrd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                x,
  input  logic signed [CW-1:0] cos_i,
  input  logic signed [CW-1:0] sin_i,
  output logic                 out_valid,
  output cplx_t                y
);

  logic signed [31:0] ri, rq;

  always_comb begin
    ri = 32'(x.i * cos_i) + 32'(x.q * sin_i);
    rq = 32'(x.q * cos_i) - 32'(x.i * sin_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= '{i: sat_sample((ri + 32'sd64) >>> 7), q: sat_sample((rq + 32'sd64) >>> 7)};
    end
  end

endmodule
