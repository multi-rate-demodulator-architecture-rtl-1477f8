// carrier_nco: carrier tracking NCO, one 24-bit phase accumulator per channel.
//
// Once per epoch (update) the channel's accumulator advances by the carrier
// loop filter output scaled by K_T = 2^-kt: acc <= acc + (fine >>> kt).
// With the proportional-plus-integral loop filter ahead of it this makes
// the second-order, type-2 carrier loop. The 8 most significant bits of the
// accumulator, read combinationally for channel rch, are the phase estimate
// with 256 steps over +-pi and address the cos/sin table. It is advanced in
// every epoch, also when no phase estimate is made. Sizes follow the design
// description; flush clearing all channels is this design's choice.
module carrier_nco
  import mrd_pkg::*;
#(
  parameter int N_CH = NCH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic                    update,
  input  logic [$clog2(N_CH)-1:0] ch,
  input  logic signed [NCOW-1:0]  fine,
  input  logic [SHW-1:0]          kt,
  input  logic [$clog2(N_CH)-1:0] rch,
  output logic [7:0]              phase
);

  logic [NCOW-1:0] acc [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) acc[c] <= '0;
    end else if (flush) begin
      for (int c = 0; c < N_CH; c++) acc[c] <= '0;
    end else if (update) begin
      acc[ch] <= acc[ch] + NCOW'(fine >>> kt);
    end
  end

  assign phase = acc[rch][NCOW-1 -: 8];

endmodule
