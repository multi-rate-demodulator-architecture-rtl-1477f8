// destagger_buffer: recent derotated interpolants of every channel.
//
// OQPSK staggers Q by half a symbol, and the re-sampling filters deliver one
// or two interpolants per epoch, so the samples a symbol needs (previous
// midpoint, transition and current midpoint of each arm) arrive spread over
// several epochs. This dual-port RAM keeps the last DEPTH interpolants of
// each channel in a circular buffer with a per-channel write pointer and a
// fill count. The write port appends wdata to channel wch. The read port
// returns the interpolant of channel rch that is rage positions older than
// the newest (rage = 0 is the newest), one cycle after the address; fill
// gives how many valid interpolants channel rch holds (saturating at DEPTH),
// combinationally, so the controller can skip processing when the samples it
// needs are not yet resident. flush empties every channel.
// The buffer's purpose and dual-port RAM follow the design description; the
// depth of 8 and the addressing are this design's choices.
module destagger_buffer
  import mrd_pkg::*;
#(
  parameter int N_CH  = NCH,
  parameter int DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       we,
  input  logic [$clog2(N_CH)-1:0]    wch,
  input  cplx_t                      wdata,
  input  logic [$clog2(N_CH)-1:0]    rch,
  input  logic [$clog2(DEPTH)-1:0]   rage,
  output cplx_t                      rdata,
  output logic [$clog2(DEPTH):0]     fill
);

  localparam int AW = $clog2(DEPTH);

  cplx_t           mem [N_CH*DEPTH];
  logic [AW-1:0]   wp  [N_CH];
  logic [AW:0]     cnt [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        wp[c]  <= '0;
        cnt[c] <= '0;
      end
    end else if (flush) begin
      for (int c = 0; c < N_CH; c++) begin
        wp[c]  <= '0;
        cnt[c] <= '0;
      end
    end else if (we) begin
      wp[wch] <= wp[wch] + 1'b1;
      if (cnt[wch] != (AW+1)'(DEPTH)) cnt[wch] <= cnt[wch] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[{wch, AW'(wp[wch] + 1'b1)}] <= wdata;
    rdata <= mem[{rch, AW'(wp[rch] - rage)}];
  end

  assign fill = cnt[rch];

endmodule
