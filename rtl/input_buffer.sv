// input_buffer: per-channel history of channelizer samples for the FIR.
//
// A dual-port RAM of NCH x TAPS complex samples (I and Q side by side). Each
// channel owns TAPS words used as a circular buffer with its own write
// pointer. The write port stores one new sample of channel wch per epoch; the
// read port returns the sample of channel rch that is rtap samples old
// (rtap = 0 is the newest), one cycle after the address (registered read).
// The design description calls for a dual-port RAM that stores the samples
// the filters need; the circular addressing and the reset of the pointers are
// this design's choices. The RAM contents have no reset: a channel's filter
// output is meaningful once TAPS samples have been written.
module input_buffer
  import mrd_pkg::*;
#(
  parameter int N_CH  = NCH,
  parameter int DEPTH = TAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(N_CH)-1:0]  wch,
  input  cplx_t                    wdata,
  input  logic [$clog2(N_CH)-1:0]  rch,
  input  logic [$clog2(DEPTH)-1:0] rtap,
  output cplx_t                    rdata
);

  localparam int AW = $clog2(DEPTH);

  cplx_t           mem [N_CH*DEPTH];
  logic [AW-1:0]   wp  [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) wp[c] <= '0;
    end else if (we) begin
      wp[wch] <= wp[wch] + 1'b1;
    end
  end

  // RAM ports: no reset on the storage.
  always_ff @(posedge clk) begin
    if (we) mem[{wch, AW'(wp[wch] + 1'b1)}] <= wdata;
    rdata <= mem[{rch, AW'(wp[rch] - rtap)}];
  end

endmodule
