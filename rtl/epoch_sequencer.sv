// epoch_sequencer: epoch and channel timing of the demodulator.
//
// The system clock runs at 16 times the input sample rate, so every input
// sample owns an epoch of 16 clocks. A pulse on in_strobe marks a new
// channelizer sample and restarts the epoch count at 0; between strobes the
// count runs freely from 0 to 15. In narrowband mode the samples arrive
// channel 0, 1, ... 31, 0, ... and the channel index advances on each
// strobe; in_sof marks a channel-0 sample and realigns the index. In wideband
// mode every sample belongs to channel 0.
//
// The mode input nbc_mode is sampled only at a frame start (a strobe with
// in_sof, or any strobe in wideband mode), so a reconfiguration is taken on
// line at a clean boundary; the first epoch in the new mode raises flush
// together with epoch_start so the per-channel state can be cleared.
//
// Timing: the strobe cycle is the last cycle of the previous epoch. On the
// next cycle t is 0, epoch_start is high for one cycle, and ch and nbc hold
// the new epoch's channel and mode until the next strobe. The design expects
// one strobe every 16 clocks; t then runs 0..15 through each epoch.
// Outputs: t (clock within epoch), epoch_start, ch, nbc, flush.
// The behaviour follows the timing of the design description; the start-of-
// frame marker and the flush on a mode change are this design's choices.
module epoch_sequencer
  import mrd_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_strobe,
  input  logic           in_sof,
  input  logic           nbc_mode,
  output logic [3:0]     t,
  output logic           epoch_start,
  output logic [CHW-1:0] ch,
  output logic           nbc,
  output logic           flush
);

  logic [CHW-1:0] ch_r;
  logic           nbc_r;
  logic           frame_edge;
  logic           nbc_next;

  // A frame boundary: channel 0 in NBC mode, every sample in WBC mode.
  assign frame_edge = in_strobe && (in_sof || !nbc_r || ch_r == CHW'(NCH-1));
  assign nbc_next   = frame_edge ? nbc_mode : nbc_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t           <= '0;
      ch_r        <= '0;
      nbc_r       <= 1'b0;
      flush       <= 1'b0;
      epoch_start <= 1'b0;
    end else begin
      epoch_start <= in_strobe;
      flush       <= in_strobe && (nbc_next != nbc_r);
      if (in_strobe) begin
        t     <= '0;
        nbc_r <= nbc_next;
        if (!nbc_next || in_sof || ch_r == CHW'(NCH-1)) ch_r <= '0;
        else                                             ch_r <= ch_r + 1'b1;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  assign ch  = ch_r;
  assign nbc = nbc_r;

endmodule
