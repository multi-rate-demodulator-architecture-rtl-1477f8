// mrd_pkg: constants and types shared by the multi-rate demodulator.
//
// The demodulator processes either one wideband channel (WBC) or 32
// time-division-multiplexed narrowband channels (NBC) with one datapath.
// Every input sample gets one epoch of EPOCH system clocks. The sizes that
// follow the design description are NCH (32 channels), EPOCH (16 clocks),
// FIR taps (16), timing offsets (32 = 5 bits), the 24-bit loop filter and
// NCO words, and the 512x8, 256x8 and 1024x8 look-up tables. The 8-bit
// sample width and the fixed-point scalings are this design's own choice.
package mrd_pkg;

  localparam int NCH      = 32;   // narrowband channels
  localparam int CHW      = 5;    // channel index width
  localparam int EPOCH    = 16;   // system clocks per input sample epoch
  localparam int TAPS     = 16;   // re-sampling filter taps
  localparam int MUW      = 5;    // timing offset width (32 coefficient sets)
  localparam int DW       = 8;    // sample width (input, interpolants)
  localparam int CW       = 8;    // coefficient / table word width
  localparam int NCOW     = 24;   // NCO and loop filter word width
  localparam int SHW      = 5;    // loop gain shift amount width

  // Nominal re-sample ratio: input sample period over interpolant period,
  // 1.44 / 2.048 = 0.703125 of an input sample, as a 24-bit fraction.
  localparam logic [NCOW-1:0] RATIO_NOM = 24'hB4_0000;

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } cplx_t;

  // Saturate a wide signed value to a DW-bit sample.
  function automatic sample_t sat_sample(input logic signed [31:0] v);
    if (v > 32'sd127)       return sample_t'(8'sd127);
    else if (v < -32'sd128) return sample_t'(-8'sd128);
    else                    return sample_t'(v);
  endfunction

endpackage
