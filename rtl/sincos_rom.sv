// sincos_rom: cos/sin look-up of the carrier phase estimate (256 x 8).
//
// One 256-word table holds round(127 * sin(2*pi*a/256)); the 8-bit phase
// theta (256 steps over +-pi, two's complement) reads it at theta for the
// sine and at theta + 64 (a quarter turn on) for the cosine, through two read
// ports. Outputs are registered: one cycle from phase to cos/sin. The table
// size follows the design description; the single sine table with an offset
// read and the amplitude 127 are this design's choices.
module sincos_rom
  import mrd_pkg::*;
(
  input  logic                 clk,
  input  logic [7:0]           phase,
  output logic signed [CW-1:0] cos_o,
  output logic signed [CW-1:0] sin_o
);

  typedef logic signed [CW-1:0] rom_t [256];

  function automatic rom_t gen_table();
    rom_t r;
    real  v;
    for (int a = 0; a < 256; a++) begin
      v = 127.0 * $sin(2.0 * 3.14159265358979 * real'(a) / 256.0);
      r[a] = CW'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_table();

  always_ff @(posedge clk) begin
    sin_o <= ROM[phase];
    cos_o <= ROM[8'(phase + 8'd64)];
  end

endmodule
