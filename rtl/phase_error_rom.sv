// phase_error_rom: carrier phase error estimate by look-up (1024 x 8).
//
// The address is the 5 most significant bits of the current I midpoint and
// of the current Q midpoint, {I[7:3], Q[7:3]}. The word holds
//   err = atan2(Q, I) - theta_opt
// for the centre of that cell, where theta_opt is pi/4, 3pi/4, -3pi/4 or
// -pi/4 for the 1st, 2nd, 3rd or 4th quadrant (the ideal QPSK point), so the
// error lies within +-pi/4. It is scaled to the carrier NCO's units, 128
// steps per pi (+-32 at most), and rounded. Output registered: one cycle.
// The equation, quadrant rule and table size follow the design description;
// the address split and the scaling are this design's choices. Another
// modulation needs only another table function.
module phase_error_rom
  import mrd_pkg::*;
(
  input  logic                 clk,
  input  sample_t              i_mp,
  input  sample_t              q_mp,
  output logic signed [CW-1:0] err
);

  typedef logic signed [CW-1:0] rom_t [1024];

  function automatic rom_t gen_table();
    rom_t r;
    real  pi, x, y, th, opt, v;
    pi = 3.14159265358979;
    for (int a = 0; a < 1024; a++) begin
      x   = real'($signed(5'(a >> 5))) + 0.5;
      y   = real'($signed(5'(a))) + 0.5;
      th  = $atan2(y, x);
      if (x > 0.0) opt = (y > 0.0) ?  pi / 4.0      : -pi / 4.0;
      else         opt = (y > 0.0) ?  3.0 * pi / 4.0 : -3.0 * pi / 4.0;
      v   = (th - opt) * 128.0 / pi;
      r[a] = CW'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_table();

  always_ff @(posedge clk) err <= ROM[{i_mp[DW-1 -: 5], q_mp[DW-1 -: 5]}];

endmodule
