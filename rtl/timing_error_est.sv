// timing_error_est: data-transition-tracking timing error estimate.
//
// For each arm the signs (MSBs) of the previous and the current midpoint
// tell whether a data transition happened between them. With MSBn the
// current and MSBn-1 the previous midpoint's sign bit:
//   MSBn MSBn-1 : error
//    0     0    :  0
//    0     1    : +T     (rising edge)
//    1     0    : -T     (falling edge)
//    1     1    :  0
// where T is the transition sample between the two midpoints. The I and Q
// estimates are summed. A transition sampled early gives a negative estimate
// and one sampled late a positive one. Purely combinational. The table
// follows the design description; the output width (DW+2) is this design's
// choice.
module timing_error_est
  import mrd_pkg::*;
(
  input  sample_t                mp_prev_i,
  input  sample_t                tr_i,
  input  sample_t                mp_cur_i,
  input  sample_t                mp_prev_q,
  input  sample_t                tr_q,
  input  sample_t                mp_cur_q,
  output logic signed [DW+1:0]   err
);

  function automatic logic signed [DW+1:0] arm(input logic msb_n, input logic msb_p,
                                               input sample_t tr);
    case ({msb_n, msb_p})
      2'b01:   return (DW+2)'(tr);
      2'b10:   return -(DW+2)'(tr);
      default: return '0;
    endcase
  endfunction

  assign err = arm(mp_cur_i[DW-1], mp_prev_i[DW-1], tr_i)
             + arm(mp_cur_q[DW-1], mp_prev_q[DW-1], tr_q);

endmodule
