// loop_filter: proportional-plus-integral loop filter, one state per channel.
//
// Used both in the symbol sync loop and in the carrier tracking loop. The
// error input err (EW bits) is aligned to the top of a 24-bit word,
// e = err * 2^(24-EW). On update for channel ch:
//   integ <= sat(integ + e * K_I),  out <= sat(e * K_L + integ_new)
// with K_L = 2^-kl and K_I = 2^-ki, so both gains are shifts (the gains are
// powers of two and programmable, as the design description requires). The
// 24-bit output width gives loop bandwidths over several decades.
// The output of every channel is held in a register array and read
// combinationally through rch (zero-order hold between updates), since the
// NCOs are advanced every epoch while the filter is updated once per symbol.
// Saturation and the hold are this design's choices. flush clears all.
module loop_filter
  import mrd_pkg::*;
#(
  parameter int N_CH = NCH,
  parameter int EW   = DW + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic                    update,
  input  logic [$clog2(N_CH)-1:0] ch,
  input  logic signed [EW-1:0]    err,
  input  logic [SHW-1:0]          kl,
  input  logic [SHW-1:0]          ki,
  input  logic [$clog2(N_CH)-1:0] rch,
  output logic signed [NCOW-1:0]  out
);

  localparam logic signed [NCOW+1:0] MAXV = (NCOW+2)'((1 << (NCOW-1)) - 1);
  localparam logic signed [NCOW+1:0] MINV = -(NCOW+2)'(1 << (NCOW-1));

  logic signed [NCOW-1:0] integ [N_CH];
  logic signed [NCOW-1:0] outm  [N_CH];
  logic signed [NCOW-1:0] e, integ_n, out_n;
  logic signed [NCOW+1:0] sum_i, sum_o;

  function automatic logic signed [NCOW-1:0] sat24(input logic signed [NCOW+1:0] v);
    if (v > MAXV)      return MAXV[NCOW-1:0];
    else if (v < MINV) return MINV[NCOW-1:0];
    else               return v[NCOW-1:0];
  endfunction

  always_comb begin
    e       = {err, {(NCOW-EW){1'b0}}};
    sum_i   = (NCOW+2)'(integ[ch]) + (NCOW+2)'(e >>> ki);
    integ_n = sat24(sum_i);
    sum_o   = (NCOW+2)'(integ_n) + (NCOW+2)'(e >>> kl);
    out_n   = sat24(sum_o);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        integ[c] <= '0;
        outm[c]  <= '0;
      end
    end else if (flush) begin
      for (int c = 0; c < N_CH; c++) begin
        integ[c] <= '0;
        outm[c]  <= '0;
      end
    end else if (update) begin
      integ[ch] <= integ_n;
      outm[ch]  <= out_n;
    end
  end

  assign out = outm[rch];

endmodule
