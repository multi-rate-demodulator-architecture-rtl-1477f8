// symbol_decision: symbol decisions and data/clock formatting.
//
// On dec_valid the sign bits of the previous and current midpoints of both
// arms address a 16 x 2 decision table (DEC_TABLE, address {I cur, I prev,
// Q cur, Q prev}); the default table decodes differential encoding, each bit
// being the XOR of the two sign bits of its arm. The two bits of the symbol
// (I first, then Q) are sent on consecutive cycles on the serial line dout
// with a one-cycle strobe dclk and the channel index dout_ch, so all
// narrowband channels share one TDM data/clock line. The same bits also go
// to 32 separate per-channel lines: nbc_data[c] holds channel c's last bit
// and nbc_clk[c] pulses with it. dec_valid must not come more often than
// every second cycle. The table look-up, the 2 bits per symbol, the serial
// TDM line with channel index and the 32 separate lines follow the design
// description; the bit order and strobe form are this design's choices.
module symbol_decision
  import mrd_pkg::*;
#(
  parameter int        N_CH      = NCH,
  parameter logic [31:0] DEC_TABLE = 32'h14BE_BE14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    dec_valid,
  input  logic [$clog2(N_CH)-1:0] ch,
  input  logic                    msb_i_cur,
  input  logic                    msb_i_prev,
  input  logic                    msb_q_cur,
  input  logic                    msb_q_prev,
  output logic                    dout,
  output logic                    dclk,
  output logic [$clog2(N_CH)-1:0] dout_ch,
  output logic [N_CH-1:0]         nbc_data,
  output logic [N_CH-1:0]         nbc_clk
);

  logic [3:0]              addr;
  logic [1:0]              bits;
  logic                    pend;
  logic                    q_bit;

  assign addr = {msb_i_cur, msb_i_prev, msb_q_cur, msb_q_prev};
  assign bits = DEC_TABLE[2*addr +: 2];   // bits[1] = I bit, bits[0] = Q bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout     <= 1'b0;
      dclk     <= 1'b0;
      dout_ch  <= '0;
      pend     <= 1'b0;
      q_bit    <= 1'b0;
      nbc_data <= '0;
      nbc_clk  <= '0;
    end else begin
      dclk    <= 1'b0;
      nbc_clk <= '0;
      if (dec_valid) begin
        dout          <= bits[1];
        dclk          <= 1'b1;
        dout_ch       <= ch;
        q_bit         <= bits[0];
        pend          <= 1'b1;
        nbc_data[ch]  <= bits[1];
        nbc_clk[ch]   <= 1'b1;
      end else if (pend) begin
        dout              <= q_bit;
        dclk              <= 1'b1;
        pend              <= 1'b0;
        nbc_data[dout_ch] <= q_bit;
        nbc_clk[dout_ch]  <= 1'b1;
      end
    end
  end

endmodule
