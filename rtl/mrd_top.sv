// mrd_top: multi-rate OQPSK demodulator.
//
// One datapath demodulates either a single wideband channel (WBC, one
// sample per epoch, all epochs for channel 0) or 32 time-division-
// multiplexed narrowband channels (NBC, epochs cycle through channels 0..31),
// for differentially encoded OQPSK at two interpolants per symbol. The
// system clock is 16 times the input sample rate, so each input sample (WBC)
// or each channel (NBC) owns a 16-clock epoch. All channel state (NCOs, loop
// filter registers, filter history, de-stagger samples) is kept per channel,
// so channels are independent.
//
// Chain (see the blocks for details):
//   input_buffer -> resample_fir (coefficients from two rs_coef_rom, offsets
//   from sym_sync_nco) -> derotate (phase from carrier_nco via sincos_rom) ->
//   destagger_buffer -> timing_error_est / phase_error_rom / symbol_decision;
//   the two error estimates close the symbol sync and carrier loops through
//   two loop_filter instances.
//
// Schedule. Front end, epoch of channel c (t = clock within epoch):
//   strobe  input sample registered
//   t=0     sample written to input_buffer; symbol sync NCO updated, giving
//           one or two timing offsets
//   t=1..16 16 taps read (oldest first), coefficient sets for both offsets
//   t=2..17 four multiply-accumulates; results at t=18 (= next epoch t=2)
// Back end, cycle b after the filter results (b=0 is next epoch's t=2):
//   b0 carrier phase -> cos/sin, b1/b2 derotate interpolant A/B, b2/b3 write
//   them to the de-stagger buffer, b4 check that a symbol is complete,
//   b4..b7 read its six samples, b9 timing error and symbol decision,
//   b10 loop filter updates, b11 carrier NCO update.
// Each interpolant is labelled even (I midpoint / Q transition) or odd
// (I transition / Q midpoint) by a per-channel parity bit. A symbol is
// processed when an odd interpolant arrives and the buffer holds the three
// before it; otherwise the estimates and decisions of the epoch are bypassed
// while both NCOs still advance. In WBC mode a loop update reaches the
// symbol sync NCO one epoch after the symbol it came from.
//
// Interface: in_strobe must pulse once every 16 clocks (the data clock);
// in_sof marks NBC channel 0. nbc_mode is taken at a frame boundary, and a
// change clears all channel state. Loop gains are powers of two set by
// shift amounts (K = 2^-k); ratio is the coarse re-sample ratio.
// Outputs: serial dout with strobe dclk and channel index dout_ch, and 32
// separate per-channel data/strobe lines.
//
// The sequencer's t and nbc outputs are not needed here (the schedule is
// keyed to epoch_start and to the filter's done pulse); proc_ev and
// bypass_ev are observation points for testbenches and drive nothing.
//
// What follows the design description: the blocks, the 16-clock epoch, the
// one-or-two interpolant rule, the bypass, the loop structure and sizes.
// This design's choices: the cycle schedule above, the parity labelling, the
// 8-bit sample width, the start-of-frame input and the flush on mode change.
module mrd_top
  import mrd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_strobe,
  input  logic            in_sof,
  input  sample_t         in_i,
  input  sample_t         in_q,
  input  logic            nbc_mode,
  input  logic [NCOW-1:0] ratio,
  input  logic [SHW-1:0]  ss_kl,
  input  logic [SHW-1:0]  ss_ki,
  input  logic [SHW-1:0]  ss_kt,
  input  logic [SHW-1:0]  ct_kl,
  input  logic [SHW-1:0]  ct_ki,
  input  logic [SHW-1:0]  ct_kt,
  output logic            dout,
  output logic            dclk,
  output logic [CHW-1:0]  dout_ch,
  output logic [NCH-1:0]  nbc_data,
  output logic [NCH-1:0]  nbc_clk
);

  // ------------------------------------------------------------ timing
  logic [3:0]     t;
  logic           epoch_start, flush;
  logic [CHW-1:0] ch;
  logic           nbc;
  cplx_t          in_reg;

  epoch_sequencer u_seq (
    .clk, .rst_n, .in_strobe, .in_sof, .nbc_mode,
    .t, .epoch_start, .ch, .nbc, .flush
  );

  always_ff @(posedge clk) if (in_strobe) in_reg <= '{i: in_i, q: in_q};

  // ------------------------------------------------------------ front end
  logic signed [NCOW-1:0] ss_lf_out;
  logic                   nco_valid, two;
  logic [MUW-1:0]         mu_a, mu_b;

  sym_sync_nco u_ss_nco (
    .clk, .rst_n, .flush,
    .update (epoch_start), .ch, .ratio, .fine (ss_lf_out), .kt (ss_kt),
    .valid (nco_valid), .mu_a, .mu_b, .two
  );

  // Tap read sequencer: 16 reads starting the cycle after epoch start.
  logic [CHW-1:0] fch;
  logic           rd_act;
  logic [3:0]     rd_idx;
  logic           rd_act_d, rd_first_d;
  logic           fir_two;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fch        <= '0;
      rd_act     <= 1'b0;
      rd_idx     <= '0;
      rd_act_d   <= 1'b0;
      rd_first_d <= 1'b0;
      fir_two    <= 1'b0;
    end else begin
      rd_act_d   <= rd_act;
      rd_first_d <= rd_act && rd_idx == 4'd0;
      if (epoch_start) begin
        fch    <= ch;
        rd_act <= 1'b1;
        rd_idx <= '0;
      end else if (rd_act) begin
        rd_idx <= rd_idx + 1'b1;
        if (rd_idx == 4'(TAPS - 1)) rd_act <= 1'b0;
      end
      if (nco_valid) fir_two <= two;
    end
  end

  cplx_t                tap_x;
  logic [3:0]           tap_sel;
  logic signed [CW-1:0] coef_a, coef_b;

  assign tap_sel = 4'(TAPS - 1) - rd_idx;   // oldest sample first

  input_buffer u_inbuf (
    .clk, .rst_n,
    .we (epoch_start), .wch (ch), .wdata (in_reg),
    .rch (fch), .rtap (tap_sel), .rdata (tap_x)
  );

  rs_coef_rom u_coef_a (.clk, .mu (mu_a), .tap (tap_sel), .coef (coef_a));
  rs_coef_rom u_coef_b (.clk, .mu (mu_b), .tap (tap_sel), .coef (coef_b));

  cplx_t fir_ya, fir_yb;
  logic  fir_done;

  resample_fir u_fir (
    .clk, .rst_n,
    .tap_valid (rd_act_d), .first (rd_first_d), .x (tap_x),
    .ca (coef_a), .cb (coef_b),
    .ya (fir_ya), .yb (fir_yb), .done (fir_done)
  );

  // Channel and sample count of the set in the filter, handed to the back
  // end with its results. A mode change drops the set still in flight.
  logic [CHW-1:0] fir_ch_q;
  logic           fir_two_q, drop_next;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fir_ch_q  <= '0;
      fir_two_q <= 1'b0;
      drop_next <= 1'b0;
    end else begin
      if (rd_act && rd_idx == 4'(TAPS - 1)) begin
        fir_ch_q  <= fch;
        fir_two_q <= fir_two;
      end
      if (flush)         drop_next <= 1'b1;
      else if (fir_done) drop_next <= 1'b0;
    end
  end

  // ------------------------------------------------------------ back end
  logic           b_act, b_drop, b_two;
  logic [3:0]     b;
  logic [CHW-1:0] bch;
  cplx_t          b_ya, b_yb;
  logic [NCH-1:0] par;          // label of the next interpolant: 1 = odd
  logic           b_par;        // label of interpolant A
  logic           proc;         // a complete symbol is being processed
  logic [2:0]     odd_age;
  logic           bypass_ev, proc_ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_act  <= 1'b0;
      b      <= '0;
      bch    <= '0;
      b_drop <= 1'b0;
      b_two  <= 1'b0;
      b_ya   <= '0;
      b_yb   <= '0;
      b_par  <= 1'b0;
    end else if (fir_done) begin
      b_act  <= 1'b1;
      b      <= '0;
      bch    <= fir_ch_q;
      b_drop <= drop_next || flush;
      b_two  <= fir_two_q;
      b_ya   <= fir_ya;
      b_yb   <= fir_yb;
      b_par  <= par[fir_ch_q];
    end else if (b_act) begin
      b <= b + 1'b1;
      if (b == 4'd11) b_act <= 1'b0;
    end
  end

  // Carrier phase -> cos/sin -> derotation of A then B.
  logic [7:0]           ct_phase;
  logic signed [CW-1:0] cos_v, sin_v;
  logic signed [NCOW-1:0] ct_lf_out;
  logic                 dr_in_valid, dr_out_valid;
  cplx_t                dr_x, dr_y;

  sincos_rom u_sincos (.clk, .phase (ct_phase), .cos_o (cos_v), .sin_o (sin_v));

  assign dr_in_valid = b_act && !b_drop && (b == 4'd1 || (b == 4'd2 && b_two));
  assign dr_x        = (b == 4'd1) ? b_ya : b_yb;

  derotate u_derot (
    .clk, .rst_n, .in_valid (dr_in_valid), .x (dr_x),
    .cos_i (cos_v), .sin_i (sin_v), .out_valid (dr_out_valid), .y (dr_y)
  );

  // De-stagger buffer.
  logic [2:0] ds_age;
  cplx_t      ds_rdata;
  logic [3:0] ds_fill;

  destagger_buffer u_dstag (
    .clk, .rst_n, .flush,
    .we (dr_out_valid), .wch (bch), .wdata (dr_y),
    .rch (bch), .rage (ds_age), .rdata (ds_rdata), .fill (ds_fill)
  );

  // Where the odd interpolant sits, counted back from the newest one.
  always_comb begin
    if (b_two && !b_par) odd_age = 3'd0;   // B is odd
    else if (b_two)      odd_age = 3'd1;   // A is odd, B even after it
    else                 odd_age = 3'd0;   // only A, odd if b_par
  end

  logic has_odd;
  assign has_odd = b_par || b_two;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      proc <= 1'b0;
      par  <= '0;
    end else begin
      if (flush) par <= '0;
      else if (b_act && !b_drop && b == 4'd3)
        par[bch] <= b_two ? b_par : !b_par;
      if (b_act && b == 4'd4)
        proc <= !b_drop && has_odd && ds_fill >= 4'(odd_age) + 4'd4;
      else if (b_act && b == 4'd11)
        proc <= 1'b0;
    end
  end

  assign ds_age = odd_age + 3'(b - 4'd4);   // used b4..b7

  // Gather the six samples of the symbol (data one cycle after address).
  sample_t q_mp_cur, i_mp_cur, q_tr, i_tr, q_mp_prev, i_mp_prev;
  always_ff @(posedge clk) begin
    if (b_act) begin
      case (b)
        4'd5: q_mp_cur  <= ds_rdata.q;
        4'd6: begin i_mp_cur  <= ds_rdata.i; q_tr      <= ds_rdata.q; end
        4'd7: begin i_tr      <= ds_rdata.i; q_mp_prev <= ds_rdata.q; end
        4'd8: i_mp_prev <= ds_rdata.i;
        default: ;
      endcase
    end
  end

  // Estimators and decisions.
  logic signed [DW+1:0] t_err;
  logic signed [CW-1:0] p_err;

  timing_error_est u_ted (
    .mp_prev_i (i_mp_prev), .tr_i (i_tr), .mp_cur_i (i_mp_cur),
    .mp_prev_q (q_mp_prev), .tr_q (q_tr), .mp_cur_q (q_mp_cur),
    .err (t_err)
  );

  phase_error_rom u_ped (.clk, .i_mp (i_mp_cur), .q_mp (q_mp_cur), .err (p_err));

  logic stage9, stage10, stage11;
  assign stage9  = b_act && b == 4'd9  && proc;
  assign stage10 = b_act && b == 4'd10 && proc;
  assign stage11 = b_act && b == 4'd11 && !b_drop;

  loop_filter #(.EW (DW + 2)) u_ss_lf (
    .clk, .rst_n, .flush,
    .update (stage9), .ch (bch), .err (t_err), .kl (ss_kl), .ki (ss_ki),
    .rch (ch), .out (ss_lf_out)
  );

  loop_filter #(.EW (CW)) u_ct_lf (
    .clk, .rst_n, .flush,
    .update (stage10), .ch (bch), .err (p_err), .kl (ct_kl), .ki (ct_ki),
    .rch (bch), .out (ct_lf_out)
  );

  carrier_nco u_ct_nco (
    .clk, .rst_n, .flush,
    .update (stage11), .ch (bch), .fine (ct_lf_out), .kt (ct_kt),
    .rch (bch), .phase (ct_phase)
  );

  symbol_decision u_dec (
    .clk, .rst_n, .dec_valid (stage9), .ch (bch),
    .msb_i_cur (i_mp_cur[DW-1]), .msb_i_prev (i_mp_prev[DW-1]),
    .msb_q_cur (q_mp_cur[DW-1]), .msb_q_prev (q_mp_prev[DW-1]),
    .dout, .dclk, .dout_ch, .nbc_data, .nbc_clk
  );

  // Event flags for observation (one pulse per epoch's back end).
  assign proc_ev   = b_act && b == 4'd5 && proc;
  assign bypass_ev = b_act && b == 4'd5 && !proc;

  // The epoch schedule relies on one strobe every 16 clocks.
  property p_epoch;
    @(posedge clk) disable iff (!rst_n) epoch_start |-> !in_strobe [*14];
  endproperty
  a_epoch: assert property (p_epoch);

endmodule
