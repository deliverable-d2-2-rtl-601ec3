// bicmid_testbed: complete BICM-ID prototype: a DVB-T2 style transmitter,
// a fading/erasure channel emulator and the shuffled iterative receiver,
// with bit error counting, all in one clock domain.
//
//   prg -> ldpc_encoder -> bit_interleaver -> rotated_mapper (Q delayed by D)
//       -> channel_emulator -> equalizer -> I delayed by D -> rotated_demapper
//       -> bicmid_core (LLR/ECD banks, P feedback demappers, VSS MS3 decoder)
//       -> ber_counter (compares with the generator's bits)
//
// How it works: while run is high the generator feeds the encoder one bit
// per cycle; a frame of N coded bits leaves the encoder every N cycles, the
// interleaver turns it into N/2 rotated-QPSK cells, and each cell crosses
// the channel with independent fading, erasure and noise on I and Q. The
// receiver re-aligns I with Q, computes distances and LLRs, and the core
// decodes each frame iteratively (at most ITER iterations, early stop on a
// valid codeword) while the next frame is being received.
//
// Interface and timing: snr (Es/N0 in 0.25 dB), erasure (probability/2048)
// and llr_scale (2/sigma^2 with 4 fractional bits, to be set to match snr)
// configure the run. The outputs are running counters: decoded frames, bit
// errors, frames in error, bits compared, dropped frames, converged frames,
// the sum of iterations used, erased channel components, non-zero extrinsic
// feedbacks, bank swaps, frames that have left the interleaver; tx_overflow
// flags an interleaver overrun. The encoder's end-of-frame flag is left
// open: the interleaver counts its own frames. Block
// order and widths are those of the reference prototype; the control and
// counters are this design's.
module bicmid_testbed
  import bicm_pkg::*;
#(
  parameter int unsigned N    = N_LDPC,
  parameter int unsigned K    = K_LDPC,
  parameter int unsigned GRP  = GROUP,
  parameter int unsigned P    = PAR,
  parameter int unsigned NC   = NCOL_IL,
  parameter int unsigned ITER = ITER_MAX,
  parameter int unsigned D    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [SNR_W-1:0]  snr,
  input  logic [ERAS_W-1:0] erasure,
  input  logic [LSC_W-1:0]  llr_scale,
  output logic [31:0]       frames,
  output logic [31:0]       bit_errors,
  output logic [31:0]       frame_errors,
  output logic [31:0]       bits_checked,
  output logic [31:0]       frames_dropped,
  output logic [31:0]       frames_converged,
  output logic [31:0]       iter_sum,
  output logic [31:0]       erased,
  output logic [31:0]       feedbacks,
  output logic [31:0]       bank_swaps,
  output logic [31:0]       frames_sent,
  output logic              tx_overflow
);
  // transmitter
  logic prg_en, prg_bit, enc_ready, enc_valid, enc_bit;
  logic il_valid, il_last;
  logic [M_BITS-1:0] il_bits;
  logic map_valid;
  logic signed [X_W-1:0] x_i, x_q;
  // channel
  logic ch_valid;
  logic signed [Y_W-1:0] y_i, y_q;
  logic [RHO_W-1:0] rho_i, rho_q;
  // receiver
  logic eq_valid;
  logic signed [YEQ_W-1:0] yeq_i, yeq_q;
  logic [CSI_W-1:0] csi_i, csi_q;
  logic [YEQ_W+CSI_W-1:0] i_old;
  logic i_primed;
  logic dm_valid;
  ecd_vec_t dm_ecd;
  logic signed [LLR_W-1:0] dm_llr [M_BITS];
  logic core_valid, core_last, core_conv, core_drop, core_swap;
  logic [P-1:0] core_bits;
  logic [4:0] core_iters;
  logic [$clog2(P+1)-1:0] core_fb;

  assign prg_en = run && enc_ready;

  prg u_prg (.clk, .rst_n, .en(prg_en), .bit_o(prg_bit));

  ldpc_encoder #(.N(N), .K(K), .GRP(GRP)) u_enc (
    .clk, .rst_n, .in_valid(prg_en), .in_bit(prg_bit), .in_ready(enc_ready),
    .out_valid(enc_valid), .out_bit(enc_bit), .out_last()
  );

  bit_interleaver #(.N(N), .NC(NC)) u_il (
    .clk, .rst_n, .in_valid(enc_valid), .in_bit(enc_bit),
    .out_valid(il_valid), .out_bits(il_bits), .out_last(il_last),
    .overflow(tx_overflow)
  );

  rotated_mapper #(.D(D)) u_map (
    .clk, .rst_n, .in_valid(il_valid), .in_bits(il_bits),
    .out_valid(map_valid), .x_i, .x_q
  );

  channel_emulator u_ch (
    .clk, .rst_n, .snr, .erasure, .in_valid(map_valid), .x_i, .x_q,
    .out_valid(ch_valid), .y_i, .y_q, .rho_i, .rho_q
  );

  equalizer u_eq (
    .clk, .rst_n, .in_valid(ch_valid), .y_i, .y_q, .rho_i, .rho_q,
    .out_valid(eq_valid), .yeq_i, .yeq_q, .csi_i, .csi_q
  );

  symbol_delay #(.W(YEQ_W + CSI_W), .D(D)) u_idelay (
    .clk, .rst_n, .in_valid(eq_valid), .in_data({yeq_i, csi_i}),
    .out_data(i_old), .out_primed(i_primed)
  );

  rotated_demapper u_dm (
    .clk, .rst_n, .in_valid(eq_valid && i_primed),
    .yeq_i(i_old[CSI_W +: YEQ_W]), .yeq_q, .csi_i(i_old[CSI_W-1:0]), .csi_q,
    .llr_scale, .out_valid(dm_valid), .ecd(dm_ecd), .llr(dm_llr)
  );

  bicmid_core #(.N(N), .K(K), .GRP(GRP), .P(P), .NC(NC), .ITER(ITER)) u_core (
    .clk, .rst_n, .in_valid(dm_valid), .in_ecd(dm_ecd), .in_llr(dm_llr),
    .out_valid(core_valid), .out_bits(core_bits), .out_last(core_last),
    .frame_iters(core_iters), .frame_conv(core_conv), .dropped(core_drop),
    .bank_swap(core_swap), .fb_updates(core_fb)
  );

  ber_counter #(.K(K), .P(P)) u_ber (
    .clk, .rst_n, .ref_valid(prg_en), .ref_bit(prg_bit),
    .dec_valid(core_valid), .dec_bits(core_bits), .dec_last(core_last),
    .skip(core_drop), .frames, .bit_errors, .frame_errors, .bits_checked
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frames_dropped <= '0; frames_converged <= '0; iter_sum <= '0;
      erased <= '0; feedbacks <= '0; bank_swaps <= '0; frames_sent <= '0;
    end else begin
      if (core_drop) frames_dropped <= frames_dropped + 1;
      if (core_valid && core_last) begin
        iter_sum <= iter_sum + 32'(core_iters);
        if (core_conv) frames_converged <= frames_converged + 1;
      end
      if (ch_valid) erased <= erased + 32'(rho_i == '0) + 32'(rho_q == '0);
      feedbacks <= feedbacks + 32'(core_fb);
      if (core_swap) bank_swaps <= bank_swaps + 1;
      if (il_valid && il_last) frames_sent <= frames_sent + 1;
    end
  end
endmodule
