// bicmid_core: the iterative (BICM-ID) part of the receiver. It stores a
// received frame as distances and LLRs, decodes it with the vertical
// shuffled LDPC decoder and, within every decoding cycle, turns each new
// extrinsic value into an updated LLR for the other bit of the same cell, so
// demapping and decoding exchange information inside one iteration instead
// of once per frame (shuffled iterative demapping, schedule "B": P updated
// LLRs per cycle).
//
// How it works.
//  * Reception: cell t from the main demapper (ECD vector, two LLRs) is
//    written to the reception bank; its bits go to codeword positions
//    pi^-1(2t) and pi^-1(2t+1) (deinterleaving by addressing).
//  * When a frame is complete and the decoder is free, the banks swap and
//    the decoder starts; if the decoder is still busy, the received frame
//    is dropped (dropped pulses) and the bank is refilled.
//  * Decoding: each cycle lane k works on column n_k; it reads LLR[n_k]; a
//    pi_table gives the cell of n_k, the position of the bit and the
//    partner column; a demapper_feedback unit combines the cell's ECD with
//    the lane's new extrinsic value and the LLR of the partner column is
//    rewritten at the clock edge. Later reads of the partner use it.
//  * Output: after decoding, the K information bits leave P per cycle
//    (out_valid, out_bits, out_last), then the core is free again.
//
// Interface and timing: in_valid/in_ecd/in_llr, one cell per cycle at most.
// Decoding takes iters * N/P cycles (+1), the output K/P cycles.
// frame_iters / frame_conv describe the frame being output. fb_updates
// counts the lanes that fed a non-zero extrinsic value back this cycle. The structure
// (main demapper outside, P feedback demappers, P node processors,
// interleaver tables, two RAM banks) follows the reference design; the
// drop policy and the output format are this design's.
module bicmid_core
  import bicm_pkg::*;
#(
  parameter int unsigned N    = N_LDPC,
  parameter int unsigned K    = K_LDPC,
  parameter int unsigned GRP  = GROUP,
  parameter int unsigned P    = PAR,
  parameter int unsigned NC   = NCOL_IL,
  parameter int unsigned ITER = ITER_MAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  ecd_vec_t                in_ecd,
  input  logic signed [LLR_W-1:0] in_llr [M_BITS],
  output logic                    out_valid,
  output logic [P-1:0]            out_bits,
  output logic                    out_last,
  output logic [4:0]              frame_iters,
  output logic                    frame_conv,
  output logic                    dropped,
  output logic                    bank_swap,
  output logic [$clog2(P+1)-1:0]  fb_updates
);
  localparam int unsigned NCELL = N / M_BITS;
  localparam int unsigned NW    = $clog2(N);
  localparam int unsigned CLW   = $clog2(NCELL);

  typedef enum logic [1:0] {S_IDLE, S_DEC, S_OUT} state_t;
  state_t state;

  logic              rx_bank;
  logic [CLW-1:0]    rx_cell;
  logic [NW-1:0]     rx_n [M_BITS];
  logic              dec_start, dec_busy, dec_done, dec_conv, first_iter;
  logic [4:0]        dec_iters;
  logic [IDX_W-1:0]  lane_n   [P];
  logic signed [LLR_W-1:0] lane_llr [P];
  logic signed [EXT_W-1:0] lane_ext [P];
  logic [NW-1:0]     rd_n     [P];
  logic [CLW-1:0]    lane_cell [P];
  logic              lane_bit  [P];
  logic [NW-1:0]     lane_partner [P];
  ecd_vec_t          lane_ecd  [P];
  logic              wr_en     [P];
  logic signed [LLR_W-1:0] wr_llr [P];
  logic [$clog2(N/P)-1:0] out_grp;
  logic              frame_in_done;

  // ---------------- reception ----------------
  always_comb begin
    for (int b = 0; b < M_BITS; b++)
      rx_n[b] = NW'(pi_inv(int'(rx_cell) * M_BITS + b, N, NC));
  end
  assign frame_in_done = in_valid && (int'(rx_cell) == int'(NCELL) - 1);
  assign dec_start     = frame_in_done && (state == S_IDLE);

  // ---------------- memories ----------------
  llr_ecd_ram #(.N(N), .P(P)) u_ram (
    .clk, .rx_bank, .rx_we(in_valid), .rx_cell, .rx_ecd(in_ecd), .rx_n,
    .rx_llr(in_llr),
    .rd_n, .rd_llr(lane_llr), .rd_cell(lane_cell), .rd_ecd(lane_ecd),
    .wr_en, .wr_n(lane_partner), .wr_llr
  );

  // ---------------- decoder ----------------
  ldpc_vss_decoder #(.N(N), .K(K), .GRP(GRP), .P(P), .ITER(ITER)) u_dec (
    .clk, .rst_n, .start(dec_start), .busy(dec_busy), .done(dec_done),
    .iters(dec_iters), .converged(dec_conv), .first_iter,
    .lane_n, .lane_llr, .lane_ext, .rd_grp(out_grp), .rd_bits(out_bits)
  );

  // ---------------- feedback demappers ----------------
  for (genvar k = 0; k < P; k++) begin : g_fb
    assign rd_n[k] = NW'(lane_n[k]);
    pi_table #(.N(N), .NC(NC)) u_pi (
      .n(rd_n[k]), .cell_idx(lane_cell[k]), .bitpos(lane_bit[k]), .partner(lane_partner[k])
    );
    demapper_feedback u_fb (
      .ecd(lane_ecd[k]), .ext(lane_ext[k]), .tgt_bit(~lane_bit[k]), .llr(wr_llr[k])
    );
    assign wr_en[k] = dec_busy && !first_iter;
  end

  always_comb begin
    fb_updates = '0;
    for (int k = 0; k < P; k++)
      if (wr_en[k] && lane_ext[k] != '0) fb_updates = fb_updates + 1'b1;
  end

  // ---------------- control ----------------
  assign out_valid = (state == S_OUT);
  assign out_last  = (state == S_OUT) && (int'(out_grp) == int'(K / P) - 1);
  assign dropped   = frame_in_done && (state != S_IDLE);
  assign bank_swap = dec_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rx_bank     <= 1'b0;
      rx_cell     <= '0;
      out_grp     <= '0;
      frame_iters <= '0;
      frame_conv  <= 1'b0;
    end else begin
      if (in_valid)
        rx_cell <= frame_in_done ? '0 : rx_cell + 1'b1;
      if (dec_start) rx_bank <= ~rx_bank;
      case (state)
        S_IDLE: if (dec_start) state <= S_DEC;
        S_DEC: if (dec_done) begin
          state       <= S_OUT;
          out_grp     <= '0;
          frame_iters <= dec_iters;
          frame_conv  <= dec_conv;
        end
        S_OUT: begin
          if (out_last) state <= S_IDLE;
          else out_grp <= out_grp + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
