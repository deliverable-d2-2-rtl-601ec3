// rotated_demapper: the receiver's main demapper for rotated QPSK. For each
// received cell it computes the squared Euclidean distance to all four
// constellation points, weighted per axis by the channel state,
//   D_p = [csi_i (y_i - x_i(p))]^2 + [csi_q (y_q - x_q(p))]^2,
// scales it by 2/sigma^2 (llr_scale) into LLR units, and derives the two
// max-log bit LLRs (no a-priori information yet). The distances (ECD) are
// kept by the BICM-ID core so that later LLR updates need no I/Q samples.
//
// How it works: four parallel distance units, each: two differences, two
// products with the CSI, two squares, one sum, one product with llr_scale,
// shift and saturation to ECD_W bits; then two demapper_feedback units
// with zero extrinsic give the LLRs. Scales: y, x and csi at 1.0 = 64, so
// D has 1.0 = 2^24; llr_scale has 4 fractional bits; 1 LLR unit = 1/4 of a
// natural LLR: ECD = D * llr_scale / 2^28.
//
// Interface and timing: in_valid with an aligned cell (I already delayed
// by d); out_valid, ecd and llr one cycle later. Equation (21)'s distance,
// the max-log rule and the 8-bit LLR width are from the reference design;
// the scale factors, the ECD width and the registered output are this
// design's choices.
module rotated_demapper
  import bicm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [YEQ_W-1:0] yeq_i,
  input  logic signed [YEQ_W-1:0] yeq_q,
  input  logic [CSI_W-1:0]        csi_i,
  input  logic [CSI_W-1:0]        csi_q,
  input  logic [LSC_W-1:0]        llr_scale,
  output logic                    out_valid,
  output ecd_vec_t                ecd,
  output logic signed [LLR_W-1:0] llr [M_BITS]
);
  ecd_vec_t ecd_c;
  logic signed [LLR_W-1:0] llr_c [M_BITS];

  always_comb begin
    for (int p = 0; p < N_PTS; p++) begin
      longint di, dq, d;
      di = longint'(csi_i) * (longint'(yeq_i) - longint'(pt_i(p, Y_SMALL, Y_LARGE)));
      dq = longint'(csi_q) * (longint'(yeq_q) - longint'(pt_q(p, Y_SMALL, Y_LARGE)));
      d  = di * di + dq * dq;
      ecd_c[p] = ECD_W'(usat((d * longint'(llr_scale)) >>> 28, ECD_W));
    end
  end

  for (genvar b = 0; b < M_BITS; b++) begin : g_llr
    demapper_feedback u_llr (
      .ecd(ecd_c), .ext('0), .tgt_bit(1'(b)), .llr(llr_c[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ecd <= '0;
      for (int b = 0; b < M_BITS; b++) llr[b] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ecd <= ecd_c;
        for (int b = 0; b < M_BITS; b++) llr[b] <= llr_c[b];
      end
    end
  end
endmodule
