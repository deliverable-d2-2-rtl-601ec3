// demapper_feedback: one "simplified demapper" of the BICM-ID core. It turns
// the stored squared Euclidean distances of a cell (ECD) and the decoder's
// latest extrinsic value for one bit of that cell into the updated max-log
// LLR of the other bit (rotated QPSK carries two bits per cell).
//
// How it works: for the target bit b and the other bit o,
//   LLR_b = max_{p: b(p)=0} (-ECD_p + [o(p)=0]*ext)
//         - max_{p: b(p)=1} (-ECD_p + [o(p)=0]*ext)
// which is the max-log form of the demapping rule with the a-priori term of
// the other bit. With ext = 0 it is the plain max-log LLR, so the main
// demapper uses the same unit. The result is saturated to LLR_W bits.
// Positive LLR means bit value 0.
//
// Interface and timing: purely combinational. The reference core registers
// these units (updated LLRs are ready two cycles after the extrinsic value
// arrives); here the BICM-ID core writes the result into the LLR RAM at the
// next clock edge instead, which is this design's simplification.
module demapper_feedback
  import bicm_pkg::*;
(
  input  ecd_vec_t                 ecd,
  input  logic signed [EXT_W-1:0]  ext,
  input  logic                     tgt_bit,   // which bit of the cell to update
  output logic signed [LLR_W-1:0]  llr
);
  always_comb begin
    int best0, best1, m;
    best0 = -(1 << 20);
    best1 = -(1 << 20);
    for (int p = 0; p < N_PTS; p++) begin
      logic [M_BITS-1:0] lbl;
      lbl = M_BITS'(p);
      m = -int'(ecd[p]);
      if (lbl[~tgt_bit] == 1'b0) m = m + int'(ext);
      if (lbl[tgt_bit] == 1'b0) begin
        if (m > best0) best0 = m;
      end else begin
        if (m > best1) best1 = m;
      end
    end
    llr = LLR_W'(sat(best0 - best1, LLR_W));
  end
endmodule
